// tb_status_tx: data frames and status requests compete for the transmit
// stream under random back-pressure. Every output frame must be either the
// next data frame, unchanged, or a 60-byte status reply with the status word
// taken when it started; no frame may be cut, and each request gets a reply.
module tb_status_tx;
  import daq_pkg::*;
  `include "tb_util.svh"
  localparam logic [47:0] BOARD = 48'h000A35000001;
  localparam logic [47:0] HOST  = 48'h6C4B90112233;
  logic clk = 0, rst = 1, req = 0;
  daq_status_t status;
  logic [47:0] host_mac = HOST;
  logic [7:0] d_data, tx_data;
  logic d_valid, d_last, d_ready, tx_valid, tx_last, tx_ready = 1;
  logic [15:0] replies;
  int checks = 0, failures = 0, nreq = 0, nstat = 0, ndata = 0;
  bytes_t dq[$];          // data frames still to be offered
  bytes_t exp_data[$];    // data frames expected at the output
  bytes_t cur;
  int pos = 0;
  logic [7:0] frame[$];

  status_tx #(.MY_MAC(BOARD)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // data source: a frame, once started, is offered without gaps
  initial begin d_valid = 0; d_data = 0; d_last = 0; end
  always @(posedge clk) if (!rst) begin
    if (d_valid && d_ready) begin
      if (d_last) begin cur = {}; pos = 0; end
      else pos++;
    end
    if (cur.size() == 0 && dq.size() > 0 && ($urandom % 8 == 0)) cur = dq.pop_front();
    d_valid <= (cur.size() > 0);
    d_data  <= (cur.size() > 0) ? cur[pos] : 8'h00;
    d_last  <= (cur.size() > 0) && (pos == cur.size() - 1);
    status.event_id <= status.event_id + 24'd1;   // changes every cycle
  end

  task automatic check_out();
    if ({frame[12], frame[13]} == CMD_STATUS) begin
      logic [111:0] w = '0;
      daq_status_t st;
      bit ok = (frame.size() == 60);
      for (int i = 0; i < 14 && ok; i++) w = {w[103:0], frame[14 + i]};
      for (int i = 0; i < 6 && ok; i++) ok = (frame[i] == HOST[8*(5-i) +: 8]) && (frame[6+i] == BOARD[8*(5-i) +: 8]);
      for (int i = 28; i < 60 && ok; i++) ok = (frame[i] == 0);
      chk(ok, "status reply format");
      st = daq_status_t'(w[$bits(daq_status_t)-1:0]);
      chk(w[111:$bits(daq_status_t)] == 0 && st.packets == 16'd33 && st.dropped == 16'd11 &&
          st.ignored == 16'd55 && st.ext_trig_mode && st.cfg_busy && !st.cfg_done, "status word");
      // taken when the reply started: at most ~200 cycles before its end
      chk(st.event_id < status.event_id && status.event_id - st.event_id < 24'd200,
          $sformatf("status snapshot age %0d", status.event_id - st.event_id));
      nstat++;
    end else begin
      chk(exp_data.size() > 0 && frame == exp_data[0], "data frame intact and in order");
      if (exp_data.size() > 0) void'(exp_data.pop_front());
      ndata++;
    end
  endtask

  always @(posedge clk) if (!rst) begin
    if (tx_valid && tx_ready) begin
      frame.push_back(tx_data);
      if (tx_last) begin check_out(); frame = {}; end
    end
  end

  initial begin
    bytes_t p;
    status = '{ext_trig_mode: 1'b1, ext_clk_sel: 1'b0, run: 1'b1, cfg_busy: 1'b1, cfg_done: 1'b0,
               event_id: 24'h0, dropped: 16'd11, lost: 16'd22, packets: 16'd33,
               commands: 16'd44, ignored: 16'd55};
    for (int f = 0; f < 40; f++) begin
      p = {};
      for (int i = 0; i < 14 + 75; i++) p.push_back(8'($urandom));
      dq.push_back(make_frame(HOST, BOARD, 16'd75, p.size() > 0 ? p[14:$] : p));
    end
    foreach (dq[i]) exp_data.push_back(dq[i]);
    repeat (3) @(posedge clk);
    rst <= 0;
    fork
      repeat (12) begin
        repeat ($urandom_range(300, 600)) @(posedge clk);
        req <= 1; @(posedge clk); req <= 0; nreq++;
      end
      repeat (8000) begin @(posedge clk); tx_ready <= ($urandom % 4) != 0; end
    join
    tx_ready <= 1;
    repeat (3000) @(posedge clk);
    chk(ndata == 40 && exp_data.size() == 0, $sformatf("all data frames out (%0d)", ndata));
    chk(nstat == nreq && replies == 16'(nreq), $sformatf("one reply per request (%0d of %0d)", nstat, nreq));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

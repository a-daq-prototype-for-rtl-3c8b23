// tb_fifo_ctrl: offers hits from two sources to the FIFO controller with a
// queue standing in for the FIFO. Checks the packet bytes in both trigger
// modes, the end flag and pkt_done, round-robin order when both sources wait,
// the one-byte-per-cycle write rate, dropping when the FIFO lacks room for a
// whole packet, and discarding while run is low.
module tb_fifo_ctrl;
  import daq_pkg::*;
  `include "tb_util.svh"
  localparam logic [47:0] BOARD = 48'h000A35000001;
  localparam logic [47:0] HOST  = 48'h6C4B90112233;
  localparam int DEPTH = 300;
  logic clk = 0, rst = 1, run = 0, ext_mode = 0;
  logic [23:0] event_id = '0;
  logic [47:0] host_mac = HOST;
  vmm_hit_t evt[2];
  logic [1:0] evt_valid = '0, evt_ready;
  logic [$clog2(DEPTH+2)-1:0] free;
  logic wr_en, pkt_done;
  logic [8:0] wr_data;
  logic [15:0] dropped;
  int checks = 0, failures = 0, ndone = 0, nwr = 0;
  logic [8:0] q[$];
  int cap = DEPTH + 1;

  fifo_ctrl #(.MY_MAC(BOARD), .FIFO_DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  assign free = ($bits(free))'(cap - q.size());

  always @(posedge clk) if (!rst) begin
    if (wr_en) begin q.push_back(wr_data); nwr++; end
    if (pkt_done) ndone++;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // offer one hit from source s and wait until it is taken
  task automatic offer(int s, vmm_hit_t h);
    evt[s] <= h; evt_valid[s] <= 1'b1;
    do @(posedge clk); while (!evt_ready[s]);
    evt_valid[s] <= 1'b0;
  endtask

  // compare the queue with a packet and remove it
  task automatic check_packet(bytes_t e, string what);
    bit ok = (q.size() >= e.size());
    for (int i = 0; ok && i < e.size(); i++)
      ok = (q[i][7:0] == e[i]) && (q[i][8] == (i == e.size() - 1));
    chk(ok, what);
    for (int i = 0; i < e.size() && q.size() > 0; i++) void'(q.pop_front());
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_hit_t hs[$];
    exp_hit_t x;
    int t0;
    evt[0] = '0; evt[1] = '0;
    repeat (3) @(posedge clk);
    rst <= 0; run <= 1;
    // self-trigger packet, hits alternating between sources
    for (int k = 0; k < 15; k++) begin
      x.hit = rand_hit(); x.vmm = 1'(k % 2); x.id = '0;
      hs.push_back(x);
      offer(k % 2, x.hit);
      repeat (8) @(posedge clk);
    end
    chk(ndone == 1, "pkt_done after 15 hits");
    check_packet(exp_packet(HOST, BOARD, 0, hs), "self-trigger packet");
    // external-trigger packet: both sources valid, round robin, event IDs
    hs = {};
    ext_mode <= 1;
    @(posedge clk);
    t0 = nwr;
    for (int k = 0; k < 15; k += 2) begin
      vmm_hit_t a = rand_hit(), b = rand_hit();
      event_id <= 24'(1000 + k);
      evt[0] <= a; evt[1] <= b; evt_valid <= 2'b11;
      @(posedge clk);
      while (evt_valid != 0) begin
        if (evt_ready[0]) begin
          x.hit = a; x.vmm = 0; x.id = 24'(1000 + k); hs.push_back(x);
          evt_valid[0] <= 0;
        end
        if (evt_ready[1]) begin
          x.hit = b; x.vmm = 1; x.id = 24'(1000 + k); hs.push_back(x);
          evt_valid[1] <= 0;
        end
        @(posedge clk);
        if (hs.size() == 15) evt_valid <= 0;
      end
    end
    repeat (12) @(posedge clk);
    while (hs.size() > 15) void'(hs.pop_back());
    chk(ndone == 2, "second packet");
    check_packet(exp_packet(HOST, BOARD, 1, hs), "external-trigger packet (round robin)");
    chk(nwr - t0 == 14 + 15 * 8, "bytes written");
    // overflow: room for less than one packet
    ext_mode <= 0;
    cap = 14 + 75 - 1;
    offer(0, rand_hit());
    repeat (3) @(posedge clk);
    chk(dropped == 1 && q.size() == 0, "hit dropped when FIFO lacks room");
    cap = DEPTH + 1;
    // write rate: header + first hit in 14 + 5 cycles
    t0 = 0;
    offer(1, rand_hit());
    @(negedge clk);
    while (wr_en) begin t0++; @(negedge clk); end
    chk(t0 == 19, $sformatf("header and hit written in %0d cycles", t0));
    // run low: hits discarded
    run <= 0;
    q = {};
    offer(0, rand_hit());
    repeat (10) @(posedge clk);
    chk(q.size() == 0 && dropped == 1, "discarded while stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

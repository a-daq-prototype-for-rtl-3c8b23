// tb_daq_top: end-to-end test of the DAQ FPGA logic at its default size.
//
// The host side sends command frames into the receive stream and collects
// packets from the transmit stream; two VMM2 models form the daisy chain and
// send hits. The test configures both chips (3232 bits), takes data in
// self-trigger mode, switches to external trigger (event IDs after each hit)
// with ckbc from the external 40 MHz clock, stalls the transmit side until
// the FIFO overflows, ignores non-command frames, reads the status back
// (once while data packets stream out), stops and resets. Every
// packet is checked byte for byte: header, token, hits in per-chip order,
// event IDs. Each mechanism is counted and must occur at least once.
module tb_daq_top;
  import daq_pkg::*;
  `include "tb_util.svh"
  localparam logic [47:0] BOARD = 48'h000A35000001;
  localparam logic [47:0] HOST  = 48'h6C4B90112233;
  localparam int CHIP = 1616;
  localparam int CFGB = 2 * CHIP / 8;

  logic clk = 0, rst = 1;
  logic [7:0] rx_data = '0, tx_data;
  logic rx_valid = 0, rx_last = 0, tx_valid, tx_last, tx_ready = 1;
  logic ckdt, cktk, di, ckbc, ckbc_ext = 0, ext_trigger = 0;
  logic [1:0] vmm_data0, vmm_data1;
  logic d1, d2;
  daq_status_t status;

  daq_top dut (.*);
  vmm2_model #(.CHIP_BITS(CHIP)) vmm1 (.ckdt, .cktk, .di, .dout(d1), .ckbc,
                                       .data0(vmm_data0[0]), .data1(vmm_data1[0]));
  vmm2_model #(.CHIP_BITS(CHIP)) vmm2 (.ckdt, .cktk, .di(d1), .dout(d2), .ckbc,
                                       .data0(vmm_data0[1]), .data1(vmm_data1[1]));

  always #3.125 clk = ~clk;        // 160 MHz
  always #12.5 ckbc_ext = ~ckbc_ext; // 40 MHz synchronized clock

  int checks = 0, failures = 0;
  int n_cfg = 0, n_self = 0, n_ext = 0, n_extclk = 0, n_drop = 0, n_stall = 0,
      n_ignored = 0, n_reset = 0, n_stop = 0, n_status = 0;
  bit  stat_full = 0;             // check every status field of the next reply
  exp_hit_t expq[2][$];          // hits expected, per chip, in order
  bit  cur_ext = 0;
  logic [7:0] frame[$];
  int  packets = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- host receive side: check every packet
  always @(posedge clk) if (!rst) begin
    if (tx_valid && !tx_ready) n_stall++;
    if (tx_valid && tx_ready) begin
      frame.push_back(tx_data);
      if (tx_last) begin
        check_frame();
        frame = {};
      end
    end
  end

  // status reply: header, token 1006, status word, zero padding
  task automatic check_status();
    logic [111:0] w = '0;
    daq_status_t st;
    bit ok = (frame.size() == 60);
    for (int i = 0; i < 14 && ok; i++) w = {w[103:0], frame[14 + i]};
    st = daq_status_t'(w[$bits(daq_status_t)-1:0]);
    for (int i = 28; i < 60 && ok; i++) ok = (frame[i] == 0);
    chk(ok && w[111:$bits(daq_status_t)] == 0, "status reply layout");
    chk(st.dropped == status.dropped, "status reply: dropped");
    if (stat_full) begin
      chk(st.ext_trig_mode && st.ext_clk_sel && st.run && st.cfg_done && !st.cfg_busy,
          "status reply: mode and flags");
      chk(st.event_id == 6 && st.packets == 4 && st.ignored == 2 && st.commands == 5 && st.lost == 0,
          $sformatf("status reply: counters id=%0d pk=%0d ig=%0d cmd=%0d",
                    st.event_id, st.packets, st.ignored, st.commands));
    end
    n_status++;
  endtask

  task automatic check_frame();
    int ebytes = cur_ext ? 8 : 5;
    int len = 15 * ebytes;
    bit ok = (frame.size() == 14 + len);
    logic [47:0] dst = '0, src = '0;
    if (frame.size() >= 14 && {frame[12], frame[13]} == CMD_STATUS) begin
      for (int i = 0; i < 6; i++) begin
        dst = {dst[39:0], frame[i]};
        src = {src[39:0], frame[6 + i]};
      end
      chk(dst == HOST && src == BOARD, "status reply addresses");
      check_status();
      return;
    end
    packets++;
    if (ok) begin
      for (int i = 0; i < 6; i++) begin
        dst = {dst[39:0], frame[i]};
        src = {src[39:0], frame[6 + i]};
      end
      ok = (dst == HOST) && (src == BOARD) && ({frame[12], frame[13]} == 16'(len));
    end
    chk(ok, $sformatf("packet %0d header/length (%0d bytes)", packets, frame.size()));
    if (!ok) return;
    for (int k = 0; k < 15; k++) begin
      logic [39:0] w = '0;
      logic [23:0] id = '0;
      int v;
      for (int i = 0; i < 5; i++) w = {w[31:0], frame[14 + k*ebytes + i]};
      for (int i = 5; i < ebytes; i++) id = {id[15:0], frame[14 + k*ebytes + i]};
      v = int'(w[36]);
      if (w[39:37] != 0 || expq[v].size() == 0) begin
        chk(0, $sformatf("packet %0d hit %0d unexpected", packets, k));
        continue;
      end
      chk(w[35:0] == expq[v][0].hit && (!cur_ext || id == expq[v][0].id),
          $sformatf("packet %0d hit %0d (chip %0d)", packets, k, v));
      void'(expq[v].pop_front());
    end
    if (cur_ext) n_ext++; else n_self++;
  endtask

  // ---- host transmit side
  task automatic send(bytes_t f);
    foreach (f[i]) begin
      rx_data <= f[i]; rx_valid <= 1; rx_last <= (i == f.size() - 1);
      @(posedge clk);
    end
    rx_valid <= 0; rx_last <= 0;
    repeat (4) @(posedge clk);
  endtask

  task automatic command(cmd_code_t c, bytes_t p);
    send(make_frame(BOARD, HOST, c, p));
  endtask

  // hits on both chips at once, recorded as expected
  task automatic hits(int n, bit record = 1);
    for (int k = 0; k < n; k += 2) begin
      exp_hit_t a, b;
      a.hit = rand_hit(); a.vmm = 0; a.id = status.event_id;
      b.hit = rand_hit(); b.vmm = 1; b.id = status.event_id;
      if (record) begin expq[0].push_back(a); expq[1].push_back(b); end
      fork
        vmm1.send_hit(a.hit);
        if (k + 1 < n) vmm2.send_hit(b.hit);
      join
      if (k + 1 >= n && record) void'(expq[1].pop_back());
      if (status.ext_clk_sel) n_extclk += (k + 1 < n) ? 2 : 1;
    end
    repeat (40) @(posedge clk);
  endtask

  task automatic trigger();
    ext_trigger = 1; #20; ext_trigger = 0; #20;
  endtask

  task automatic wait_empty();
    int t = 0;
    while ((expq[0].size() + expq[1].size() != 0) && t < 200000) begin @(posedge clk); t++; end
    repeat (20) @(posedge clk);
  endtask

  initial begin
    bytes_t cfg, p;
    logic [2*CHIP-1:0] stream;
    int t;
    repeat (5) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);

    // 1. configure both chips
    for (int i = 0; i < CFGB; i++) cfg.push_back(8'($urandom));
    command(CMD_CONFIG, cfg);
    t = 0;
    while (!status.cfg_done && t < 100000) begin @(posedge clk); t++; end
    for (int b = 0; b < 2 * CHIP; b++) stream[2*CHIP-1-b] = cfg[b / 8][7 - b % 8];
    chk(vmm2.cfg == stream[2*CHIP-1 -: CHIP] && vmm1.cfg == stream[CHIP-1:0], "chain configuration");
    chk(t >= 2 * CHIP * 2 * 4, $sformatf("configuration took %0d cycles", t));
    if (vmm1.latches == 1) n_cfg++;

    // 2. self-trigger mode, internal ckbc, random transmit stalls
    p = {};
    command(CMD_START, p);
    fork
      begin
        hits(30);
        wait_empty();
      end
      begin
        repeat (3000) begin @(posedge clk); tx_ready <= ($urandom % 3) != 0; end
        tx_ready <= 1;
      end
    join
    chk(n_self == 2, $sformatf("two self-trigger packets (%0d)", n_self));

    // 3. external trigger with the internal ckbc, then with the external one
    p = {8'h01};
    command(CMD_MODE, p);
    @(posedge clk); cur_ext = 1;
    chk(status.ext_trig_mode && !status.ext_clk_sel, "mode register, external trigger");
    for (int r = 0; r < 3; r++) begin
      trigger();
      repeat (10) @(posedge clk);
      hits(5);
    end
    wait_empty();
    chk(n_ext == 1, $sformatf("external-trigger packet, internal ckbc (%0d)", n_ext));
    p = {8'h03};
    command(CMD_MODE, p);
    chk(status.ext_trig_mode && status.ext_clk_sel, "mode register, external clock");
    for (int i = 0; i < 20; i++) begin
      #3.7;
      chk(ckbc == ckbc_ext, "ckbc follows the external clock");
    end
    for (int r = 0; r < 3; r++) begin
      trigger();
      repeat (10) @(posedge clk);
      hits(5);
    end
    wait_empty();
    chk(n_ext == 2, $sformatf("two external-trigger packets (%0d)", n_ext));
    chk(status.event_id == 6, "event ID counts triggers");

    // 4. non-command frame and foreign address are ignored
    p = {8'h01};
    send(make_frame(BOARD, HOST, 16'd46, p));
    send(make_frame(48'h000A35000009, HOST, CMD_STOP, p));
    chk(status.ignored == 2 && status.run, "ignored frames");
    n_ignored = status.ignored;

    // 4b. status read-back
    stat_full = 1;
    p = {};
    command(CMD_STATUS, p);
    repeat (100) @(posedge clk);
    stat_full = 0;
    chk(n_status == 1, "status reply received");

    // 5. overflow: hold the transmit side, fill the FIFO in self-trigger mode
    p = {8'h00};
    command(CMD_MODE, p);
    @(posedge clk); cur_ext = 0;
    tx_ready <= 0;
    hits(700);
    // 4094 bytes of 46 packets fit in 4097 entries; the rest is dropped
    chk(status.dropped == 10, $sformatf("dropped %0d", status.dropped));
    n_drop = status.dropped;
    for (int v = 0; v < 2; v++) while (expq[v].size() > 345) void'(expq[v].pop_back());
    while (expq[0].size() + expq[1].size() > 690) void'(expq[1].pop_back());
    tx_ready <= 1;
    // a status request while the buffered packets stream out
    repeat (300) @(posedge clk);
    p = {};
    command(CMD_STATUS, p);
    wait_empty();
    chk(n_status == 2, "status reply between data packets");
    chk(n_self == 48, $sformatf("packets after overflow (%0d)", n_self));

    // 6. stop: hits are discarded
    p = {};
    command(CMD_STOP, p);
    hits(16, 0);
    repeat (200) @(posedge clk);
    chk(!status.run && packets == 50 && !tx_valid, "stopped");
    n_stop++;

    // 7. reset command clears the data path
    command(CMD_RESET, p);
    repeat (5) @(posedge clk);
    chk(status.event_id == 0 && status.dropped == 0 && status.packets == 0, "soft reset");
    n_reset++;

    chk(status.packets == 0 && status.commands == 9, $sformatf("commands %0d", status.commands));
    $display("mechanisms: config=%0d self_pkts=%0d ext_pkts=%0d extclk_hits=%0d drops=%0d stalls=%0d ignored=%0d stop=%0d reset=%0d status=%0d",
             n_cfg, n_self, n_ext, n_extclk, n_drop, n_stall, n_ignored, n_stop, n_reset, n_status);
    chk(n_cfg > 0, "mechanism: configuration");
    chk(n_self > 0, "mechanism: self-trigger packets");
    chk(n_ext > 0, "mechanism: external-trigger packets");
    chk(n_extclk > 0, "mechanism: external ckbc");
    chk(n_drop > 0, "mechanism: overflow drop");
    chk(n_stall > 0, "mechanism: transmit stall");
    chk(n_ignored > 0, "mechanism: ignored frames");
    chk(n_stop > 0 && n_reset > 0, "mechanism: stop and reset");
    chk(n_status > 0, "mechanism: status read-back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

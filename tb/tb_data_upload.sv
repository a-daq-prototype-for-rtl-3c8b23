// tb_data_upload: two VMM2 models send hits into the data-upload path; the
// transmit stream must carry complete 15-hit packets only, byte for byte, in
// self-trigger and in external-trigger mode, with the event ID counting the
// external triggers, and a packet must leave at one byte per cycle.
module tb_data_upload;
  import daq_pkg::*;
  `include "tb_util.svh"
  localparam logic [47:0] BOARD = 48'h000A35000001;
  localparam logic [47:0] HOST  = 48'h6C4B90112233;
  logic clk = 0, rst = 1, run = 1, ext_mode = 0, ckbc = 0, ext_trigger = 0;
  logic [47:0] host_mac = HOST;
  logic [1:0] vmm_data0, vmm_data1;
  logic [7:0] tx_data;
  logic tx_valid, tx_last, tx_ready = 1;
  logic [23:0] event_id;
  logic [15:0] dropped, lost, packets;
  logic u1, u2;
  int checks = 0, failures = 0;
  logic [7:0] frame[$];
  bytes_t got[$];
  int first_cyc = -1, last_cyc = 0, cyc = 0;

  data_upload #(.MY_MAC(BOARD), .FIFO_DEPTH(512)) dut (.*);
  vmm2_model #(.CHIP_BITS(8)) vmm1 (.ckdt(1'b0), .cktk(1'b0), .di(1'b0), .dout(u1), .ckbc,
                                    .data0(vmm_data0[0]), .data1(vmm_data1[0]));
  vmm2_model #(.CHIP_BITS(8)) vmm2 (.ckdt(1'b0), .cktk(1'b0), .di(1'b0), .dout(u2), .ckbc,
                                    .data0(vmm_data0[1]), .data1(vmm_data1[1]));

  always #3.125 clk = ~clk;
  always #12.5 ckbc = ~ckbc;

  always @(posedge clk) begin
    cyc++;
    if (!rst && tx_valid && tx_ready) begin
      if (frame.size() == 0) first_cyc = cyc;
      frame.push_back(tx_data);
      if (tx_last) begin got.push_back(frame); frame = {}; last_cyc = cyc; end
    end
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 15 hits, alternating chips one at a time so the order is known
  task automatic packet(bit ext);
    exp_hit_t hs[$];
    exp_hit_t x;
    ext_mode = ext;
    for (int k = 0; k < 15; k++) begin
      if (ext) begin
        ext_trigger = 1; #30; ext_trigger = 0; #30;
      end
      x.hit = rand_hit(); x.vmm = 1'(k % 2); x.id = event_id;
      hs.push_back(x);
      if (k % 2 == 0) vmm1.send_hit(x.hit); else vmm2.send_hit(x.hit);
      if (k < 14) begin
        repeat (20) @(posedge clk);
        chk(got.size() == 0 && !tx_valid, "nothing sent before the packet is complete");
      end
    end
    repeat (300) @(posedge clk);
    chk(got.size() == 1 && got[0] == exp_packet(HOST, BOARD, ext, hs),
        ext ? "external-trigger packet" : "self-trigger packet");
    chk(last_cyc - first_cyc == got[0].size() - 1, "one byte per cycle");
    got = {};
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    packet(0);
    packet(1);
    chk(event_id == 15, "event ID");
    packet(0);
    chk(packets == 3 && dropped == 0 && lost == 0, "counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

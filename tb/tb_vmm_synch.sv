// tb_vmm_synch: a VMM2 model sends random hits on a 40 MHz ckbc while the
// unit runs on a 160 MHz clk; every hit must come out intact, one per frame,
// and a hit not taken before the next one completes must raise lost.
module tb_vmm_synch;
  import daq_pkg::*;
  `include "tb_util.svh"
  logic clk = 0, rst = 1, ckbc = 0;
  logic data0, data1, evt_valid, evt_ready = 1, lost, dout;
  vmm_hit_t evt;
  int checks = 0, failures = 0, nlost = 0;
  vmm_hit_t sent[$];

  vmm_synch dut (.*);
  vmm2_model #(.CHIP_BITS(8)) vmm (.ckdt(1'b0), .cktk(1'b0), .di(1'b0), .dout,
                                   .ckbc, .data0, .data1);

  always #3.125 clk = ~clk;   // 160 MHz
  always #12.5 ckbc = ~ckbc;  // 40 MHz, unrelated phase

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

  always @(posedge clk) begin
    if (!rst && evt_valid && evt_ready) begin
      chk(sent.size() > 0 && evt == sent[0], "hit value");
      if (sent.size() > 0) void'(sent.pop_front());
    end
    if (!rst && lost) nlost++;
  end

  initial begin
    vmm_hit_t h;
    repeat (4) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 200; i++) begin
      h = rand_hit();
      sent.push_back(h);
      vmm.send_hit(h);
      repeat ($urandom_range(0, 3)) @(negedge ckbc);
    end
    repeat (40) @(posedge clk);
    chk(sent.size() == 0, "all hits received");
    chk(nlost == 0, "nothing lost while ready");
    // hold two hits without taking them: the second one overwrites
    evt_ready = 0;
    h = rand_hit(); vmm.send_hit(h);
    h = rand_hit(); vmm.send_hit(h);
    repeat (40) @(posedge clk);
    chk(nlost == 1, $sformatf("lost count %0d", nlost));
    chk(evt_valid && evt == h, "newest hit held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ckbc_sel: the internal ckbc must have period CKBC_DIV clk cycles with
// half of them high; with ext_sel set ckbc must follow the external clock.
module tb_ckbc_sel;
  localparam int DIV = 4;
  logic clk = 0, rst = 1, ext_sel = 0, ckbc_ext = 0, ckbc;
  int checks = 0, failures = 0;

  ckbc_sel #(.CKBC_DIV(DIV)) dut (.*);
  always #5 clk = ~clk;          // 10 ns
  always #12.5 ckbc_ext = ~ckbc_ext;  // 40 MHz

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hi, prev_rise;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge ckbc);
    for (int p = 0; p < 20; p++) begin
      hi = 0;
      for (int c = 0; c < DIV; c++) begin
        @(negedge clk);
        if (ckbc) hi++;
      end
      chk(hi == DIV / 2, $sformatf("duty %0d", hi));
    end
    // external source
    ext_sel = 1;
    for (int i = 0; i < 40; i++) begin
      #3.3;
      chk(ckbc == ckbc_ext, "follows external clock");
    end
    // back to the internal divider: period between rising edges
    ext_sel = 0;
    @(negedge clk);
    prev_rise = -1;
    for (int c = 0, last = 0; c < 12 * DIV; c++) begin
      last = ckbc;
      @(negedge clk);
      if (ckbc && !last) begin
        if (prev_rise >= 0) chk(c - prev_rise == DIV, $sformatf("period %0d", c - prev_rise));
        prev_rise = c;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

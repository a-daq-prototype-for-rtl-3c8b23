// tb_vmm2_config: loads a random configuration into the memory, shifts it
// into two daisy-chained VMM2 models and checks what each chip latched, that
// cktk came once, and that the load took 2*HALF clk cycles per bit plus the
// byte fetches and the latch pulse.
module tb_vmm2_config;
  localparam int CHIP = 44;
  localparam int BITS = 2 * CHIP;
  localparam int NBYTES = (BITS + 7) / 8;
  localparam int HALF = 3;
  logic clk = 0, rst = 1;
  logic cfg_we = 0, start = 0;
  logic [$clog2(NBYTES)-1:0] cfg_waddr = '0;
  logic [7:0] cfg_wdata = '0;
  logic ckdt, cktk, di, busy, done, d1, d2, ck0, dd0, dd1;
  int checks = 0, failures = 0;
  logic [7:0] cfgbytes[NBYTES];
  logic [BITS-1:0] stream;

  vmm2_config #(.CFG_BITS(BITS), .HALF(HALF)) dut (.*);
  vmm2_model #(.CHIP_BITS(CHIP)) vmm1 (.ckdt, .cktk, .di(di), .dout(d1), .ckbc(1'b0), .data0(dd0), .data1(dd1));
  vmm2_model #(.CHIP_BITS(CHIP)) vmm2 (.ckdt, .cktk, .di(d1), .dout(d2), .ckbc(1'b0), .data0(ck0), .data1());

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_once();
    int cyc = 0;
    for (int i = 0; i < NBYTES; i++) cfgbytes[i] = 8'($urandom);
    for (int i = 0; i < NBYTES; i++) begin
      @(posedge clk);
      cfg_we <= 1; cfg_waddr <= ($bits(cfg_waddr))'(i); cfg_wdata <= cfgbytes[i];
    end
    @(posedge clk); cfg_we <= 0;
    // the bit stream, first bit sent at the MSB
    for (int b = 0; b < BITS; b++) stream[BITS-1-b] = cfgbytes[b / 8][7 - b % 8];
    @(posedge clk); start <= 1;
    @(posedge clk); start <= 0;
    @(negedge clk);
    while (!done && cyc < 100000) begin @(negedge clk); cyc++; end
    chk(vmm2.cfg == stream[BITS-1 -: CHIP], "VMM2-2 configuration (far end)");
    chk(vmm1.cfg == stream[CHIP-1:0], "VMM2-1 configuration");
    // 2*HALF per bit, 2 per byte fetch, HALF for cktk, a few for start-up
    chk(cyc >= BITS * 2 * HALF + HALF && cyc <= BITS * 2 * HALF + 2 * NBYTES + HALF + 4,
        $sformatf("load took %0d cycles", cyc));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    chk(!busy && !done && !ckdt && !cktk, "idle after reset");
    run_once();
    chk(vmm1.latches == 1 && vmm2.latches == 1, "one cktk pulse");
    run_once();
    chk(vmm1.latches == 2, "second load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

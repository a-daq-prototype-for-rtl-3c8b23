// tb_sync_fifo: random writes and reads against a queue model; checks the
// data order, the free count, full-FIFO write blocking and the one-word-per-
// cycle read rate.
module tb_sync_fifo;
  localparam int DEPTH = 16;
  logic clk = 0, rst = 1;
  logic wr_en = 0, rd_en = 0;
  logic [8:0] wr_data = '0, dout;
  logic dout_valid;
  logic [$clog2(DEPTH+2)-1:0] free;
  int checks = 0, failures = 0;
  logic [8:0] model[$];

  sync_fifo #(.WIDTH(9), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model update and checks each cycle
  always @(posedge clk) if (!rst) begin
    if (rd_en && dout_valid) begin
      chk(model.size() > 0 && dout == model[0], "pop data");
      if (model.size() > 0) void'(model.pop_front());
    end
    if (wr_en && free != 0) model.push_back(wr_data);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    chk(free == DEPTH + 1, "free after reset");
    // fill beyond capacity
    for (int i = 0; i < DEPTH + 5; i++) begin
      wr_en <= 1; wr_data <= 9'(i);
      @(posedge clk);
    end
    wr_en <= 0;
    @(posedge clk); @(posedge clk);
    chk(free == 0, "full");
    chk(model.size() == DEPTH + 1, "capacity");
    // drain at full rate: one word per cycle
    begin
      int n = 0, cyc = 0;
      rd_en <= 1;
      while (n < DEPTH + 1 && cyc < 100) begin
        @(posedge clk);
        if (dout_valid) n++;
        cyc++;
      end
      rd_en <= 0;
      chk(cyc == DEPTH + 1, $sformatf("drain took %0d cycles", cyc));
    end
    @(posedge clk); @(posedge clk);
    chk(!dout_valid && free == DEPTH + 1, "empty again");
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      wr_en <= ($urandom % 3) != 0; wr_data <= 9'($urandom);
      rd_en <= ($urandom % 2) != 0;
      @(posedge clk);
      chk(int'(free) == DEPTH + 1 - model.size(), "free count");
    end
    wr_en <= 0; rd_en <= 1;
    repeat (DEPTH + 4) @(posedge clk);
    chk(model.size() == 0, "drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

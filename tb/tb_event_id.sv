// tb_event_id: trigger pulses of random length and spacing; the counter must
// advance once per pulse, flag each with one trig_pulse, clear and wrap.
module tb_event_id;
  logic clk = 0, rst = 1, clear = 0, ext_trigger = 0;
  logic [7:0] id;
  logic trig_pulse;
  int checks = 0, failures = 0, pulses = 0;

  event_id #(.ID_BITS(8)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && trig_pulse) pulses++;

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

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 1; i <= 300; i++) begin
      #($urandom_range(20, 60)) ext_trigger = 1;
      #($urandom_range(20, 60)) ext_trigger = 0;
      repeat (4) @(posedge clk);
      chk(id == 8'(i), $sformatf("id %0d after %0d triggers", id, i));
      chk(pulses == i, "one pulse per trigger");
    end
    @(posedge clk); clear <= 1; @(posedge clk); clear <= 0; @(posedge clk);
    chk(id == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

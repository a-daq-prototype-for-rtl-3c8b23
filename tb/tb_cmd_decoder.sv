// tb_cmd_decoder: sends command and non-command frames and checks the
// configuration memory writes, the mode and run registers, the reset pulse,
// the host MAC and the command/ignored counters.
module tb_cmd_decoder;
  import daq_pkg::*;
  `include "tb_util.svh"
  localparam logic [47:0] BOARD = 48'h000A35000001;
  localparam logic [47:0] HOST  = 48'h6C4B90112233;
  localparam int CFGB = 40;
  logic clk = 0, rst = 1;
  logic [7:0] rx_data = '0;
  logic rx_valid = 0, rx_last = 0;
  logic cfg_we, cfg_start, ext_trig_mode, ext_clk_sel, run, soft_rst, status_req;
  int sreqs = 0;
  logic [$clog2(CFGB)-1:0] cfg_waddr;
  logic [7:0] cfg_wdata;
  logic [47:0] host_mac;
  logic [15:0] commands, ignored;
  int checks = 0, failures = 0, starts = 0, resets = 0;
  logic [7:0] mem[CFGB];

  cmd_decoder #(.MY_MAC(BOARD), .CFG_BYTES(CFGB)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (cfg_we) mem[cfg_waddr] <= cfg_wdata;
    if (cfg_start) starts++;
    if (soft_rst) resets++;
    if (status_req) sreqs++;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(bytes_t f);
    foreach (f[i]) begin
      rx_data <= f[i]; rx_valid <= 1; rx_last <= (i == f.size() - 1);
      @(posedge clk);
      // occasional gaps inside the frame
      if ($urandom % 4 == 0) begin rx_valid <= 0; rx_last <= 0; @(posedge clk); end
    end
    rx_valid <= 0; rx_last <= 0;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t p, cfg;
    for (int i = 0; i < CFGB; i++) mem[i] = 8'h00;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    chk(!run && !ext_trig_mode && !ext_clk_sel && commands == 0, "reset state");
    // configuration
    for (int i = 0; i < CFGB; i++) cfg.push_back(8'($urandom));
    send(make_frame(BOARD, HOST, CMD_CONFIG, cfg));
    for (int i = 0; i < CFGB; i++) chk(mem[i] == cfg[i], $sformatf("cfg byte %0d", i));
    chk(starts == 1, "cfg_start pulse");
    chk(host_mac == HOST, "host MAC taken from source");
    // mode: external trigger and external clock
    p = {8'h03};
    send(make_frame(BOARD, HOST, CMD_MODE, p));
    chk(ext_trig_mode && ext_clk_sel, "mode 3");
    p = {8'h01};
    send(make_frame(48'hFFFF_FFFF_FFFF, HOST, CMD_MODE, p));
    chk(ext_trig_mode && !ext_clk_sel, "mode 1 by broadcast");
    p = {};
    send(make_frame(BOARD, HOST, CMD_START, p));
    chk(run, "start");
    // token 1000 or below: a length, not a command
    send(make_frame(BOARD, HOST, 16'd1000, p));
    chk(run && ignored == 1, "length frame ignored");
    // another board's address
    send(make_frame(48'h000A35000002, HOST, CMD_STOP, p));
    chk(run && ignored == 2, "foreign frame ignored");
    send(make_frame(BOARD, 48'h111111111111, CMD_STOP, p));
    chk(!run && host_mac == 48'h111111111111, "stop");
    send(make_frame(BOARD, HOST, CMD_START, p));
    send(make_frame(BOARD, HOST, CMD_RESET, p));
    chk(resets == 1 && !run, "reset command");
    send(make_frame(BOARD, HOST, CMD_STATUS, p));
    chk(sreqs == 1, "status request");
    chk(commands == 8, $sformatf("command count %0d", commands));
    chk(starts == 1, "no extra cfg_start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// daq_top: FPGA logic of the sTGC DAQ prototype with two daisy-chained VMM2
// front-end chips and a Gigabit Ethernet link to a host computer.
//
// The host sends command frames (token above 1000) through the Ethernet
// core; cmd_decoder turns them into the VMM2 configuration sequence, the
// trigger and clock mode, run/stop, a data-path reset and status requests. vmm2_config shifts
// the configuration into the chips over ckdt, cktk and di. ckbc_sel drives
// the chips' bunch-crossing clock ckbc from an internal divider or from the
// 40 MHz synchronized clock of the mini-SAS connector. data_upload reads the
// hits on the chips' data lines, counts external triggers and sends packets
// of 15 hits back to the host (with a 3-byte event ID after each hit in
// external-trigger mode) on the transmit byte stream; status_tx slips a
// status reply frame in between data packets when the host asks for one.
// Interface: the Ethernet core's user side as two byte streams (rx_*, tx_*);
// everything runs on clk, the other inputs are asynchronous and synchronised
// inside. The block set follows the document's diagram; interfaces, formats
// and timing not given there are this design's choice (see each module).
module daq_top
  import daq_pkg::*;
#(
  parameter logic [47:0] MY_MAC     = 48'h000A35000001,
  parameter int          CFG_BITS   = 3232,
  parameter int          CFG_HALF   = 4,
  parameter int          FIFO_DEPTH = 4096,
  parameter int          CKBC_DIV   = 4
) (
  input  logic        clk,
  input  logic        rst,
  // Ethernet core, receive side
  input  logic [7:0]  rx_data,
  input  logic        rx_valid,
  input  logic        rx_last,
  // Ethernet core, transmit side
  output logic [7:0]  tx_data,
  output logic        tx_valid,
  output logic        tx_last,
  input  logic        tx_ready,
  // VMM2 daisy chain
  output logic        ckdt,
  output logic        cktk,
  output logic        di,
  output logic        ckbc,
  input  logic [1:0]  vmm_data0,
  input  logic [1:0]  vmm_data1,
  // mini-SAS
  input  logic        ckbc_ext,
  input  logic        ext_trigger,
  output daq_status_t status
);

  localparam int CFG_BYTES = (CFG_BITS + 7) / 8;

  logic                         cfg_we, cfg_start;
  logic [$clog2(CFG_BYTES)-1:0] cfg_waddr;
  logic [7:0]                   cfg_wdata;
  logic                         ext_trig_mode, ext_clk_sel, run, soft_rst, status_req;
  logic [7:0]                   d_data;
  logic                         d_valid, d_last, d_ready;
  logic [47:0]                  host_mac;
  logic [15:0]                  commands, ignored, dropped, lost, packets;
  logic [EVID_BITS-1:0]         event_id;
  logic                         cfg_busy, cfg_done;
  logic                         dp_rst;

  cmd_decoder #(.MY_MAC(MY_MAC), .CFG_BYTES(CFG_BYTES)) u_dec (
    .clk, .rst, .rx_data, .rx_valid, .rx_last,
    .cfg_we, .cfg_waddr, .cfg_wdata, .cfg_start,
    .ext_trig_mode, .ext_clk_sel, .run, .soft_rst, .status_req, .host_mac,
    .commands, .ignored
  );

  vmm2_config #(.CFG_BITS(CFG_BITS), .CFG_BYTES(CFG_BYTES), .HALF(CFG_HALF)) u_cfg (
    .clk, .rst, .cfg_we, .cfg_waddr, .cfg_wdata, .start(cfg_start),
    .ckdt, .cktk, .di, .busy(cfg_busy), .done(cfg_done)
  );

  ckbc_sel #(.CKBC_DIV(CKBC_DIV)) u_ckbc (
    .clk, .rst, .ext_sel(ext_clk_sel), .ckbc_ext, .ckbc
  );

  always_ff @(posedge clk) dp_rst <= rst | soft_rst;

  data_upload #(.MY_MAC(MY_MAC), .FIFO_DEPTH(FIFO_DEPTH)) u_up (
    .clk, .rst(dp_rst), .run, .ext_mode(ext_trig_mode), .host_mac,
    .ckbc, .vmm_data0, .vmm_data1, .ext_trigger,
    .tx_data(d_data), .tx_valid(d_valid), .tx_last(d_last), .tx_ready(d_ready),
    .event_id, .dropped, .lost, .packets
  );

  status_tx #(.MY_MAC(MY_MAC)) u_stat (
    .clk, .rst, .req(status_req), .status, .host_mac,
    .d_data, .d_valid, .d_last, .d_ready,
    .tx_data, .tx_valid, .tx_last, .tx_ready, .replies()
  );

  always_comb begin
    status.ext_trig_mode = ext_trig_mode;
    status.ext_clk_sel   = ext_clk_sel;
    status.run           = run;
    status.cfg_busy      = cfg_busy;
    status.cfg_done      = cfg_done;
    status.event_id      = event_id;
    status.dropped       = dropped;
    status.lost          = lost;
    status.packets       = packets;
    status.commands      = commands;
    status.ignored       = ignored;
  end

endmodule

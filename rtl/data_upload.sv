// data_upload: the readout path from the two VMM2s to the Ethernet core.
//
// Two vmm_synch units bring in the hits of VMM2-1 and VMM2-2, event_id counts
// external triggers, fifo_ctrl builds 15-hit packets in a byte FIFO
// (sync_fifo, one end-of-packet flag per byte), and this module streams the
// FIFO out on tx_data/tx_valid/tx_last with tx_ready from the Ethernet core.
// A packet is offered only once all of its bytes are in the FIFO, so a frame
// is sent without gaps as long as tx_ready stays high. Counters of lost hits
// and sent packets are kept for the status register. The grouping of blocks
// follows the document's block diagram; the streaming rule is this design's.
module data_upload
  import daq_pkg::*;
#(
  parameter logic [47:0] MY_MAC     = 48'h000A35000001,
  parameter int          FIFO_DEPTH = 4096
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        run,
  input  logic        ext_mode,
  input  logic [47:0] host_mac,
  input  logic        ckbc,
  input  logic [1:0]  vmm_data0,
  input  logic [1:0]  vmm_data1,
  input  logic        ext_trigger,
  output logic [7:0]  tx_data,
  output logic        tx_valid,
  output logic        tx_last,
  input  logic        tx_ready,
  output logic [EVID_BITS-1:0] event_id,
  output logic [15:0] dropped,
  output logic [15:0] lost,
  output logic [15:0] packets
);

  localparam int FW = $clog2(FIFO_DEPTH + 2);

  vmm_hit_t   evt [2];
  logic [1:0] evt_valid, evt_ready, lost_p;
  logic [FW-1:0] free;
  logic       wr_en, pkt_done;
  logic [8:0] wr_data, dout;
  logic       dout_valid, pop;
  logic [7:0] pkts_ready;   // complete packets waiting in the FIFO

  for (genvar i = 0; i < 2; i++) begin : g_synch
    vmm_synch u_synch (
      .clk, .rst, .ckbc,
      .data0(vmm_data0[i]), .data1(vmm_data1[i]),
      .evt(evt[i]), .evt_valid(evt_valid[i]), .evt_ready(evt_ready[i]),
      .lost(lost_p[i])
    );
  end

  event_id #(.ID_BITS(EVID_BITS)) u_evid (
    .clk, .rst, .clear(1'b0), .ext_trigger, .id(event_id), .trig_pulse()
  );

  fifo_ctrl #(.MY_MAC(MY_MAC), .FIFO_DEPTH(FIFO_DEPTH)) u_ctrl (
    .clk, .rst, .run, .ext_mode, .event_id, .host_mac,
    .evt, .evt_valid, .evt_ready, .free,
    .wr_en, .wr_data, .pkt_done, .dropped
  );

  sync_fifo #(.WIDTH(9), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst, .wr_en, .wr_data, .rd_en(pop), .dout, .dout_valid, .free
  );

  assign tx_valid = (pkts_ready != '0) && dout_valid;
  assign tx_data  = dout[7:0];
  assign tx_last  = dout[8];
  assign pop      = tx_valid && tx_ready;

  wire sent = pop && dout[8];

  always_ff @(posedge clk) begin
    if (rst) begin
      pkts_ready <= '0;
      lost       <= '0;
      packets    <= '0;
    end else begin
      pkts_ready <= pkts_ready + 8'(pkt_done) - 8'(sent);
      if (sent) packets <= packets + 16'd1;
      lost <= lost + 16'(lost_p[0]) + 16'(lost_p[1]);
    end
  end

endmodule

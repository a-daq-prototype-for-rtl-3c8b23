// fifo_ctrl: FIFO control of the data-upload path. Builds the Ethernet
// packets, 15 hits each, directly in the byte FIFO.
//
// Hits come from the two Synch units (index 0 = VMM2-1, 1 = VMM2-2) and are
// taken in round-robin order, one per evt_ready pulse. When no packet is
// open, the next hit opens one: the trigger mode is latched for the whole
// packet, and only if the FIFO has room for the complete packet is the
// 14-byte header written (host MAC, board MAC, 2-byte token = payload
// length); otherwise the hit is dropped and counted. Each hit is then written
// as 5 bytes, {3'b000, VMM index, hit[35:32]} and hit[31:0] MSB first; in
// external-trigger mode the 3-byte event ID at the time the hit is taken
// follows, MSB first. The last byte of the 15th hit carries the end flag
// (bit 8 of wr_data) and pkt_done pulses with it. One byte is written per
// cycle. While run is low, hits are accepted and discarded.
// From the document: 15 events per packet, a 3-byte event ID after each
// event in external-trigger mode, a token that gives the packet length, and
// the MAC addresses in the header. The byte layout, the arbitration and the
// whole-packet space reservation are this design's choice.
module fifo_ctrl
  import daq_pkg::*;
#(
  parameter logic [47:0] MY_MAC     = 48'h000A35000001,
  parameter int          FIFO_DEPTH = 4096
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        run,
  input  logic        ext_mode,
  input  logic [EVID_BITS-1:0] event_id,
  input  logic [47:0] host_mac,
  input  vmm_hit_t    evt       [2],
  input  logic [1:0]  evt_valid,
  output logic [1:0]  evt_ready,
  input  logic [$clog2(FIFO_DEPTH+2)-1:0] free,
  output logic        wr_en,
  output logic [8:0]  wr_data,
  output logic        pkt_done,
  output logic [15:0] dropped
);

  localparam int FW = $clog2(FIFO_DEPTH + 2);
  localparam int PKT_SELF = HDR_BYTES + PAYLOAD_SELF;
  localparam int PKT_EXT  = HDR_BYTES + PAYLOAD_EXT;

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_EVT} state_t;

  state_t        state;
  logic          pkt_ext;          // format of the open packet
  logic          rr;               // source with priority next
  logic [3:0]    nevt;             // hits already in the open packet
  logic [3:0]    bcnt;             // byte index within header or hit
  logic          hit_vmm;
  vmm_hit_t      hit;
  logic [EVID_BITS-1:0] hit_id;
  logic [39:0]   hit_bytes;

  // source chosen this cycle
  logic          sel;
  logic          any;
  always_comb begin
    any = |evt_valid;
    if (evt_valid[0] && evt_valid[1]) sel = rr;
    else                              sel = evt_valid[1];
  end

  wire [FW-1:0] need = ext_mode ? FW'(PKT_EXT) : FW'(PKT_SELF);
  wire [15:0]   token = pkt_ext ? 16'(PAYLOAD_EXT) : 16'(PAYLOAD_SELF);
  wire [3:0]    evt_len = pkt_ext ? 4'(EVT_BYTES + EVID_BYTES) : 4'(EVT_BYTES);

  assign hit_bytes = {3'b000, hit_vmm, hit};

  // byte to write in S_HDR / S_EVT
  logic [7:0] hdr_byte, evt_byte;
  always_comb begin
    if (bcnt < 4'd6)       hdr_byte = host_mac[8*(5 - bcnt) +: 8];
    else if (bcnt < 4'd12) hdr_byte = MY_MAC[8*(11 - bcnt) +: 8];
    else                   hdr_byte = token[8*(13 - bcnt) +: 8];
    if (bcnt < 4'(EVT_BYTES)) evt_byte = hit_bytes[8*(4 - bcnt) +: 8];
    else                      evt_byte = hit_id[8*(7 - bcnt) +: 8];
  end

  wire evt_last_byte = (state == S_EVT) && (bcnt == evt_len - 4'd1);
  wire pkt_last_byte = evt_last_byte && (nevt == 4'(EVENTS_PER_PKT - 1));

  always_comb begin
    wr_en   = (state == S_HDR) || (state == S_EVT);
    wr_data = (state == S_HDR) ? {1'b0, hdr_byte} : {pkt_last_byte, evt_byte};
  end

  // take a hit only in S_IDLE
  always_comb begin
    evt_ready = '0;
    if (state == S_IDLE && any) evt_ready[sel] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      pkt_ext  <= 1'b0;
      rr       <= 1'b0;
      nevt     <= '0;
      bcnt     <= '0;
      hit_vmm  <= 1'b0;
      hit      <= '0;
      hit_id   <= '0;
      pkt_done <= 1'b0;
      dropped  <= '0;
    end else begin
      pkt_done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (any) begin
            rr      <= ~sel;
            hit     <= evt[sel];
            hit_vmm <= sel;
            hit_id  <= event_id;
            bcnt    <= '0;
            if (!run) begin
              // discarded
            end else if (nevt != '0) begin
              state <= S_EVT;
            end else if (free >= need) begin
              pkt_ext <= ext_mode;
              state   <= S_HDR;
            end else begin
              dropped <= dropped + 16'd1;
            end
          end
        end
        S_HDR: begin
          bcnt <= bcnt + 4'd1;
          if (bcnt == 4'(HDR_BYTES - 1)) begin
            bcnt  <= '0;
            state <= S_EVT;
          end
        end
        S_EVT: begin
          bcnt <= bcnt + 4'd1;
          if (evt_last_byte) begin
            bcnt  <= '0;
            state <= S_IDLE;
            if (pkt_last_byte) begin
              nevt     <= '0;
              pkt_done <= 1'b1;
            end else begin
              nevt <= nevt + 4'd1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the reserved space makes every write land
  assert property (@(posedge clk) disable iff (rst) wr_en |-> free != '0);

endmodule

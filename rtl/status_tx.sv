// status_tx: transmit arbiter with the status reply of the DAQ.
//
// The transmit byte stream to the Ethernet core carries two kinds of frames:
// data packets from data_upload (token = payload length, below 1000) and
// status replies (token = CMD_STATUS, above 1000, as for a command). A
// status request (one-cycle req, from the decoder) is remembered until it is
// served; requests that arrive while one is waiting are answered by one
// reply. Between frames, a pending request goes first; otherwise a data
// packet that is ready is passed through unchanged until its last byte. Once
// a frame has started it is never interrupted.
// A status reply is: host MAC, board MAC, token CMD_STATUS, then the status
// word daq_status_t (109 bits, zero-extended to 14 bytes, MSB first) taken
// when the reply starts, padded with zeros to the 46-byte minimum payload:
// 60 bytes in all, one per cycle while tx_ready is high.
// That the host reads a status register over Ethernet follows the document;
// the reply format and the arbitration are this design's choice.
module status_tx
  import daq_pkg::*;
#(
  parameter logic [47:0] MY_MAC = 48'h000A35000001
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        req,
  input  daq_status_t status,
  input  logic [47:0] host_mac,
  // data packets
  input  logic [7:0]  d_data,
  input  logic        d_valid,
  input  logic        d_last,
  output logic        d_ready,
  // to the Ethernet core
  output logic [7:0]  tx_data,
  output logic        tx_valid,
  output logic        tx_last,
  input  logic        tx_ready,
  output logic [15:0] replies
);

  localparam int SBYTES = ($bits(daq_status_t) + 7) / 8;
  localparam int RLEN   = 60;

  typedef enum logic [1:0] {S_IDLE, S_DATA, S_STAT} state_t;

  state_t        state;
  logic          pending;
  logic [5:0]    idx;
  logic [8*SBYTES-1:0] snap;
  logic [7:0]    rbyte;
  wire [15:0]    tok = CMD_STATUS;

  always_comb begin
    if (idx < 6'd6)        rbyte = host_mac[8*(5 - idx) +: 8];
    else if (idx < 6'd12)  rbyte = MY_MAC[8*(11 - idx) +: 8];
    else if (idx < 6'd14)  rbyte = tok[8*(13 - idx) +: 8];
    else if (idx < 6'(14 + SBYTES)) rbyte = snap[8*(13 + SBYTES - int'(idx)) +: 8];
    else                   rbyte = 8'h00;
  end

  always_comb begin
    unique case (state)
      S_DATA: begin
        tx_data  = d_data;
        tx_valid = d_valid;
        tx_last  = d_last;
        d_ready  = tx_ready;
      end
      S_STAT: begin
        tx_data  = rbyte;
        tx_valid = 1'b1;
        tx_last  = (idx == 6'(RLEN - 1));
        d_ready  = 1'b0;
      end
      default: begin
        tx_data  = '0;
        tx_valid = 1'b0;
        tx_last  = 1'b0;
        d_ready  = 1'b0;
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      pending <= 1'b0;
      idx     <= '0;
      snap    <= '0;
      replies <= '0;
    end else begin
      if (req) pending <= 1'b1;
      unique case (state)
        S_IDLE: begin
          if (pending) begin
            state   <= S_STAT;
            pending <= req;
            idx     <= '0;
            snap    <= (8*SBYTES)'(status);
          end else if (d_valid) begin
            state <= S_DATA;
          end
        end
        S_DATA: if (d_valid && tx_ready && d_last) state <= S_IDLE;
        S_STAT: if (tx_ready) begin
          idx <= idx + 6'd1;
          if (tx_last) begin
            state   <= S_IDLE;
            replies <= replies + 16'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a data frame is passed whole: valid stays up until its last byte
  assert property (@(posedge clk) disable iff (rst)
                   (state == S_DATA && d_valid && !d_last) |=> d_valid);

endmodule

// cmd_decoder: command decoder and command/status registers of the DAQ.
//
// Frames arrive from the Ethernet core as a byte stream (rx_valid/rx_last,
// no preamble or FCS): destination MAC (6 bytes), source MAC (6), a 2-byte
// token, then the payload. A frame is a command when its token is above
// TOKEN_CMD_MIN (1000); other frames, or frames not addressed to MY_MAC or
// to broadcast, are only counted as ignored. This rule follows the document;
// the command codes (daq_pkg::cmd_code_t), the frame layout and the payload
// formats are this design's choice:
//   CMD_CONFIG  payload = VMM2 configuration bytes, written to the
//               configuration memory as they arrive; cfg_start pulses at
//               the end of the frame.
//   CMD_MODE    payload byte 0: bit 0 external-trigger mode, bit 1 ckbc
//               from the external 40 MHz clock.
//   CMD_START / CMD_STOP  set / clear run.
//   CMD_RESET   one-cycle soft_rst of the data path; clears run.
//   CMD_STATUS  one-cycle status_req: the board answers with a status frame.
// The source MAC of each command is kept as host_mac and becomes the
// destination of the data packets. All register updates happen in the cycle
// after the byte flagged rx_last.
module cmd_decoder
  import daq_pkg::*;
#(
  parameter logic [47:0] MY_MAC    = 48'h000A35000001,
  parameter int          CFG_BYTES = 404
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  rx_data,
  input  logic        rx_valid,
  input  logic        rx_last,
  // configuration memory write port
  output logic                         cfg_we,
  output logic [$clog2(CFG_BYTES)-1:0] cfg_waddr,
  output logic [7:0]                   cfg_wdata,
  output logic                         cfg_start,
  // command registers
  output logic        ext_trig_mode,
  output logic        ext_clk_sel,
  output logic        run,
  output logic        soft_rst,
  output logic        status_req,
  output logic [47:0] host_mac,
  output logic [15:0] commands,
  output logic [15:0] ignored
);

  localparam int AW = $clog2(CFG_BYTES);

  logic [10:0] pos;        // byte position in the frame (saturates)
  logic [47:0] dst, src;
  logic [15:0] token;
  logic [1:0]  mode_byte;
  logic        have_mode;

  wire addr_ok = (dst == MY_MAC) || (dst == 48'hFFFF_FFFF_FFFF);
  wire is_cmd  = addr_ok && (token > 16'(TOKEN_CMD_MIN));
  // payload byte index for the current byte
  wire [10:0] pidx = pos - 11'(HDR_BYTES);

  always_comb begin
    cfg_we    = rx_valid && (pos >= 11'(HDR_BYTES)) && is_cmd &&
                (token == CMD_CONFIG) && (pidx < 11'(CFG_BYTES));
    cfg_waddr = AW'(pidx);
    cfg_wdata = rx_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pos           <= '0;
      dst           <= '0;
      src           <= '0;
      token         <= '0;
      mode_byte     <= '0;
      have_mode     <= 1'b0;
      cfg_start     <= 1'b0;
      ext_trig_mode <= 1'b0;
      ext_clk_sel   <= 1'b0;
      run           <= 1'b0;
      soft_rst      <= 1'b0;
      status_req    <= 1'b0;
      host_mac      <= '0;
      commands      <= '0;
      ignored       <= '0;
    end else begin
      cfg_start <= 1'b0;
      soft_rst  <= 1'b0;
      status_req <= 1'b0;
      if (rx_valid) begin
        // header capture, MSB first
        if (pos < 11'd6)        dst   <= {dst[39:0], rx_data};
        else if (pos < 11'd12)  src   <= {src[39:0], rx_data};
        else if (pos < 11'd14)  token <= {token[7:0], rx_data};
        else if (pos == 11'd14) begin
          mode_byte <= rx_data[1:0];
          have_mode <= 1'b1;
        end
        if (pos != 11'h7FF) pos <= pos + 11'd1;

        if (rx_last) begin
          pos       <= '0;
          have_mode <= 1'b0;
          if (is_cmd && pos >= 11'(HDR_BYTES)) begin
            commands <= commands + 16'd1;
            host_mac <= src;
            case (token)
              CMD_RESET: begin
                soft_rst <= 1'b1;
                run      <= 1'b0;
              end
              CMD_CONFIG: cfg_start <= 1'b1;
              CMD_MODE: begin
                // the mode byte may be the last byte itself
                ext_trig_mode <= (pos == 11'd14) ? rx_data[0] : (have_mode ? mode_byte[0] : ext_trig_mode);
                ext_clk_sel   <= (pos == 11'd14) ? rx_data[1] : (have_mode ? mode_byte[1] : ext_clk_sel);
              end
              CMD_START: run <= 1'b1;
              CMD_STOP:  run <= 1'b0;
              CMD_STATUS: status_req <= 1'b1;
              default: ;
            endcase
          end else begin
            ignored <= ignored + 16'd1;
          end
        end
      end
    end
  end

endmodule

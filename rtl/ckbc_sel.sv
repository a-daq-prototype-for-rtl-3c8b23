// ckbc_sel: source of the VMM2 bunch-crossing clock ckbc.
//
// ckbc is taken either from an internal divider (clk / CKBC_DIV, 50 % duty
// for even CKBC_DIV) or from the 40 MHz synchronized clock that arrives on
// the mini-SAS connector, as chosen by ext_sel from the mode register. The
// selection is a plain multiplexer, so switching sources may give one short
// ckbc pulse; an FPGA build would use a glitch-free clock buffer multiplexer
// in its place. That ckbc can come from the external 40 MHz clock follows the
// document; the internal divider and its ratio are this design's choice.
module ckbc_sel #(
  parameter int CKBC_DIV = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic ext_sel,
  input  logic ckbc_ext,
  output logic ckbc
);

  localparam int CW = (CKBC_DIV > 2) ? $clog2(CKBC_DIV) : 1;

  logic [CW-1:0] cnt;
  logic          ckbc_int;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt      <= '0;
      ckbc_int <= 1'b0;
    end else begin
      if (cnt == CW'(CKBC_DIV - 1)) cnt <= '0;
      else                          cnt <= cnt + 1'b1;
      // high for the second half of each period
      ckbc_int <= (cnt >= CW'(CKBC_DIV / 2 - 1)) && (cnt != CW'(CKBC_DIV - 1));
    end
  end

  assign ckbc = ext_sel ? ckbc_ext : ckbc_int;

endmodule

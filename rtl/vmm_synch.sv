// vmm_synch: synchroniser and deserialiser for the two data lines of one
// VMM2.
//
// The VMM2 changes data0/data1 on the falling edge of ckbc. This unit runs on
// clk, which must be at least about three times faster: ckbc and both lines
// pass the same two flip-flop stages, and the lines are sampled in the cycle
// the synchronised ckbc shows a rising edge. A frame starts with one ckbc
// cycle in which both lines are high; the next EVT_BITS/2 cycles each bring
// two bits, data1 the higher one, most significant pair first. The finished
// hit is held on evt with evt_valid until evt_ready; a hit that completes
// while the previous one is still held replaces it and pulses lost.
// That each VMM2 has two data lines that reach the FPGA through a
// synchroniser follows the document; the frame format is this design's
// choice, since the document does not describe it.
module vmm_synch
  import daq_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     ckbc,
  input  logic     data0,
  input  logic     data1,
  output vmm_hit_t evt,
  output logic     evt_valid,
  input  logic     evt_ready,
  output logic     lost
);

  localparam int PAIRS = EVT_BITS / 2;

  logic [1:0] ck_s, d0_s, d1_s;
  logic       ck_prev;
  logic       receiving;
  logic [$clog2(PAIRS+1)-1:0] npairs;
  logic [EVT_BITS-3:0] shreg;   // pairs received so far

  wire ck_rise = ck_s[1] & ~ck_prev;

  always_ff @(posedge clk) begin
    if (rst) begin
      ck_s      <= '0;
      d0_s      <= '0;
      d1_s      <= '0;
      ck_prev   <= 1'b0;
      receiving <= 1'b0;
      npairs    <= '0;
      shreg     <= '0;
      evt       <= '0;
      evt_valid <= 1'b0;
      lost      <= 1'b0;
    end else begin
      ck_s    <= {ck_s[0], ckbc};
      d0_s    <= {d0_s[0], data0};
      d1_s    <= {d1_s[0], data1};
      ck_prev <= ck_s[1];
      lost    <= 1'b0;
      if (evt_valid && evt_ready) evt_valid <= 1'b0;
      if (ck_rise) begin
        if (!receiving) begin
          if (d0_s[1] && d1_s[1]) begin
            receiving <= 1'b1;
            npairs    <= '0;
          end
        end else begin
          shreg  <= {shreg[EVT_BITS-5:0], d1_s[1], d0_s[1]};
          npairs <= npairs + 1'b1;
          if (npairs == ($bits(npairs))'(PAIRS - 1)) begin
            receiving <= 1'b0;
            evt       <= vmm_hit_t'({shreg[EVT_BITS-3:0], d1_s[1], d0_s[1]});
            evt_valid <= 1'b1;
            lost      <= evt_valid && !evt_ready;
          end
        end
      end
    end
  end

endmodule

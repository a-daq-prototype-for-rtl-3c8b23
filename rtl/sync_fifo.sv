// sync_fifo: single-clock FIFO with first-word-fall-through output.
//
// DEPTH words are held in a memory with one synchronous write and one
// synchronous read port (a block RAM), plus an output register. The head
// word appears on dout with dout_valid; rd_en pops it, and the next word
// follows in the next cycle, so a word can be popped every cycle. A write
// shows on dout two cycles after it when the FIFO was empty. free counts the
// words that can still be written (the output register included, so up to
// DEPTH + 1 words fit); a write when free is zero is ignored. The document
// only names the FIFO; width, depth and read timing are this design's.
module sync_fifo #(
  parameter int WIDTH = 9,
  parameter int DEPTH = 4096
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   wr_en,
  input  logic [WIDTH-1:0]       wr_data,
  input  logic                   rd_en,
  output logic [WIDTH-1:0]       dout,
  output logic                   dout_valid,
  output logic [$clog2(DEPTH+2)-1:0] free
);

  localparam int AW = $clog2(DEPTH);
  localparam int CW = $clog2(DEPTH + 2);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic [AW:0]      mcount;        // words in the memory
  logic             do_wr, do_fetch, do_pop;

  assign do_pop   = rd_en && dout_valid;
  assign do_wr    = wr_en && (free != '0);
  assign do_fetch = (mcount != '0) && (!dout_valid || do_pop);

  always_ff @(posedge clk) begin
    if (do_wr)    mem[wptr] <= wr_data;
    if (do_fetch) dout      <= mem[rptr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr       <= '0;
      rptr       <= '0;
      mcount     <= '0;
      dout_valid <= 1'b0;
      free       <= CW'(DEPTH + 1);
    end else begin
      if (do_wr)    wptr <= wptr + 1'b1;
      if (do_fetch) rptr <= rptr + 1'b1;
      mcount <= mcount + (AW+1)'(do_wr) - (AW+1)'(do_fetch);
      if (do_fetch)    dout_valid <= 1'b1;
      else if (do_pop) dout_valid <= 1'b0;
      free <= free - CW'(do_wr) + CW'(do_pop);
    end
  end

  // a write never lands on a full memory
  assert property (@(posedge clk) disable iff (rst) do_wr |-> (mcount < (AW+1)'(DEPTH) || do_fetch));

endmodule

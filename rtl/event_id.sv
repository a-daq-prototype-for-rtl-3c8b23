// event_id: event identification counter driven by the external trigger.
//
// The asynchronous trigger from the mini-SAS connector passes two flip-flops
// into the clk domain; each rising edge then increments an ID_BITS-wide
// counter (3 bytes by default, wrapping), and trig_pulse is high for that one
// cycle. clear zeroes the count. The 3-byte counter driven by the external
// trigger follows the document; synchronisation and wrap-around are this
// design's choice. The trigger must stay high and low for at least two clk
// cycles each to be counted.
module event_id #(
  parameter int ID_BITS = 24
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               clear,
  input  logic               ext_trigger,
  output logic [ID_BITS-1:0] id,
  output logic               trig_pulse
);

  logic [2:0] sync;   // two synchroniser stages plus the previous value

  always_ff @(posedge clk) begin
    if (rst) begin
      sync <= '0;
      id   <= '0;
    end else begin
      sync <= {sync[1:0], ext_trigger};
      if (clear)           id <= '0;
      else if (trig_pulse) id <= id + 1'b1;
    end
  end

  assign trig_pulse = sync[1] & ~sync[2];

endmodule

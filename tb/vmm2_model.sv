// vmm2_model: behavioural model of one VMM2 front-end chip as the FPGA sees
// it, for simulation only.
//
// Configuration: on each rising edge of ckdt the chip shifts di into a
// CHIP_BITS shift register whose last bit drives dout, the input of the next
// chip of the daisy chain; a rising edge of cktk copies the shift register to
// cfg. Readout: the task send_hit drives a frame on data0/data1, changing the
// lines on falling edges of ckbc: one cycle with both lines high, then the
// 36 hit bits two per cycle (data1 the higher bit), MSB pair first, then idle
// low. This matches the format the FPGA's Synch unit expects.
module vmm2_model
  import daq_pkg::*;
#(
  parameter int CHIP_BITS = 1616
) (
  input  logic ckdt,
  input  logic cktk,
  input  logic di,
  output logic dout,
  input  logic ckbc,
  output logic data0,
  output logic data1
);

  logic [CHIP_BITS-1:0] shreg = '0;
  logic [CHIP_BITS-1:0] cfg   = '0;
  int                   latches = 0;

  initial begin
    data0 = 1'b0;
    data1 = 1'b0;
  end

  always @(posedge ckdt) shreg <= {shreg[CHIP_BITS-2:0], di};
  always @(posedge cktk) begin
    cfg     <= shreg;
    latches <= latches + 1;
  end
  assign dout = shreg[CHIP_BITS-1];

  task automatic send_hit(input vmm_hit_t h);
    logic [EVT_BITS-1:0] w = h;
    @(negedge ckbc);
    data0 = 1'b1;
    data1 = 1'b1;
    for (int i = EVT_BITS / 2 - 1; i >= 0; i--) begin
      @(negedge ckbc);
      data1 = w[2*i + 1];
      data0 = w[2*i];
    end
    @(negedge ckbc);
    data0 = 1'b0;
    data1 = 1'b0;
  endtask

endmodule

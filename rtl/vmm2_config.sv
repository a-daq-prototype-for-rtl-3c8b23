// vmm2_config: state machine that loads the configuration of the two
// daisy-chained VMM2 front-end chips.
//
// The host's configuration bytes are held in a CFG_BYTES x 8 memory (written
// by the command decoder). On start the machine shifts CFG_BITS bits out on
// di, byte 0 first and MSB first within a byte. Each bit takes 2*HALF clk
// cycles: di is set and ckdt is low for HALF cycles, then ckdt is high for
// HALF cycles, the chips shifting on the rising edge of ckdt. After the last
// bit, cktk is held high for HALF cycles to latch the shifted sequence, then
// done rises and stays high until the next start. The first bit shifted ends
// up in the far end of the chain (VMM2-2).
// That the configuration is a state machine driving ckdt, cktk and di is from
// the document; the line roles, the bit order and the timing are this
// design's choice. CFG_BITS defaults to two chips of 1616 bits each.
module vmm2_config #(
  parameter int CFG_BITS  = 3232,
  parameter int CFG_BYTES = (CFG_BITS + 7) / 8,
  parameter int HALF      = 4
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         cfg_we,
  input  logic [$clog2(CFG_BYTES)-1:0] cfg_waddr,
  input  logic [7:0]                   cfg_wdata,
  input  logic                         start,
  output logic                         ckdt,
  output logic                         cktk,
  output logic                         di,
  output logic                         busy,
  output logic                         done
);

  localparam int AW = $clog2(CFG_BYTES);
  localparam int BW = $clog2(CFG_BITS + 1);
  localparam int TW = $clog2(HALF + 1);

  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_LOW, S_HIGH, S_LATCH, S_DONE} state_t;

  logic [7:0] mem [CFG_BYTES];
  logic [7:0] rd_byte;
  logic [7:0] sreg;
  logic [AW-1:0] raddr;
  logic [BW-1:0] bits_left;
  logic [2:0]    bit_in_byte;
  logic [TW-1:0] tcnt;
  state_t        state;

  always_ff @(posedge clk) begin
    if (cfg_we) mem[cfg_waddr] <= cfg_wdata;
    rd_byte <= mem[raddr];
  end

  assign busy = (state != S_IDLE) && (state != S_DONE);
  assign done = (state == S_DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      raddr       <= '0;
      bits_left   <= '0;
      bit_in_byte <= '0;
      tcnt        <= '0;
      sreg        <= '0;
      ckdt        <= 1'b0;
      cktk        <= 1'b0;
      di          <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: begin
          ckdt <= 1'b0;
          cktk <= 1'b0;
          if (start) begin
            raddr     <= '0;
            bits_left <= BW'(CFG_BITS);
            state     <= S_FETCH;
            tcnt      <= '0;
          end
        end
        S_FETCH: begin
          // raddr was presented last cycle; rd_byte is valid now
          tcnt <= tcnt + 1'b1;
          if (tcnt == TW'(1)) begin
            sreg        <= rd_byte;
            bit_in_byte <= 3'd7;
            raddr       <= raddr + 1'b1;
            tcnt        <= '0;
            state       <= S_LOW;
          end
        end
        S_LOW: begin
          ckdt <= 1'b0;
          di   <= sreg[7];
          tcnt <= tcnt + 1'b1;
          if (tcnt == TW'(HALF - 1)) begin
            tcnt  <= '0;
            ckdt  <= 1'b1;
            state <= S_HIGH;
          end
        end
        S_HIGH: begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == TW'(HALF - 1)) begin
            tcnt      <= '0;
            ckdt      <= 1'b0;
            bits_left <= bits_left - 1'b1;
            sreg      <= {sreg[6:0], 1'b0};
            bit_in_byte <= bit_in_byte - 1'b1;
            if (bits_left == BW'(1)) begin
              cktk  <= 1'b1;
              state <= S_LATCH;
            end else if (bit_in_byte == 3'd0) begin
              state <= S_FETCH;
            end else begin
              state <= S_LOW;
            end
          end
        end
        S_LATCH: begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == TW'(HALF - 1)) begin
            tcnt  <= '0;
            cktk  <= 1'b0;
            state <= S_DONE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

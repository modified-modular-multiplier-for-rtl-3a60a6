// sipo_shift_reg: serial-in parallel-out chain of DEPTH word registers.
//
// A word presented on din is taken into stage 1 on a clock edge with shift
// high, while every stage k passes its word on to stage k+1. All stages are
// visible at once on dout, stage 1 in the most significant word and stage
// DEPTH in the least significant word, so after DEPTH shifts of a word stream
// sent least significant word first, dout holds the whole vector in order.
// The defaults (32 stages of 32 bits giving a 1024-bit output, clock and
// reset to every stage) follow the reference architecture; the shift enable and the
// synchronous clear are this design's own choices.
module sipo_shift_reg #(
  parameter int unsigned WORD  = 32,
  parameter int unsigned DEPTH = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,   // asynchronous, active low
  input  logic                  clear,   // synchronous clear of all stages
  input  logic                  shift,
  input  logic [WORD-1:0]       din,
  output logic [WORD*DEPTH-1:0] dout
);
  logic [WORD-1:0] stage [DEPTH];  // stage[0] is register 1

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DEPTH; k++) stage[k] <= '0;
    end else if (clear) begin
      for (int k = 0; k < DEPTH; k++) stage[k] <= '0;
    end else if (shift) begin
      stage[0] <= din;
      for (int k = 1; k < DEPTH; k++) stage[k] <= stage[k-1];
    end
  end

  always_comb begin
    for (int k = 0; k < DEPTH; k++)
      dout[WORD*(DEPTH-k)-1 -: WORD] = stage[k];
  end
endmodule

// mcpa: word-serial carry propagation adder ("modified CPA").
//
// Converts a carry-save pair (x, y) of WORD*WORDS bits into a plain binary
// sum with one WORD-bit adder used WORDS times, instead of one adder as wide
// as the operands. Two multiplexers, steered by a log2(WORDS)-bit word select,
// pick word k of x and of y; the words are held in two input registers; the
// adder adds them with the carry register and writes the WORD-bit result into
// a serial-in parallel-out shift register that assembles the full sum. The
// carry register forwards the carry out of word k into word k+1.
//
// Interface: pulse start for one cycle with x and y valid; x and y must stay
// stable until done. start is ignored while busy. done pulses for one cycle
// when sum and cout are complete; they hold until the next start.
// Timing: with start sampled at clock edge 0, word k enters the input
// registers at edge k and its sum enters the shift register at edge k+1, so
// done is high in the cycle after edge WORDS: WORDS+1 cycles per addition.
//
// Following the reference architecture: 32-bit adder, 5-bit word select, input registers, a
// 1-bit carry register fed back, 32 clocks of 32-bit output. This design's
// own choices: the start/busy/done handshake, least significant word first,
// and clearing the carry register at start.
module mcpa #(
  parameter int unsigned WORD  = rsa_pkg::WORD_DEF,
  parameter int unsigned WORDS = rsa_pkg::N_BITS_DEF / rsa_pkg::WORD_DEF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [WORD*WORDS-1:0] x,
  input  logic [WORD*WORDS-1:0] y,
  output logic [WORD*WORDS-1:0] sum,
  output logic                  cout,
  output logic                  busy,
  output logic                  done
);
  localparam int unsigned SELW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [SELW-1:0] sel;        // word select of the input multiplexers
  logic            loading;    // input registers are being filled
  logic            add_valid;  // input registers hold a word to add
  logic            add_last;   // ... and it is the last word
  logic [WORD-1:0] reg_x, reg_y;
  logic            carry;
  logic [WORD-1:0] word_sum;
  logic            word_cout;
  logic            take;       // input registers load this cycle

  assign take = loading || (start && !busy);
  assign busy = loading || add_valid;

  // The WORD-bit adder with carry in from the carry register.
  always_comb {word_cout, word_sum} = {1'b0, reg_x} + {1'b0, reg_y} + {{WORD{1'b0}}, carry};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel       <= '0;
      loading   <= 1'b0;
      add_valid <= 1'b0;
      add_last  <= 1'b0;
      reg_x     <= '0;
      reg_y     <= '0;
      carry     <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (take) begin
        reg_x    <= x[WORD*sel +: WORD];
        reg_y    <= y[WORD*sel +: WORD];
        add_last <= (32'(sel) == WORDS - 1);
        loading  <= (32'(sel) != WORDS - 1);
        sel      <= (32'(sel) == WORDS - 1) ? '0 : sel + 1'b1;
      end
      add_valid <= take;
      if (start && !busy) begin
        carry <= 1'b0;
      end else if (add_valid) begin
        carry <= word_cout;
        if (add_last) done <= 1'b1;
      end
    end
  end

  sipo_shift_reg #(.WORD(WORD), .DEPTH(WORDS)) u_out (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (start && !busy),
    .shift (add_valid),
    .din   (word_sum),
    .dout  (sum)
  );

  assign cout = carry;

  // done only ever follows the last word, with the adder idle again.
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
endmodule

// mmm: Montgomery modular multiplier, S = A * B * 2^-(n+2) mod N.
//
// Radix-2 Montgomery multiplication with the intermediate value kept in
// carry-save form (a sum register SS and a carry register SC), so no carry
// ripples through the n-bit datapath during the iterations. Each iteration
// takes bit a_i of A (least significant first) and
//   1. adds a_i*B to SS+SC with the first carry save adder,
//   2. reads q, the parity of that sum (the least significant sum bit),
//   3. adds q*N with the second carry save adder, making the sum even,
//   4. halves the sum by a one-bit right shift.
// The loop runs n+2 times, i.e. R = 2^(n+2), which is four times larger than
// any n-bit modulus. With A, B < 2N the result is then below 2N, so the final
// compare-and-subtract of plain Montgomery multiplication is left out and a
// result can be fed straight back as an operand. After the loop the word-serial
// carry propagation adder (mcpa) turns SS+SC into binary: it adds the low n
// bits; bit n is SS[n] ^ SC[n] ^ carry out, as SS+SC < 2^(n+1).
//
// Interface: N must be odd and below 2^n; A and B below 2N (n+1 bits). Pulse
// start for one cycle; a, b and n must stay stable until done. done pulses
// once; s then holds until the next start.
// Timing: done is high N_BITS+2+WORDS+2 cycles after start is presented
// (1060 at the defaults): one cycle to take start and clear SS/SC, n+2
// iteration cycles, then WORDS+1 cycles in the adder (WORDS words plus its
// input register stage), whose first cycle also launches it.
//
// Following the reference architecture: two carry save adders back to back, separate sum and
// carry registers, q taken from the first adder, n+2 iterations without final
// subtraction, conversion by the 32-bit CPA with shift register. This design's
// own choices: register widths (n+3 bits, enough for the bound SS+SC < 5N
// inside an iteration), the handshake, and the one launch cycle.
module mmm #(
  parameter int unsigned N_BITS = rsa_pkg::N_BITS_DEF,
  parameter int unsigned WORD   = rsa_pkg::WORD_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [N_BITS:0]   a,      // multiplier, < 2N
  input  logic [N_BITS:0]   b,      // multiplicand, < 2N
  input  logic [N_BITS-1:0] n,      // odd modulus
  output logic [N_BITS:0]   s,      // A*B*2^-(n+2) mod N, < 2N
  output logic              busy,
  output logic              done
);
  localparam int unsigned WORDS = N_BITS / WORD;
  localparam int unsigned ITER  = N_BITS + 2;
  localparam int unsigned W     = N_BITS + 3;
  localparam int unsigned CW    = $clog2(ITER + 1);

  typedef enum logic [1:0] {IDLE, LOOP, CPA_GO, CPA_WAIT} state_e;
  state_e state;

  logic [W-1:0]      ss, sc;        // carry-save value SS + SC
  logic [CW-1:0]     cnt;           // iteration index i
  logic [N_BITS+1:0] a_ext;
  logic              a_i, q;
  logic [W-1:0]      ab, qn;
  logic [W-1:0]      s1, c1, s2, c2;
  logic [N_BITS-1:0] cpa_sum;
  logic              cpa_cout, cpa_busy, cpa_done;

  assign a_ext = {1'b0, a};
  assign a_i   = a_ext[cnt];
  assign ab    = a_i ? W'(b) : '0;

  // First CSA: SS + SC + a_i*B = s1 + 2*c1.
  csa #(.W(W)) u_csa1 (.x(ss), .y(sc), .z(ab), .s(s1), .c(c1));

  assign q  = s1[0];
  assign qn = q ? W'(n) : '0;

  // Second CSA: s1 + 2*c1 + q*N = s2 + 2*c2, an even number (s2[0] = 0).
  csa #(.W(W)) u_csa2 (.x(s1), .y({c1[W-2:0], 1'b0}), .z(qn), .s(s2), .c(c2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      ss    <= '0;
      sc    <= '0;
      cnt   <= '0;
    end else begin
      unique case (state)
        IDLE: if (start) begin
          ss    <= '0;
          sc    <= '0;
          cnt   <= '0;
          state <= LOOP;
        end
        LOOP: begin
          ss  <= {1'b0, s2[W-1:1]};  // (s2 + 2*c2) / 2
          sc  <= c2;
          cnt <= cnt + 1'b1;
          if (32'(cnt) == ITER - 1) state <= CPA_GO;
        end
        CPA_GO:   state <= CPA_WAIT;
        CPA_WAIT: if (cpa_done) state <= IDLE;
        default:  state <= IDLE;
      endcase
    end
  end

  mcpa #(.WORD(WORD), .WORDS(WORDS)) u_cpa (
    .clk   (clk),
    .rst_n (rst_n),
    .start (state == CPA_GO),
    .x     (ss[N_BITS-1:0]),
    .y     (sc[N_BITS-1:0]),
    .sum   (cpa_sum),
    .cout  (cpa_cout),
    .busy  (cpa_busy),
    .done  (cpa_done)
  );

  assign s    = {ss[N_BITS] ^ sc[N_BITS] ^ cpa_cout, cpa_sum};
  assign done = cpa_done;
  assign busy = (state != IDLE);

  // The halving step needs an even sum; the converted result must fit n+1 bits.
  a_even: assert property (@(posedge clk) disable iff (!rst_n) state == LOOP |-> !s2[0]);
  a_fits: assert property (@(posedge clk) disable iff (!rst_n)
                           state == CPA_GO |-> (ss[W-1:N_BITS+1] == '0 && sc[W-1:N_BITS+1] == '0));
  // 2*c1 must fit W bits: c1 <= (SS+SC+a_i*B)/2 < 2.5N, so its top bit stays 0.
  a_c1_fits: assert property (@(posedge clk) disable iff (!rst_n) state == LOOP |-> !c1[W-1]);
  a_cpa_runs: assert property (@(posedge clk) disable iff (!rst_n)
                               state == CPA_WAIT |-> (cpa_busy || cpa_done));
endmodule

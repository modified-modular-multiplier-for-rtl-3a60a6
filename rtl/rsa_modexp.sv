// rsa_modexp: RSA modular exponentiator, result = M^e mod N.
//
// One Montgomery multiplier (mmm) is used over and over under a sequencer
// (modexp_ctrl). An operand multiplexer with two operand registers
// (operand_mux) feeds it from the inputs M, 1, R^2 mod N and from its own
// earlier results; a result demultiplexer (result_demux) stores each result
// either as the mapped plaintext M*R mod N or as the running result S. The
// three phases are mapping into the Montgomery domain, exponentiation by
// square-and-multiply, and remapping by a multiplication by 1.
// Montgomery multiplication here divides by R = 2^(n+2), two bits more than
// the modulus, so no multiplication needs a final subtraction: values stay
// below 2N between multiplications and only the remapping brings the result
// below N.
// Interface: N odd with N < 2^n, M < N, r2 = R^2 mod N = 2^(2n+4) mod N,
// computed outside (as in the design, it is an input). m, e, n and r2 must
// stay stable from start until done. done pulses once; result then holds
// M^e mod N until the next start, and mont_m holds M*R mod N.
// Timing: 2 + E_BITS + popcount(e) + 1 multiplications, each costing
// n+2+WORDS+2 multiplier cycles plus 2 sequencing cycles.
// The structure follows the reference architecture; the handshake and
// the stable-input requirement are this design's choices.
module rsa_modexp
  import rsa_pkg::*;
#(
  parameter int unsigned N_BITS = N_BITS_DEF,
  parameter int unsigned WORD   = WORD_DEF,
  parameter int unsigned E_BITS = N_BITS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [N_BITS-1:0] m,       // plaintext, < N
  input  logic [E_BITS-1:0] e,       // exponent
  input  logic [N_BITS-1:0] n,       // odd modulus
  input  logic [N_BITS-1:0] r2,      // R^2 mod N, R = 2^(n+2)
  output logic [N_BITS-1:0] result,  // M^e mod N
  output logic [N_BITS:0]   mont_m,  // M*R mod N (below 2N)
  output logic              busy,
  output logic              done
);
  logic            ld_ops, mmm_start, mmm_done, mmm_busy;
  src_e            a_sel, b_sel;
  dst_e            dst;
  logic [N_BITS:0] op_a, op_b, mmm_s, s_reg, mbar_reg;

  modexp_ctrl #(.E_BITS(E_BITS)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .e         (e),
    .mmm_done  (mmm_done),
    .ld_ops    (ld_ops),
    .a_sel     (a_sel),
    .b_sel     (b_sel),
    .mmm_start (mmm_start),
    .dst       (dst),
    .busy      (busy),
    .done      (done)
  );

  operand_mux #(.N_BITS(N_BITS)) u_mux (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (ld_ops),
    .a_sel   (a_sel),
    .b_sel   (b_sel),
    .m       (m),
    .r2      (r2),
    .s_fb    (s_reg),
    .mbar_fb (mbar_reg),
    .op_a    (op_a),
    .op_b    (op_b)
  );

  mmm #(.N_BITS(N_BITS), .WORD(WORD)) u_mmm (
    .clk   (clk),
    .rst_n (rst_n),
    .start (mmm_start),
    .a     (op_a),
    .b     (op_b),
    .n     (n),
    .s     (mmm_s),
    .busy  (mmm_busy),
    .done  (mmm_done)
  );

  result_demux #(.N_BITS(N_BITS)) u_dmx (
    .clk   (clk),
    .rst_n (rst_n),
    .valid (mmm_done),
    .dst   (dst),
    .din   (mmm_s),
    .mbar  (mbar_reg),
    .s     (s_reg)
  );

  assign result = s_reg[N_BITS-1:0];
  assign mont_m = mbar_reg;

  // The sequencer never starts a multiplication while one is running.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) mmm_start |-> !mmm_busy);
endmodule

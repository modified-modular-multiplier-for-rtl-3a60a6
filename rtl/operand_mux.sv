// operand_mux: operand selection and operand registers of the exponentiator.
//
// Two multiplexers choose the multiplier operands A and B from the plaintext
// M, the constant 1, R^2 mod N, the running result S and the mapped
// plaintext M*R mod N (the last two fed back from the result registers). On a
// clock edge with load high the choices are taken into the two operand
// registers, which then hold A and B steady for a whole Montgomery
// multiplication.
// Interface: a_sel/b_sel are rsa_pkg::src_e codes; op_a/op_b are n+1 bits
// because fed-back values may reach 2N-1. One cycle from load to op_a/op_b.
// The sources and the two registers follow the reference architecture; the
// select encoding and the load enable are this design's choices.
module operand_mux
  import rsa_pkg::*;
#(
  parameter int unsigned N_BITS = N_BITS_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  src_e              a_sel,
  input  src_e              b_sel,
  input  logic [N_BITS-1:0] m,        // plaintext, < N
  input  logic [N_BITS-1:0] r2,       // R^2 mod N
  input  logic [N_BITS:0]   s_fb,     // running result S, < 2N
  input  logic [N_BITS:0]   mbar_fb,  // M*R mod N, < 2N
  output logic [N_BITS:0]   op_a,
  output logic [N_BITS:0]   op_b
);
  function automatic logic [N_BITS:0] pick(src_e sel, logic [N_BITS-1:0] m_i,
                                           logic [N_BITS-1:0] r2_i, logic [N_BITS:0] s_i,
                                           logic [N_BITS:0] mb_i);
    unique case (sel)
      SRC_M:    return {1'b0, m_i};
      SRC_ONE:  return (N_BITS+1)'(1);
      SRC_R2:   return {1'b0, r2_i};
      SRC_S:    return s_i;
      SRC_MBAR: return mb_i;
      default:  return '0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_a <= '0;
      op_b <= '0;
    end else if (load) begin
      op_a <= pick(a_sel, m, r2, s_fb, mbar_fb);
      op_b <= pick(b_sel, m, r2, s_fb, mbar_fb);
    end
  end
endmodule

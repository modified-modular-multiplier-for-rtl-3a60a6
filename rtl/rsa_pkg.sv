// rsa_pkg: sizes and select codes shared by the Montgomery RSA exponentiator.
//
// N_BITS_DEF is the modulus width n (1024) and WORD_DEF the width of the
// word-serial carry propagation adder (32), both the values the design is
// built around. The enums name the operand sources of the input multiplexer
// and the destinations of the output demultiplexer of the exponentiator.
package rsa_pkg;

  localparam int unsigned N_BITS_DEF = 1024;  // modulus width n
  localparam int unsigned WORD_DEF   = 32;    // CPA word width

  // Operand sources of the input multiplexer (Fig. 2 MUX inputs).
  typedef enum logic [2:0] {
    SRC_M    = 3'd0,  // plaintext M
    SRC_ONE  = 3'd1,  // constant 1
    SRC_R2   = 3'd2,  // R^2 mod N, R = 2^(n+2)
    SRC_S    = 3'd3,  // running result S (fed back)
    SRC_MBAR = 3'd4   // M*R mod N (fed back)
  } src_e;

  // Destinations of the result demultiplexer.
  typedef enum logic [0:0] {
    DST_MBAR = 1'b0,  // M*R mod N register
    DST_S    = 1'b1   // running result register
  } dst_e;

endpackage

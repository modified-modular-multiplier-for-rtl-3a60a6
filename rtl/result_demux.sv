// result_demux: routes multiplier results to the two result registers.
//
// When a Montgomery multiplication finishes (valid high for one cycle) its
// result is written either into the M*R mod N register (the mapped
// plaintext, used as multiplier operand for every 1 bit of the exponent) or
// into the running result register S, which after the final remapping step
// holds M^e mod N. Both registers feed back to the operand multiplexer.
// Interface: dst is an rsa_pkg::dst_e code sampled with valid; the written
// register shows the new value one cycle later.
// The two destinations follow the demultiplexer outputs of the reference
// architecture; holding them in registers is this design's choice.
module result_demux
  import rsa_pkg::*;
#(
  parameter int unsigned N_BITS = N_BITS_DEF
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            valid,
  input  dst_e            dst,
  input  logic [N_BITS:0] din,
  output logic [N_BITS:0] mbar,   // M*R mod N
  output logic [N_BITS:0] s       // running result, M^e mod N at the end
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mbar <= '0;
      s    <= '0;
    end else if (valid) begin
      unique case (dst)
        DST_MBAR: mbar <= din;
        DST_S:    s    <= din;
        default:  ;
      endcase
    end
  end
endmodule

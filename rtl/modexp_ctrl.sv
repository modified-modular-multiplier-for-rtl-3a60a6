// modexp_ctrl: sequencer of the modular exponentiation M^e mod N.
//
// Runs the Montgomery-domain square-and-multiply algorithm as a series of
// Montgomery multiplications MMM(A, B) = A*B*R^-1 mod N, R = 2^(n+2):
//   mapping:  M' = MMM(M, R^2 mod N)          (M*R mod N)
//             S  = MMM(R^2 mod N, 1)          (R mod N, i.e. 1 in Montgomery form)
//   loop over the exponent bits, most significant first:
//             S  = MMM(S, S);  if e_i = 1: S = MMM(S, M')
//   remapping: S = MMM(S, 1)                  (M^e mod N)
// Starting from S = R mod N rather than from the leading 1 of e means no
// search for that bit is needed; the cost is one extra multiplication, for
// at most 2*E_BITS+3 multiplications in all.
// Each multiplication takes three phases: LOAD (operand registers take the
// selected sources), GO (start pulse to the multiplier) and WAIT (until the
// multiplier's done, when the result demultiplexer writes dst).
// Interface: start is taken in IDLE; e must stay stable until done. done
// pulses for one cycle after the result register holds M^e mod N.
// Operand A never comes from M', so the top bit of a_sel is always 0.
// The sequence of multiplications follows the reference algorithm; the phase
// split, the handshakes and the bit order (most significant bit first, which
// square-then-multiply requires) are this design's choices.
module modexp_ctrl
  import rsa_pkg::*;
#(
  parameter int unsigned E_BITS = N_BITS_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [E_BITS-1:0] e,
  input  logic              mmm_done,
  output logic              ld_ops,     // operand registers load
  output src_e              a_sel,
  output src_e              b_sel,
  output logic              mmm_start,
  output dst_e              dst,        // result destination, valid with mmm_done
  output logic              busy,
  output logic              done
);
  localparam int unsigned IW = (E_BITS > 1) ? $clog2(E_BITS) : 1;

  typedef enum logic [2:0] {OP_IDLE, OP_MAP_M, OP_INIT_S, OP_SQR, OP_MUL, OP_REMAP} op_e;
  typedef enum logic [1:0] {PH_LOAD, PH_GO, PH_WAIT} phase_e;

  op_e          op;
  phase_e       phase;
  logic [IW-1:0] idx;   // current exponent bit

  always_comb begin
    a_sel = SRC_S;
    b_sel = SRC_S;
    dst   = DST_S;
    unique case (op)
      OP_MAP_M:  begin a_sel = SRC_M;  b_sel = SRC_R2;  dst = DST_MBAR; end
      OP_INIT_S: begin a_sel = SRC_R2; b_sel = SRC_ONE; end
      OP_SQR:    begin a_sel = SRC_S;  b_sel = SRC_S;   end
      OP_MUL:    begin a_sel = SRC_S;  b_sel = SRC_MBAR; end
      OP_REMAP:  begin a_sel = SRC_S;  b_sel = SRC_ONE; end
      default:   ;
    endcase
  end

  assign ld_ops    = (op != OP_IDLE) && (phase == PH_LOAD);
  assign mmm_start = (op != OP_IDLE) && (phase == PH_GO);
  assign busy      = (op != OP_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op    <= OP_IDLE;
      phase <= PH_LOAD;
      idx   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (op == OP_IDLE) begin
        if (start) begin
          op    <= OP_MAP_M;
          phase <= PH_LOAD;
          idx   <= IW'(E_BITS - 1);
        end
      end else begin
        unique case (phase)
          PH_LOAD: phase <= PH_GO;
          PH_GO:   phase <= PH_WAIT;
          PH_WAIT: if (mmm_done) begin
            phase <= PH_LOAD;
            unique case (op)
              OP_MAP_M:  op <= OP_INIT_S;
              OP_INIT_S: op <= OP_SQR;
              OP_SQR:    begin
                if (e[idx])        op <= OP_MUL;
                else if (idx == 0) op <= OP_REMAP;
                else begin         op <= OP_SQR; idx <= idx - 1'b1; end
              end
              OP_MUL:    begin
                if (idx == 0) op <= OP_REMAP;
                else begin    op <= OP_SQR; idx <= idx - 1'b1; end
              end
              OP_REMAP:  begin op <= OP_IDLE; done <= 1'b1; end
              default:   op <= OP_IDLE;
            endcase
          end
          default: phase <= PH_LOAD;
        endcase
      end
    end
  end
endmodule

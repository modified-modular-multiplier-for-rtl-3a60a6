// tb_operand_mux: checks operand selection and the hold of the operand
// registers. For every pair of sources it loads random inputs and compares
// op_a/op_b with the expected source values; with load low the registers
// must keep their contents while the inputs change.
module tb_operand_mux;
  import rsa_pkg::*;
  localparam int unsigned NB = 96;

  logic clk = 0, rst_n = 0, load = 0;
  src_e a_sel = SRC_M, b_sel = SRC_M;
  logic [NB-1:0] m, r2;
  logic [NB:0] s_fb, mbar_fb, op_a, op_b;
  int checks = 0, failures = 0;

  operand_mux #(.N_BITS(NB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NB:0] want(src_e sel);
    case (sel)
      SRC_M:    return {1'b0, m};
      SRC_ONE:  return 1;
      SRC_R2:   return {1'b0, r2};
      SRC_S:    return s_fb;
      default:  return mbar_fb;
    endcase
  endfunction

  task automatic randomize_inputs();
    m = NB'({$urandom, $urandom, $urandom});
    r2 = NB'({$urandom, $urandom, $urandom});
    s_fb = (NB+1)'({$urandom, $urandom, $urandom, $urandom});
    mbar_fb = (NB+1)'({$urandom, $urandom, $urandom, $urandom});
  endtask

  initial begin
    logic [NB:0] ea, eb;
    src_e srcs[5] = '{SRC_M, SRC_ONE, SRC_R2, SRC_S, SRC_MBAR};
    randomize_inputs();
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (srcs[i]) foreach (srcs[j]) begin
      @(negedge clk);
      randomize_inputs();
      a_sel = srcs[i]; b_sel = srcs[j]; load = 1;
      ea = want(a_sel); eb = want(b_sel);
      @(negedge clk);
      load = 0;
      checks++;
      if (op_a != ea || op_b != eb) begin
        failures++;
        $display("FAIL sel %s/%s: a=%h b=%h", a_sel.name(), b_sel.name(), op_a, op_b);
      end
      randomize_inputs();
      @(negedge clk);
      checks++;
      if (op_a != ea || op_b != eb) begin
        failures++;
        $display("FAIL hold: a=%h b=%h", op_a, op_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

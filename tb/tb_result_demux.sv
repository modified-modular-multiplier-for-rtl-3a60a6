// tb_result_demux: checks that each valid result lands in the register named
// by dst, that the other register keeps its value, and that nothing changes
// without valid.
module tb_result_demux;
  import rsa_pkg::*;
  localparam int unsigned NB = 96;

  logic clk = 0, rst_n = 0, valid = 0;
  dst_e dst = DST_S;
  logic [NB:0] din = '0, mbar, s;
  logic [NB:0] m_mbar, m_s;
  int checks = 0, failures = 0;

  result_demux #(.N_BITS(NB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m_mbar = '0; m_s = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      valid = ($urandom % 3) != 0;
      dst   = dst_e'($urandom % 2);
      din   = (NB+1)'({$urandom, $urandom, $urandom, $urandom});
      if (valid) begin
        if (dst == DST_MBAR) m_mbar = din; else m_s = din;
      end
      @(negedge clk);
      valid = 0;
      checks++;
      if (mbar != m_mbar || s != m_s) begin
        failures++;
        $display("FAIL k=%0d: mbar=%h s=%h", k, mbar, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

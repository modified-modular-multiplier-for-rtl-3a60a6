// tb_modexp_ctrl: checks the exponentiation sequencer on its own.
// A stand-in for the multiplier answers every start pulse with done after a
// random delay. The testbench records each multiplication the sequencer asks
// for (operand sources at the operand-register load, destination at done)
// and compares the list with the sequence worked out from e:
//   (M,R2)->M', (R2,1)->S, then per bit from the top: (S,S)->S and, for a 1
//   bit, (S,M')->S, and finally (S,1)->S.
// Exponents: all zeros, all ones, a single top bit, and random values.
module tb_modexp_ctrl;
  import rsa_pkg::*;
  localparam int unsigned E_BITS = 12;

  logic clk = 0, rst_n = 0, start = 0;
  logic [E_BITS-1:0] e = '0;
  logic mmm_done = 0;
  logic ld_ops, mmm_start, busy, done;
  src_e a_sel, b_sel;
  dst_e dst;
  int checks = 0, failures = 0;

  modexp_ctrl #(.E_BITS(E_BITS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Multiplier stand-in: done some cycles after each start.
  initial begin
    forever begin
      @(posedge clk);
      if (mmm_start) begin
        repeat ($urandom_range(1, 6)) @(posedge clk);
        #1 mmm_done = 1;
        @(posedge clk);
        #1 mmm_done = 0;
      end
    end
  end

  typedef struct packed {src_e a; src_e b; dst_e d;} mul_t;
  mul_t seen[$];
  src_e la, lb;

  always @(posedge clk) begin
    if (ld_ops) begin la <= a_sel; lb <= b_sel; end
    if (mmm_done) seen.push_back('{a: la, b: lb, d: dst});
  end

  task automatic run(input logic [E_BITS-1:0] ev);
    mul_t exp_q[$];
    int unsigned t;
    seen.delete();
    exp_q.push_back('{a: SRC_M, b: SRC_R2, d: DST_MBAR});
    exp_q.push_back('{a: SRC_R2, b: SRC_ONE, d: DST_S});
    for (int i = E_BITS - 1; i >= 0; i--) begin
      exp_q.push_back('{a: SRC_S, b: SRC_S, d: DST_S});
      if (ev[i]) exp_q.push_back('{a: SRC_S, b: SRC_MBAR, d: DST_S});
    end
    exp_q.push_back('{a: SRC_S, b: SRC_ONE, d: DST_S});
    @(negedge clk);
    e = ev; start = 1;
    @(negedge clk);
    start = 0;
    t = 0;
    while (!done && t < 50000) begin @(negedge clk); t++; end
    checks++;
    if (seen.size() != exp_q.size()) begin
      failures++;
      $display("FAIL e=%b: %0d multiplications, expected %0d", ev, seen.size(), exp_q.size());
    end else begin
      for (int k = 0; k < exp_q.size(); k++) begin
        checks++;
        if (seen[k] != exp_q[k]) begin
          failures++;
          $display("FAIL e=%b step %0d: got %p expected %p", ev, k, seen[k], exp_q[k]);
        end
      end
    end
    checks++;
    if (busy) begin failures++; $display("FAIL busy after done"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run('0);
    run('1);
    run(E_BITS'(1) << (E_BITS - 1));
    run(E_BITS'(1));
    for (int k = 0; k < 10; k++) run(E_BITS'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rsa_modexp_full: the exponentiator at its default size (1024-bit
// modulus, 1024-bit exponent, 32-bit word-serial adder), no parameter
// overrides. Two complete exponentiations: e = 65537, the usual RSA public
// exponent, and a random full-length exponent. Each result is compared with
// M^e mod N computed by plain binary exponentiation on wide integers in the
// testbench, and the cycle count with
//   1 + (3 + 1024 + popcount(e)) * (n + 2 + 32 + 4).
module tb_rsa_modexp_full;
  localparam int unsigned NB = 1024, EB = 1024, WORDS = 32;
  localparam int unsigned PW = 2 * NB + 8;
  localparam int unsigned PER_MUL = NB + 2 + WORDS + 4;

  logic clk = 0, rst_n = 0, start = 0;
  logic [NB-1:0] m = '0, n = '0, r2 = '0, result;
  logic [EB-1:0] e = '0;
  logic [NB:0] mont_m;
  logic busy, done;
  int checks = 0, failures = 0;

  rsa_modexp dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NB-1:0] ref_modexp(logic [NB-1:0] mm, logic [EB-1:0] ee, logic [NB-1:0] nn);
    logic [PW-1:0] r, base, modn;
    modn = PW'(nn);
    r = PW'(1) % modn;
    base = PW'(mm) % modn;
    for (int i = 0; i < EB; i++) begin
      if (ee[i]) r = (r * base) % modn;
      base = (base * base) % modn;
    end
    return NB'(r);
  endfunction

  function automatic logic [NB-1:0] rnd_nb();
    logic [NB-1:0] v;
    for (int k = 0; k < NB / 32; k++) v[32*k +: 32] = $urandom;
    return v;
  endfunction

  task automatic run(input logic [NB-1:0] nn, input logic [NB-1:0] mm, input logic [EB-1:0] ee);
    logic [PW-1:0] modn, rr;
    logic [NB-1:0] want;
    int cycles, nm;
    modn = PW'(nn);
    rr = (PW'(1) << (2 * (NB + 2))) % modn;
    want = ref_modexp(mm, ee, nn);
    @(negedge clk);
    n = nn; m = mm; e = ee; r2 = NB'(rr); start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    nm = 3 + EB + $countones(ee);
    checks++;
    if (result != want) begin
      failures++;
      $display("FAIL result: got %h expected %h", result, want);
    end
    checks++;
    if (cycles != 1 + nm * PER_MUL) begin
      failures++;
      $display("FAIL %0d cycles, expected %0d", cycles, 1 + nm * PER_MUL);
    end
    $display("exponentiation with %0d multiplications took %0d cycles", nm, cycles);
  endtask

  initial begin
    logic [NB-1:0] nn, mm;
    repeat (2) @(posedge clk);
    rst_n = 1;
    nn = rnd_nb() | NB'(1) | (NB'(1) << (NB - 1));
    mm = NB'(PW'(rnd_nb()) % PW'(nn));
    run(nn, mm, EB'(65537));
    nn = rnd_nb() | NB'(1) | (NB'(1) << (NB - 1));
    mm = NB'(PW'(rnd_nb()) % PW'(nn));
    run(nn, mm, rnd_nb());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

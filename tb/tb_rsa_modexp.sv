// tb_rsa_modexp: end-to-end test of the exponentiator at a reduced size
// (n = 64, two CPA words, 64-bit exponents).
// For random odd moduli, plaintexts and exponents the result is compared with
// M^e mod N computed in the testbench by binary exponentiation on wide
// integers, with no Montgomery arithmetic; R^2 mod N is computed the same
// way. Also checked: M*R mod N on mont_m, the number of multiplications
// (3 + E_BITS + popcount(e)) and the total cycle count.
// Mechanisms counted, each must occur: mapping of M, initialisation of S,
// squaring, multiplication by M' (1 bit), skipped multiplication (0 bit),
// remapping, results routed to each demultiplexer output, and a carry out of
// the word-serial adder's low words.
module tb_rsa_modexp;
  localparam int unsigned NB = 64, WORD = 32, EB = 64;
  localparam int unsigned WORDS = NB / WORD;
  localparam int unsigned LAT = NB + 2 + WORDS + 2;  // one multiplication
  localparam int unsigned PW = 2 * NB + 8;

  logic clk = 0, rst_n = 0, start = 0;
  logic [NB-1:0] m = '0, n = '0, r2 = '0, result;
  logic [EB-1:0] e = '0;
  logic [NB:0] mont_m;
  logic busy, done;
  int checks = 0, failures = 0;

  rsa_modexp #(.N_BITS(NB), .WORD(WORD), .E_BITS(EB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, sampled from the sequencer and the adder.
  int n_map, n_init, n_sqr, n_mul, n_skip, n_remap, n_to_mbar, n_to_s, n_carry, n_mults;
  always @(posedge clk) if (rst_n) begin
    if (dut.mmm_start) begin
      n_mults++;
      if (dut.a_sel == rsa_pkg::SRC_M && dut.b_sel == rsa_pkg::SRC_R2) n_map++;
      if (dut.a_sel == rsa_pkg::SRC_R2 && dut.b_sel == rsa_pkg::SRC_ONE) n_init++;
      if (dut.a_sel == rsa_pkg::SRC_S && dut.b_sel == rsa_pkg::SRC_S) begin
        n_sqr++;
        if (!e[dut.u_ctrl.idx]) n_skip++;
      end
      if (dut.a_sel == rsa_pkg::SRC_S && dut.b_sel == rsa_pkg::SRC_MBAR) n_mul++;
      if (dut.a_sel == rsa_pkg::SRC_S && dut.b_sel == rsa_pkg::SRC_ONE) n_remap++;
    end
    if (dut.mmm_done) begin
      if (dut.dst == rsa_pkg::DST_MBAR) n_to_mbar++; else n_to_s++;
    end
    if (dut.u_mmm.u_cpa.add_valid && !dut.u_mmm.u_cpa.add_last && dut.u_mmm.u_cpa.word_cout) n_carry++;
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
    for (int k = 0; k < (NB + 31) / 32; k++) v[32*k +: 32] = $urandom;
    return v;
  endfunction

  task automatic run(input logic [NB-1:0] nn, input logic [NB-1:0] mm, input logic [EB-1:0] ee);
    logic [PW-1:0] modn, rr, mr;
    logic [NB-1:0] want;
    int cycles, mults0, nm;
    modn = PW'(nn);
    rr = (PW'(1) << (2 * (NB + 2))) % modn;
    mr = (PW'(mm) << (NB + 2)) % modn;
    want = ref_modexp(mm, ee, nn);
    mults0 = n_mults;
    @(negedge clk);
    n = nn; m = mm; e = ee; r2 = NB'(rr); start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done && cycles < 2000000) begin @(negedge clk); cycles++; end
    nm = 3 + EB + $countones(ee);
    checks++;
    if (result != want) begin
      failures++;
      $display("FAIL result: N=%h M=%h e=%h got %h expected %h", nn, mm, ee, result, want);
    end
    checks++;
    if (mont_m >= (NB+1)'(nn) << 1 || PW'(mont_m) % modn != mr) begin
      failures++;
      $display("FAIL M*R mod N: got %h expected %h (mod N)", mont_m, mr);
    end
    checks++;
    if (n_mults - mults0 != nm) begin
      failures++;
      $display("FAIL %0d multiplications, expected %0d", n_mults - mults0, nm);
    end
    checks++;
    if (cycles != 1 + nm * (LAT + 2)) begin
      failures++;
      $display("FAIL %0d cycles, expected %0d", cycles, 1 + nm * (LAT + 2));
    end
  endtask

  task automatic need(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else $display("%s: %0d", what, count);
  endtask

  initial begin
    logic [NB-1:0] nn, mm;
    {n_map, n_init, n_sqr, n_mul, n_skip, n_remap, n_to_mbar, n_to_s, n_carry, n_mults} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Textbook RSA pair: N = 61*53 = 3233, e = 17, d = 2753.
    run(NB'(3233), NB'(65), EB'(17));
    checks++;
    if (result != NB'(2790)) begin failures++; $display("FAIL 65^17 mod 3233 = %0d", result); end
    run(NB'(3233), NB'(2790), EB'(2753));
    checks++;
    if (result != NB'(65)) begin failures++; $display("FAIL 2790^2753 mod 3233 = %0d", result); end
    nn = rnd_nb() | NB'(1) | (NB'(1) << (NB - 1));
    run(nn, NB'(2), '0);                // e = 0
    run(nn, nn - 1, '1);                // all exponent bits set
    run(nn, NB'(7), EB'(1));            // e = 1
    for (int k = 0; k < 8; k++) begin
      nn = rnd_nb() | NB'(1);
      if (k % 2 == 0) nn[NB-1] = 1'b1;
      mm = NB'((PW'(rnd_nb())) % PW'(nn));
      run(nn, mm, {$urandom, $urandom});
    end
    need("mapping M*R mod N", n_map);
    need("initialisation of S", n_init);
    need("squaring", n_sqr);
    need("multiplication by M' (exponent bit 1)", n_mul);
    need("skipped multiplication (exponent bit 0)", n_skip);
    need("remapping", n_remap);
    need("result routed to M*R mod N", n_to_mbar);
    need("result routed to S", n_to_s);
    need("carry between CPA words", n_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

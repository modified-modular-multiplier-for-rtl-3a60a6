// tb_mmm: checks the Montgomery multiplier at its default size (n = 1024,
// 32-bit CPA). For random odd moduli N and random operands A, B < 2N it
// checks, with plain wide-integer arithmetic in the testbench, that
//   (S * 2^(n+2)) mod N == (A * B) mod N   and   S < 2N,
// and that each multiplication takes n+2+WORDS+2 cycles from start to done.
// Corner cases: operands 0, 1, 2N-1 and a modulus with only the top and
// bottom bits set.
module tb_mmm;
  localparam int unsigned NB = 1024, WORD = 32, WORDS = NB / WORD;
  localparam int unsigned LAT = NB + 2 + WORDS + 2;
  localparam int unsigned PW = 2 * NB + 8;  // width for reference products

  logic clk = 0, rst_n = 0, start = 0;
  logic [NB:0] a = '0, b = '0, s;
  logic [NB-1:0] n = '0;
  logic busy, done;
  int checks = 0, failures = 0;

  mmm #(.N_BITS(NB), .WORD(WORD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NB-1:0] rnd_mod(bit top);
    logic [NB-1:0] v;
    for (int k = 0; k < WORDS; k++) v[WORD*k +: WORD] = $urandom;
    v[0] = 1'b1;
    if (top) v[NB-1] = 1'b1;
    return v;
  endfunction

  function automatic logic [NB:0] rnd_below(logic [NB:0] lim);
    logic [NB+32:0] v;
    for (int k = 0; k < (NB + 33 + 31) / 32; k++) v[32*k +: 32] = $urandom;
    return NB'(v % (NB+33)'(lim));
  endfunction

  task automatic run(input logic [NB-1:0] nn, input logic [NB:0] aa, input logic [NB:0] bb);
    logic [PW-1:0] lhs, rhs, modn;
    int cycles;
    @(negedge clk);
    n = nn; a = aa; b = bb; start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done && cycles < 4 * LAT) begin
      @(negedge clk);
      cycles++;
    end
    modn = PW'(nn);
    lhs  = (PW'(s) << (NB + 2)) % modn;
    rhs  = (PW'(aa) * PW'(bb)) % modn;
    checks++;
    if (lhs != rhs) begin
      failures++;
      $display("FAIL congruence: N=%h A=%h B=%h S=%h", nn, aa, bb, s);
    end
    checks++;
    if ((NB+1)'(s) >= ((NB+1)'(nn) << 1)) begin
      failures++;
      $display("FAIL bound: S=%h >= 2N", s);
    end
    checks++;
    if (cycles != LAT) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cycles, LAT);
    end
  endtask

  initial begin
    logic [NB-1:0] nn;
    logic [NB:0] two_n;
    repeat (2) @(posedge clk);
    rst_n = 1;
    nn = rnd_mod(1);
    two_n = (NB+1)'(nn) << 1;
    run(nn, '0, two_n - 1);
    run(nn, (NB+1)'(1), (NB+1)'(1));
    run(nn, two_n - 1, two_n - 1);
    nn = '0; nn[NB-1] = 1'b1; nn[0] = 1'b1;
    two_n = (NB+1)'(nn) << 1;
    run(nn, two_n - 1, two_n - 2);
    run(NB'(3), (NB+1)'(5), (NB+1)'(4));
    for (int k = 0; k < 12; k++) begin
      nn = rnd_mod(k % 3 != 0);
      two_n = (NB+1)'(nn) << 1;
      run(nn, rnd_below(two_n), rnd_below(two_n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mcpa: checks the word-serial carry propagation adder at its default
// size (32 words of 32 bits). Random and corner operand pairs, including
// all-ones plus one (a carry rippling through every word), are added; the
// sum and carry out are compared with x + y computed at full width, and the
// latency from start to done must be WORDS+1 cycles.
module tb_mcpa;
  localparam int unsigned WORD = 32, WORDS = 32, NB = WORD * WORDS;
  logic clk = 0, rst_n = 0, start = 0;
  logic [NB-1:0] x = '0, y = '0, sum;
  logic cout, busy, done;
  int checks = 0, failures = 0;

  mcpa #(.WORD(WORD), .WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NB-1:0] rnd();
    logic [NB-1:0] v;
    for (int k = 0; k < WORDS; k++) v[WORD*k +: WORD] = $urandom;
    return v;
  endfunction

  task automatic run(input logic [NB-1:0] xa, input logic [NB-1:0] ya);
    logic [NB:0] ref_sum;
    int cycles;
    @(negedge clk);
    x = xa; y = ya; start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    ref_sum = (NB+1)'(xa) + (NB+1)'(ya);
    checks++;
    if ({cout, sum} != ref_sum) begin
      failures++;
      $display("FAIL sum: got %h expected %h", {cout, sum}, ref_sum);
    end
    checks++;
    if (cycles != WORDS + 1) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cycles, WORDS + 1);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run('1, NB'(1));
    run('1, '1);
    run('0, '0);
    run({WORDS{32'h0000_0001}}, {WORDS{32'hffff_ffff}});
    for (int k = 0; k < 40; k++) run(rnd(), rnd());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

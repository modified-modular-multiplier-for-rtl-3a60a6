// tb_sipo_shift_reg: checks the word shift register at its default size.
// Shifts streams of random words in (with idle cycles between some of them)
// and compares dout after every edge with a reference model kept in the
// testbench: the newest word in the most significant position. Also checks
// that clear empties every stage.
module tb_sipo_shift_reg;
  localparam int unsigned WORD = 32, DEPTH = 32;
  logic clk = 0, rst_n = 0, clear = 0, shift = 0;
  logic [WORD-1:0] din = '0;
  logic [WORD*DEPTH-1:0] dout, model;
  int checks = 0, failures = 0;

  sipo_shift_reg #(.WORD(WORD), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(string what);
    checks++;
    if (dout !== model) begin
      failures++;
      $display("FAIL %s: dout=%h model=%h", what, dout, model);
    end
  endtask

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); cmp("reset");
    for (int k = 0; k < 3 * DEPTH; k++) begin
      shift = ($urandom % 4) != 0;
      din   = $urandom;
      @(posedge clk);
      if (shift) model = {din, model[WORD*DEPTH-1:WORD]};
      @(negedge clk); cmp("shift");
    end
    // After DEPTH shifts of w0..w(DEPTH-1), word k sits at bits [32k +: 32].
    for (int k = 0; k < DEPTH; k++) begin
      shift = 1; din = WORD'(k * 3 + 1); @(negedge clk);
    end
    shift = 0;
    for (int k = 0; k < DEPTH; k++) begin
      checks++;
      if (dout[WORD*k +: WORD] != WORD'(k * 3 + 1)) begin
        failures++;
        $display("FAIL order: word %0d = %h", k, dout[WORD*k +: WORD]);
      end
    end
    clear = 1; shift = 1; @(negedge clk); clear = 0; shift = 0;
    model = '0; cmp("clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

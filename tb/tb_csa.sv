// tb_csa: checks the carry save adder on random and corner vectors.
// For every input triple the sum and carry vectors must satisfy
// x + y + z == s + 2*c (computed at full width) and s == x ^ y ^ z.
module tb_csa;
  localparam int unsigned W = 67;
  logic [W-1:0] x, y, z, s, c;
  int checks = 0, failures = 0;

  csa #(.W(W)) dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  task automatic check();
    logic [W+1:0] lhs, rhs;
    #1;
    lhs = (W+2)'(x) + (W+2)'(y) + (W+2)'(z);
    rhs = (W+2)'(s) + ((W+2)'(c) << 1);
    checks++;
    if (lhs != rhs || s != (x ^ y ^ z)) begin
      failures++;
      $display("FAIL x=%h y=%h z=%h s=%h c=%h", x, y, z, s, c);
    end
  endtask

  function automatic logic [W-1:0] rnd();
    return W'({$urandom, $urandom, $urandom});
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '1; y = '1; z = '1; check();
    x = '0; y = '0; z = '0; check();
    x = '1; y = '0; z = '1; check();
    for (int k = 0; k < 500; k++) begin
      x = rnd(); y = rnd(); z = rnd();
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

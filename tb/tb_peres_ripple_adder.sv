// tb_peres_ripple_adder: Peres ripple adder against integer addition.
//
// The 4-bit default is checked exhaustively (all a, b, cin); a 12-bit
// instance, the width the 8-point FFT uses, is checked on 2000 random
// operands. Expected: {cout, sum} = a + b + cin.
module tb_peres_ripple_adder;
  logic [3:0]  a4, b4, s4;
  logic        c4i, c4o;
  logic [11:0] a12, b12, s12;
  logic        c12i, c12o;
  int checks = 0, failures = 0;

  peres_ripple_adder dut4 (.a(a4), .b(b4), .cin(c4i), .sum(s4), .cout(c4o));
  peres_ripple_adder #(.WIDTH(12)) dut12 (.a(a12), .b(b12), .cin(c12i), .sum(s12), .cout(c12o));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {c4i, a4, b4} = 9'(v);
      #1;
      checks++;
      if ({c4o, s4} != 5'(int'(a4) + int'(b4) + int'(c4i))) begin
        failures++;
        $display("FAIL 4-bit: %0d + %0d + %0d -> %0d", a4, b4, c4i, {c4o, s4});
      end
    end
    for (int v = 0; v < 2000; v++) begin
      a12 = 12'($urandom); b12 = 12'($urandom); c12i = 1'($urandom);
      #1;
      checks++;
      if ({c12o, s12} != 13'(int'(a12) + int'(b12) + int'(c12i))) begin
        failures++;
        $display("FAIL 12-bit: %0d + %0d + %0d -> %0d", a12, b12, c12i, {c12o, s12});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

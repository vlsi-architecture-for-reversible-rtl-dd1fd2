// tb_peres_full_adder: exhaustive check of the two-Peres-gate full adder.
//
// For all 8 inputs {cout, sum} must equal a + b + cin; the garbage lines
// must carry a and cin.
module tb_peres_full_adder;
  logic a, b, cin, sum, cout;
  logic [1:0] garbage;
  int checks = 0, failures = 0;

  peres_full_adder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if ({cout, sum} != 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL sum: a=%b b=%b cin=%b -> cout=%b sum=%b", a, b, cin, cout, sum);
      end
      checks++;
      if (garbage != {cin, a}) begin
        failures++;
        $display("FAIL garbage: %b", garbage);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_peres_gate: exhaustive check of the Peres gate.
//
// All 8 inputs. With c = 0 the gate must be a half adder ({r, q} = a + b);
// with c = 1, r is inverted. p copies a, and the mapping must be a
// permutation of the 8 codes.
module tb_peres_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  bit [7:0] seen;

  peres_gate dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: abc=%b%b%b pqr=%b%b%b", what, a, b, c, p, q, r);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      check({r ^ c, q} == 2'(int'(a) + int'(b)), "half adder");
      check(p == a, "p = a");
      seen[{p, q, r}] = 1'b1;
    end
    check(&seen, "reversible");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tr_gate: exhaustive check of the TR gate.
//
// Fed (b, a, 0) the gate must act as the half subtractor a - b: q is the
// difference bit and r the borrow. With the third input 1, r is inverted.
// p copies the first input and the mapping must be a permutation.
module tb_tr_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  bit [7:0] seen;

  tr_gate dut (.*);

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
    int diff;
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      // a is the subtrahend, b the minuend: b - a.
      diff = int'(b) - int'(a);
      check(q == diff[0], "difference");
      check((r ^ c) == (diff < 0), "borrow");
      check(p == a, "p = a");
      seen[{p, q, r}] = 1'b1;
    end
    check(&seen, "reversible");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dkg_gate: exhaustive check of the DKG gate.
//
// All 16 input combinations. The expected outputs come from arithmetic, not
// from the gate equations: with p = 0, {c, d} must equal q + r + s; with
// p = 1, d must be the low bit of q - r - s and c its borrow. a must copy q,
// and the 4-in/4-out mapping must be a permutation (reversibility).
module tb_dkg_gate;
  logic p, q, r, s, a, b, c, d;
  int checks = 0, failures = 0;
  bit [15:0] seen;

  dkg_gate dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: pqrs=%b%b%b%b abcd=%b%b%b%b", what, p, q, r, s, a, b, c, d);
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
    for (int v = 0; v < 16; v++) begin
      int diff;
      {p, q, r, s} = 4'(v);
      #1;
      if (!p) check({c, d} == 2'(int'(q) + int'(r) + int'(s)), "full adder");
      else begin
        diff = int'(q) - int'(r) - int'(s);
        check(d == diff[0] && c == (diff < 0), "full subtractor");
      end
      check(a == q, "garbage a");
      seen[{a, b, c, d}] = 1'b1;
    end
    check(&seen, "reversible (outputs form a permutation)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

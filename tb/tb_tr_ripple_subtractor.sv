// tb_tr_ripple_subtractor: TR-gate ripple subtractor against integer
// subtraction.
//
// 4-bit default exhaustively, 12-bit on 2000 random operands. Expected:
// diff = (a - b - bin) mod 2^WIDTH and bout = 1 exactly when a - b - bin < 0.
module tb_tr_ripple_subtractor;
  logic [3:0]  a4, b4, d4;
  logic        b4i, b4o;
  logic [11:0] a12, b12, d12;
  logic        b12i, b12o;
  int checks = 0, failures = 0;

  tr_ripple_subtractor dut4 (.a(a4), .b(b4), .bin(b4i), .diff(d4), .bout(b4o));
  tr_ripple_subtractor #(.WIDTH(12)) dut12 (.a(a12), .b(b12), .bin(b12i), .diff(d12), .bout(b12o));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int v = 0; v < 512; v++) begin
      {b4i, a4, b4} = 9'(v);
      #1;
      e = int'(a4) - int'(b4) - int'(b4i);
      checks++;
      if (d4 != 4'(e) || b4o != (e < 0)) begin
        failures++;
        $display("FAIL 4-bit: %0d - %0d - %0d -> %0d borrow %b", a4, b4, b4i, d4, b4o);
      end
    end
    for (int v = 0; v < 2000; v++) begin
      a12 = 12'($urandom); b12 = 12'($urandom); b12i = 1'($urandom);
      #1;
      e = int'(a12) - int'(b12) - int'(b12i);
      checks++;
      if (d12 != 12'(e) || b12o != (e < 0)) begin
        failures++;
        $display("FAIL 12-bit: %0d - %0d - %0d -> %0d borrow %b", a12, b12, b12i, d12, b12o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dkg_addsub: the DKG adder/subtractor in both modes.
//
// The 4-bit default is checked exhaustively over mode, x, y and cin:
// mode 0 must give {cout, sd} = x + y + cin, mode 1 sd = x - y - cin with
// cout the borrow. The even garbage lines must copy x. A 12-bit instance is
// checked on random operands with the mode switching every vector.
module tb_dkg_addsub;
  logic        mode4, cin4, cout4;
  logic [3:0]  x4, y4, sd4;
  logic [7:0]  g4;
  logic        mode12, cin12, cout12;
  logic [11:0] x12, y12, sd12;
  logic [23:0] g12;
  int checks = 0, failures = 0;
  int adds = 0, subs = 0;

  dkg_addsub dut4 (.mode(mode4), .x(x4), .y(y4), .cin(cin4), .sd(sd4), .cout(cout4), .garbage(g4));
  dkg_addsub #(.WIDTH(12)) dut12 (.mode(mode12), .x(x12), .y(y12), .cin(cin12),
                                  .sd(sd12), .cout(cout12), .garbage(g12));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int v = 0; v < 1024; v++) begin
      {mode4, cin4, x4, y4} = 10'(v);
      #1;
      if (!mode4) e = int'(x4) + int'(y4) + int'(cin4);
      else        e = int'(x4) - int'(y4) - int'(cin4);
      check(sd4 == 4'(e), $sformatf("4-bit mode %b %0d,%0d,%0d sd=%0d", mode4, x4, y4, cin4, sd4));
      check(cout4 == (mode4 ? (e < 0) : (e > 15)), $sformatf("4-bit carry/borrow mode %b", mode4));
      check({g4[6], g4[4], g4[2], g4[0]} == x4, "garbage copies x");
    end
    for (int v = 0; v < 2000; v++) begin
      mode12 = 1'(v); x12 = 12'($urandom); y12 = 12'($urandom); cin12 = 1'($urandom);
      #1;
      if (!mode12) begin e = int'(x12) + int'(y12) + int'(cin12); adds++; end
      else begin         e = int'(x12) - int'(y12) - int'(cin12); subs++; end
      check(sd12 == 12'(e) && cout12 == (mode12 ? (e < 0) : (e > 4095)),
            $sformatf("12-bit mode %b %0d,%0d -> %0d", mode12, x12, y12, sd12));
    end
    check(adds > 0 && subs > 0, "both modes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

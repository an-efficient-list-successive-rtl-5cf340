// tb_mpe: checks the LL-based MPE against integer max-log F and G formulas
// on random LL pairs, for every us / ctrl combination.
module tb_mpe;
  localparam int W = 11;
  logic [1:0][W-1:0] a, b, f, g0, g1, yo;
  logic us, ctrl;
  int checks = 0, failures = 0;

  mpe #(.W(W)) dut (.a(a), .b(b), .us(us), .ctrl(ctrl), .f(f), .g0(g0), .g1(g1), .y(yo));

  function automatic int mx(input int p, input int q);
    return p >= q ? p : q;
  endfunction

  task automatic chk(input logic [W-1:0] got, input int want, input string what);
    checks++;
    if ($signed(got) != want) begin
      failures++;
      $display("FAIL %s: got %0d want %0d", what, $signed(got), want);
    end
  endtask

  initial begin
    for (int it = 0; it < 2000; it++) begin
      int a0, a1, b0, b1, ef0, ef1, ey0, ey1;
      a0 = int'($urandom_range(0, 1000)) - 500;
      a1 = int'($urandom_range(0, 1000)) - 500;
      b0 = int'($urandom_range(0, 1000)) - 500;
      b1 = int'($urandom_range(0, 1000)) - 500;
      if (it % 7 == 0 && b0 + a0 - a1 >= -500 && b0 + a0 - a1 <= 500)
        b1 = b0 + a0 - a1;                  // equal sums: tie in C&S
      a[0] = W'(a0); a[1] = W'(a1); b[0] = W'(b0); b[1] = W'(b1);
      us = 1'($urandom_range(0, 1));
      ctrl = 1'($urandom_range(0, 1));
      #1;
      ef0 = mx(a0 + b0, a1 + b1);
      ef1 = mx(a0 + b1, a1 + b0);
      chk(f[0], ef0, "F0");
      chk(f[1], ef1, "F1");
      chk(g0[0], a0 + b0, "G0_0");
      chk(g0[1], a1 + b1, "G0_1");
      chk(g1[0], a1 + b0, "G1_0");
      chk(g1[1], a0 + b1, "G1_1");
      if (!ctrl)   begin ey0 = ef0;     ey1 = ef1;     end
      else if (us) begin ey0 = a1 + b0; ey1 = a0 + b1; end
      else         begin ey0 = a0 + b0; ey1 = a1 + b1; end
      chk(yo[0], ey0, "Y0");
      chk(yo[1], ey1, "Y1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

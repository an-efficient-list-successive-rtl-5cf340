// tb_stage1_block: loads random channel LL pairs into the shared stage 1 and
// checks every stored F/G0/G1 result against integer formulas (MPE k pairs
// inputs k and k+N/2), then checks that the registers hold while en is low.
module tb_stage1_block;
  localparam int N = 32, W = 11;
  logic clk = 0, rst_n = 0, en = 0;
  logic [N-1:0][1:0][W-1:0] y;
  logic [N/2-1:0][1:0][W-1:0] f, g0, g1;
  int checks = 0, failures = 0;
  int yv[N][2];

  always #5 clk = ~clk;
  stage1_block #(.N(N), .W(W)) dut (.clk(clk), .rst_n(rst_n), .en(en), .y(y), .f(f), .g0(g0), .g1(g1));

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

  task automatic check_all();
    for (int k = 0; k < N / 2; k++) begin
      int a0 = yv[k][0], a1 = yv[k][1], b0 = yv[k + N/2][0], b1 = yv[k + N/2][1];
      chk(f[k][0], mx(a0 + b0, a1 + b1), $sformatf("F0[%0d]", k));
      chk(f[k][1], mx(a0 + b1, a1 + b0), $sformatf("F1[%0d]", k));
      chk(g0[k][0], a0 + b0, "G0_0");
      chk(g0[k][1], a1 + b1, "G0_1");
      chk(g1[k][0], a1 + b0, "G1_0");
      chk(g1[k][1], a0 + b1, "G1_1");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 20; it++) begin
      @(negedge clk);
      for (int k = 0; k < N; k++)
        for (int v = 0; v < 2; v++) begin
          yv[k][v] = int'($urandom_range(0, 63)) - 32;
          y[k][v] = W'(yv[k][v]);
        end
      en = 1;
      @(negedge clk);
      en = 0;
      check_all();
      // new inputs without en must not change the stored results
      for (int k = 0; k < N; k++) y[k] = ~y[k];
      @(negedge clk);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

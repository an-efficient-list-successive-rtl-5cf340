// tb_stage2_block: drives random stage 1 results into the five shared stage 2
// blocks and checks stage2_F (written by en_f) and stage2_G00..G11 (written
// by en_g), including that each enable writes only its own blocks.
module tb_stage2_block;
  localparam int N = 32, W = 11, K = N / 4;
  logic clk = 0, rst_n = 0, en_f = 0, en_g = 0;
  logic [N/2-1:0][1:0][W-1:0] s1_f, s1_g0, s1_g1;
  logic [4:0][K-1:0][1:0][W-1:0] f, g0, g1;
  int checks = 0, failures = 0;
  int vf[N/2][2], vg[2][N/2][2];

  always #5 clk = ~clk;
  stage2_block #(.N(N), .W(W)) dut (.clk(clk), .rst_n(rst_n), .en_f(en_f), .en_g(en_g),
    .s1_f(s1_f), .s1_g0(s1_g0), .s1_g1(s1_g1), .f(f), .g0(g0), .g1(g1));

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


  task automatic check_block(input int blk, input int j, input int a0, input int a1,
                             input int b0, input int b1);
    chk(f[blk][j][0], mx(a0 + b0, a1 + b1), $sformatf("blk%0d F0[%0d]", blk, j));
    chk(f[blk][j][1], mx(a0 + b1, a1 + b0), $sformatf("blk%0d F1[%0d]", blk, j));
    chk(g0[blk][j][0], a0 + b0, $sformatf("blk%0d G00[%0d]", blk, j));
    chk(g0[blk][j][1], a1 + b1, $sformatf("blk%0d G01[%0d]", blk, j));
    chk(g1[blk][j][0], a1 + b0, $sformatf("blk%0d G10[%0d]", blk, j));
    chk(g1[blk][j][1], a0 + b1, $sformatf("blk%0d G11[%0d]", blk, j));
  endtask

  task automatic randomize_inputs();
    for (int k = 0; k < N / 2; k++)
      for (int v = 0; v < 2; v++) begin
        vf[k][v]    = int'($urandom_range(0, 255)) - 128;
        vg[0][k][v] = int'($urandom_range(0, 255)) - 128;
        vg[1][k][v] = int'($urandom_range(0, 255)) - 128;
        s1_f[k][v]  = W'(vf[k][v]);
        s1_g0[k][v] = W'(vg[0][k][v]);
        s1_g1[k][v] = W'(vg[1][k][v]);
      end
  endtask

  initial begin
    int fsave[N/2][2];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 10; it++) begin
      // first activation: F block only
      @(negedge clk);
      randomize_inputs();
      fsave = vf;
      en_f = 1;
      @(negedge clk);
      en_f = 0;
      for (int j = 0; j < K; j++)
        check_block(0, j, fsave[j][0], fsave[j][1], fsave[j + K][0], fsave[j + K][1]);
      // second activation: the four G blocks, with new stage 1 data
      randomize_inputs();
      en_g = 1;
      @(negedge clk);
      en_g = 0;
      for (int blk = 1; blk < 5; blk++) begin
        int ua, ub;
        ua = (blk - 1) >> 1;
        ub = (blk - 1) & 1;
        for (int j = 0; j < K; j++)
          check_block(blk, j, vg[ua][j][0], vg[ua][j][1], vg[ub][j + K][0], vg[ub][j + K][1]);
      end
      // the F block kept its first-activation values
      for (int j = 0; j < K; j++)
        check_block(0, j, fsave[j][0], fsave[j][1], fsave[j + K][0], fsave[j + K][1]);
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

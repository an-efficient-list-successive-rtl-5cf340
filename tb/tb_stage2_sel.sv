// tb_stage2_sel: fills the stage 2 memories with distinct random values and
// checks that every m1/m2 setting and random partial sums pick the right
// block (F, or G by bl1[j], bl1[j+N/4]) and the right output (F, or G by bl2).
module tb_stage2_sel;
  localparam int N = 32, W = 11, K = N / 4;
  logic [4:0][K-1:0][1:0][W-1:0] s2_f, s2_g0, s2_g1;
  logic m1, m2;
  logic [N/2-1:0] bl1;
  logic [K-1:0] bl2;
  logic [K-1:0][1:0][W-1:0] node;
  int checks = 0, failures = 0;

  stage2_sel #(.N(N), .W(W)) dut (.s2_f(s2_f), .s2_g0(s2_g0), .s2_g1(s2_g1), .m1(m1), .m2(m2),
    .bl1(bl1), .bl2(bl2), .node(node));

  initial begin
    for (int it = 0; it < 400; it++) begin
      for (int blk = 0; blk < 5; blk++)
        for (int j = 0; j < K; j++)
          for (int v = 0; v < 2; v++) begin
            s2_f[blk][j][v]  = W'($urandom);
            s2_g0[blk][j][v] = W'($urandom);
            s2_g1[blk][j][v] = W'($urandom);
          end
      m1  = it[0];
      m2  = it[1];
      bl1 = N'($urandom);
      bl2 = K'($urandom);
      #1;
      for (int j = 0; j < K; j++) begin
        int blk;
        logic [1:0][W-1:0] want;
        blk = m1 ? 1 + 2 * int'(bl1[j]) + int'(bl1[j + K]) : 0;
        want = !m2 ? s2_f[blk][j] : (bl2[j] ? s2_g1[blk][j] : s2_g0[blk][j]);
        checks++;
        if (node[j] !== want) begin
          failures++;
          $display("FAIL it %0d j %0d m1 %0b m2 %0b", it, j, m1, m2);
        end
      end
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

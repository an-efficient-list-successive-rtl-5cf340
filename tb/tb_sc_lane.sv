// tb_sc_lane: one list path's private stages 3..5 (N = 32). Runs stage 3 on a
// random depth-2 node, stage 4 and the last stage with random m and partial
// sums, and checks the stored M registers and the last-stage outputs against
// an integer model; then checks that ld copies a whole register set.
module tb_sc_lane;
  import polar_pkg::*;
  localparam int N = 32, W = 11, NS = 5, NM = 6;
  logic clk = 0, rst_n = 0;
  logic [NS:1] act = '0;
  logic [NS-1:1] m = '0;
  logic [N-3:0] bl = '0;
  logic [N/4-1:0][1:0][W-1:0] node3;
  logic ld = 0;
  logic [NM-1:0][1:0][W-1:0] ld_f, ld_g0, ld_g1, f, g0, g1;
  logic [1:0][W-1:0] lf, lg0, lg1;
  int checks = 0, failures = 0;
  int ef[NM][2], eg0[NM][2], eg1[NM][2];

  always #5 clk = ~clk;
  sc_lane #(.N(N), .W(W)) dut (.clk(clk), .rst_n(rst_n), .act(act), .m(m), .bl(bl),
    .node3(node3), .ld(ld), .ld_f(ld_f), .ld_g0(ld_g0), .ld_g1(ld_g1),
    .f(f), .g0(g0), .g1(g1), .last_f(lf), .last_g0(lg0), .last_g1(lg1));

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

  // expected MPE results of (a, b) into slot idx of the model
  task automatic model(input int idx, input int a0, input int a1, input int b0, input int b1);
    ef[idx][0]  = mx(a0 + b0, a1 + b1);
    ef[idx][1]  = mx(a0 + b1, a1 + b0);
    eg0[idx][0] = a0 + b0;
    eg0[idx][1] = a1 + b1;
    eg1[idx][0] = a1 + b0;
    eg1[idx][1] = a0 + b1;
  endtask

  task automatic check_regs(input int from, input int to);
    for (int i = from; i < to; i++)
      for (int v = 0; v < 2; v++) begin
        chk(f[i][v], ef[i][v], $sformatf("F[%0d][%0d]", i, v));
        chk(g0[i][v], eg0[i][v], $sformatf("G0[%0d][%0d]", i, v));
        chk(g1[i][v], eg1[i][v], $sformatf("G1[%0d][%0d]", i, v));
      end
  endtask

  // depth-(s-1) node value k taken from model slot base+k
  function automatic int pick(input int base, input int k, input bit mm, input bit b, input int v);
    if (!mm) return ef[base + k][v];
    return b ? eg1[base + k][v] : eg0[base + k][v];
  endfunction

  initial begin
    int n3[8][2];
    int nd[4][2];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 40; it++) begin
      // stage 3
      @(negedge clk);
      for (int k = 0; k < 8; k++)
        for (int v = 0; v < 2; v++) begin
          n3[k][v] = int'($urandom_range(0, 255)) - 128;
          node3[k][v] = W'(n3[k][v]);
        end
      act = '0; act[3] = 1;
      @(negedge clk);
      act = '0;
      for (int j = 0; j < 4; j++) model(stg_off(N, 3) + j, n3[j][0], n3[j][1], n3[j + 4][0], n3[j + 4][1]);
      check_regs(0, 4);
      // stage 4
      m  = NS'($urandom);
      bl = (N-2)'({$urandom, $urandom});
      for (int k = 0; k < 4; k++)
        for (int v = 0; v < 2; v++) nd[k][v] = pick(stg_off(N, 3), k, m[3], bl[bl_off(N, 3) + k], v);
      act[4] = 1;
      @(negedge clk);
      act = '0;
      for (int j = 0; j < 2; j++) model(stg_off(N, 4) + j, nd[j][0], nd[j][1], nd[j + 2][0], nd[j + 2][1]);
      check_regs(0, 6);
      // last stage (combinational)
      m  = NS'($urandom);
      bl = (N-2)'({$urandom, $urandom});
      act[5] = 1;
      #1;
      begin
        int a0, a1, b0, b1;
        a0 = pick(stg_off(N, 4), 0, m[4], bl[bl_off(N, 4)], 0);
        a1 = pick(stg_off(N, 4), 0, m[4], bl[bl_off(N, 4)], 1);
        b0 = pick(stg_off(N, 4), 1, m[4], bl[bl_off(N, 4) + 1], 0);
        b1 = pick(stg_off(N, 4), 1, m[4], bl[bl_off(N, 4) + 1], 1);
        chk(lf[0], mx(a0 + b0, a1 + b1), "last F0");
        chk(lf[1], mx(a0 + b1, a1 + b0), "last F1");
        chk(lg0[0], a0 + b0, "last G0_0");
        chk(lg0[1], a1 + b1, "last G0_1");
        chk(lg1[0], a1 + b0, "last G1_0");
        chk(lg1[1], a0 + b1, "last G1_1");
      end
      @(negedge clk);
      act = '0;
      check_regs(0, 6);       // the last stage stores nothing
      // path copy
      if (it % 4 == 3) begin
        for (int i = 0; i < NM; i++)
          for (int v = 0; v < 2; v++) begin
            ef[i][v]  = int'($urandom_range(0, 255)) - 128;
            eg0[i][v] = int'($urandom_range(0, 255)) - 128;
            eg1[i][v] = int'($urandom_range(0, 255)) - 128;
            ld_f[i][v]  = W'(ef[i][v]);
            ld_g0[i][v] = W'(eg0[i][v]);
            ld_g1[i][v] = W'(eg1[i][v]);
          end
        ld = 1;
        @(negedge clk);
        ld = 0;
        check_regs(0, 6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

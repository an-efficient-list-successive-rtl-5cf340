// tb_feedback_part: decides random bit pairs for a whole N = 32 codeword,
// feeding each path state back as its own parent, and after every pair checks
// the decoded bits and, at every depth, the stored partial sums against the
// polar transform of the bits of the last completed left node at that depth.
// A second phase updates from an unrelated parent state and checks that
// partial sums of depths the walk does not reach come from that parent.
module tb_feedback_part;
  import polar_pkg::*;
  import scl_ref_pkg::*;
  localparam int N = 32, NS = 5;
  logic clk = 0, rst_n = 0, init = 0, upd = 0;
  logic [NS-2:0] t = '0;
  logic u1 = 0, u2 = 0;
  logic [N-3:0] par_bl, bl;
  logic [N-1:0] par_u, u;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  feedback_part #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .init(init), .upd(upd), .t(t),
    .u1(u1), .u2(u2), .par_bl(par_bl), .par_u(par_u), .bl(bl), .u(u));

  assign par_u  = u;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  logic [N-3:0] ext_bl;
  logic         use_ext = 0;
  assign par_bl = use_ext ? ext_bl : bl;

  initial begin
    bit ub[N];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 6; rep++) begin
      @(negedge clk);
      init = 1;
      @(negedge clk);
      init = 0;
      chk(bl == '0 && u == '0, "init clears state");
      for (int tt = 0; tt < N / 2; tt++) begin
        t  = (NS-1)'(tt);
        u1 = 1'($urandom_range(0, 1));
        u2 = 1'($urandom_range(0, 1));
        ub[2*tt] = u1;
        ub[2*tt+1] = u2;
        upd = 1;
        @(negedge clk);
        upd = 0;
        for (int i = 0; i <= 2 * tt + 1; i++)
          chk(u[i] == ub[i], $sformatf("u[%0d] after pair %0d", i, tt));
        for (int d = 1; d < NS; d++) begin
          int sz, e;
          sz = N >> d;
          // last completed node at depth d with an even (left) index
          e = -1;
          for (int c = 0; (c + 1) * sz <= 2 * tt + 2; c++)
            if (c % 2 == 0) e = c;
          if (e >= 0) begin
            bvec_t seg, x;
            seg = new[sz];
            for (int k = 0; k < sz; k++) seg[k] = ub[e * sz + k];
            x = encode(seg);
            for (int k = 0; k < sz; k++)
              chk(bl[bl_off(N, d) + k] == x[k], $sformatf("pair %0d depth %0d sum %0d", tt, d, k));
          end
        end
      end
    end
    // update from a foreign parent: pair t = 5 (binary 0101) is a right
    // child at depth 4, a left one at depth 3, so depths 1 and 2 and the
    // depth-4 sums are the parent's, while depth 3 gets new values.
    for (int rep = 0; rep < 20; rep++) begin
      @(negedge clk);
      ext_bl  = (N-2)'({$urandom, $urandom});
      use_ext = 1;
      t  = 4'd5;
      u1 = 1'($urandom_range(0, 1));
      u2 = 1'($urandom_range(0, 1));
      upd = 1;
      @(negedge clk);
      upd = 0;
      use_ext = 0;
      for (int k = 0; k < 16; k++) chk(bl[bl_off(N, 1) + k] == ext_bl[bl_off(N, 1) + k], "depth 1 from parent");
      for (int k = 0; k < 8; k++)  chk(bl[bl_off(N, 2) + k] == ext_bl[bl_off(N, 2) + k], "depth 2 from parent");
      for (int k = 0; k < 2; k++)  chk(bl[bl_off(N, 4) + k] == ext_bl[bl_off(N, 4) + k], "depth 4 from parent");
      chk(bl[bl_off(N, 3) + 0] == (ext_bl[bl_off(N, 4)] ^ u1 ^ u2), "depth 3 sum 0");
      chk(bl[bl_off(N, 3) + 1] == (ext_bl[bl_off(N, 4) + 1] ^ u2), "depth 3 sum 1");
      chk(bl[bl_off(N, 3) + 2] == (u1 ^ u2), "depth 3 sum 2");
      chk(bl[bl_off(N, 3) + 3] == u2, "depth 3 sum 3");
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

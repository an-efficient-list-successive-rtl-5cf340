// scl_decoder: list successive cancellation (SCL) decoder for polar codes
// with merged-processing-element sharing (MPES).
//
// A conventional SCL decoder of list size L holds L complete SC decoders.
// Here the first two stages, which hold about three quarters of all MPEs,
// are shared:
//   stage1_block   one stage 1 (N/2 MPEs) for all paths, since every path
//                  sees the same channel values;
//   stage2_block   five stage 2 blocks (5 x N/4 MPEs): stage2_F on the F
//                  outputs of stage 1 and stage2_G00..G11 on the four
//                  combinations of stage 1 G outputs;
//   stage2_sel     per path, picks its stage 3 input from those memories with
//                  its own partial sums;
//   sc_lane        per path, the ordinary stages 3 .. log2 N;
//   feedback_part  per path, partial sums and decoded bits;
//   metric_sort    keeps the L best of the 4L two-bit extensions;
//   scl_controller the stage schedule (one stage per cycle, N-1 cycles).
// MPE count: N/2 + 5N/4 + L(N/4-1) instead of L(N-1).
//
// Soft values are log-likelihood pairs (see polar_pkg). The decoder decides
// two bits per last-stage cycle: every path proposes the four values of
// (u_2t, u_2t+1) with their joint log-likelihoods, metric_sort keeps the best
// L, and each surviving slot copies the lane registers and feedback state of
// its parent path in the same clock edge.
//
// Interface: y holds the N channel LL pairs (Q-bit signed, element 0 =
// LL(bit 0)), frozen marks frozen bit positions (u_i of a frozen position is
// always 0). Both are sampled in the cycle start is high; stage 1 runs in
// that cycle. busy is high for the next N-2 cycles; done pulses one cycle
// after the last pair, and u_hat (the decided bit vector u_1..u_N, bit i-1 =
// u_i) and metric (its log-likelihood) then hold until the next start.
// Bit order is the natural-order polar transform x = u * F^(kron n), with
// F = [1 0; 1 1]; stage 1 MPE k pairs channel values k and k+N/2.
//
// The sharing of stages 1 and 2, the MPE count and the per-stage schedule
// follow the published MPES architecture. The LL-pair metric, the sorter,
// path copying, word widths, the handshake and the lockstep timing (N-1
// cycles instead of the published N + 4L - 6) are this design's own.
module scl_decoder
  import polar_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT,
  parameter int unsigned L = L_DEFAULT,
  parameter int unsigned Q = Q_DEFAULT,
  parameter int unsigned W = Q + $clog2(N),
  localparam int unsigned NS  = $clog2(N),
  localparam int unsigned NM  = lane_mpes(N),
  localparam int unsigned NMA = (NM > 0) ? NM : 1,
  localparam int unsigned C   = 4 * L,
  localparam int unsigned CB  = $clog2(C)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [N-1:0][1:0][Q-1:0]   y,
  input  logic [N-1:0]               frozen,
  output logic                       busy,
  output logic                       done,
  output logic [N-1:0]               u_hat,
  output logic [W-1:0]               metric
);
  // ---------------- control ----------------
  logic [NS:1]   act;
  logic [NS-2:0] t;
  logic [NS-1:1] m;
  logic          en_s2f, en_s2g, dec;
  logic [N-1:0]  frozen_q;

  scl_controller #(.N(N)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .act(act), .t(t),
    .m(m), .en_s2f(en_s2f), .en_s2g(en_s2g), .dec(dec), .last(),
    .done(done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        frozen_q <= '0;
    else if (act[1])   frozen_q <= frozen;
  end

  // ---------------- shared stages 1 and 2 ----------------
  logic [N-1:0][1:0][W-1:0]       yw;
  logic [N/2-1:0][1:0][W-1:0]     s1_f, s1_g0, s1_g1;
  logic [4:0][N/4-1:0][1:0][W-1:0] s2_f, s2_g0, s2_g1;

  always_comb begin
    for (int k = 0; k < int'(N); k++)
      for (int v = 0; v < 2; v++)
        yw[k][v] = W'($signed(y[k][v]));
  end

  stage1_block #(.N(N), .W(W)) u_stage1 (
    .clk(clk), .rst_n(rst_n), .en(act[1]), .y(yw),
    .f(s1_f), .g0(s1_g0), .g1(s1_g1)
  );

  stage2_block #(.N(N), .W(W)) u_stage2 (
    .clk(clk), .rst_n(rst_n), .en_f(en_s2f), .en_g(en_s2g),
    .s1_f(s1_f), .s1_g0(s1_g0), .s1_g1(s1_g1),
    .f(s2_f), .g0(s2_g0), .g1(s2_g1)
  );

  // ---------------- per-path state ----------------
  logic [L-1:0][NMA-1:0][1:0][W-1:0] ln_f, ln_g0, ln_g1;
  logic [L-1:0][1:0][W-1:0]          lst_g0, lst_g1;
  logic [L-1:0][N-3:0]               fb_bl;
  logic [L-1:0][N-1:0]               fb_u;
  logic [L-1:0]                      pv;      // path valid
  logic [W-1:0]                      pm0;     // metric of the best path

  // sorting
  logic [C-1:0][W-1:0]  cm;
  logic [C-1:0]         cv;
  logic [L-1:0][CB-1:0] sel_idx;
  logic [L-1:0]         sel_v;
  logic [L-1:0][W-1:0]  sel_m;
  logic                 fz1, fz2;

  assign fz1 = frozen_q[2*t];
  assign fz2 = frozen_q[2*t + 1];

  for (genvar p = 0; p < int'(L); p++) begin : g_path
    logic [N/4-1:0][1:0][W-1:0] node3;
    logic [CB-3:0]              par;
    logic [1:0][W-1:0]          lf_unused;

    assign par = sel_idx[p][CB-1:2];

    stage2_sel #(.N(N), .W(W)) u_sel (
      .s2_f(s2_f), .s2_g0(s2_g0), .s2_g1(s2_g1), .m1(m[1]), .m2(m[2]),
      .bl1(fb_bl[p][bl_off(N, 1) +: N/2]), .bl2(fb_bl[p][bl_off(N, 2) +: N/4]),
      .node(node3)
    );

    sc_lane #(.N(N), .W(W)) u_lane (
      .clk(clk), .rst_n(rst_n), .act(act), .m(m), .bl(fb_bl[p]),
      .node3(node3), .ld(dec && sel_v[p]),
      .ld_f(ln_f[par]), .ld_g0(ln_g0[par]), .ld_g1(ln_g1[par]),
      .f(ln_f[p]), .g0(ln_g0[p]), .g1(ln_g1[p]),
      .last_f(lf_unused), .last_g0(lst_g0[p]), .last_g1(lst_g1[p])
    );

    feedback_part #(.N(N)) u_fb (
      .clk(clk), .rst_n(rst_n), .init(act[1]), .upd(dec && sel_v[p]),
      .t(t), .u1(sel_idx[p][1]), .u2(sel_idx[p][0]),
      .par_bl(fb_bl[par]), .par_u(fb_u[par]),
      .bl(fb_bl[p]), .u(fb_u[p])
    );

    // the four extensions of this path
    for (genvar c = 0; c < 4; c++) begin : g_cand
      assign cm[4*p + c] = (c >= 2) ? lst_g1[p][c % 2] : lst_g0[p][c % 2];
      assign cv[4*p + c] = pv[p] && !(fz1 && (c >= 2)) && !(fz2 && (c % 2 == 1));
    end
  end

  metric_sort #(.L(L), .W(W)) u_sort (
    .cm(cm), .cv(cv), .sel_idx(sel_idx), .sel_v(sel_v), .sel_m(sel_m)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pv  <= '0;
      pm0 <= '0;
    end else if (act[1]) begin
      pv    <= '0;
      pv[0] <= 1'b1;    // decoding starts from a single empty path
      pm0   <= '0;
    end else if (dec) begin
      pv  <= sel_v;
      pm0 <= sel_m[0];
    end
  end

  assign u_hat  = fb_u[0];
  assign metric = pm0;

  // At least one path always survives a sort.
  a_alive: assert property (@(posedge clk) disable iff (!rst_n) dec |-> sel_v[0]);
endmodule

// scl_harness: stimulus and checking for one scl_decoder instance.
//
// Drives NCW codewords into the decoder it is wired to and checks each result
// against scl_ref_pkg: the decided bits, the path metric and the latency of
// N-1 cycles from start to done. Codewords rotate through four kinds:
//   0 noiseless BPSK with a Bhattacharyya-constructed rate-1/2 frozen set
//     (the decision must also equal the transmitted word),
//   1 noisy BPSK, same frozen set,
//   2 very noisy BPSK with a random frozen set,
//   3 arbitrary LL pairs (both elements random) with a random frozen set.
// The probe inputs are hierarchical views of the decoder's internals, used
// to count how often each mechanism of the architecture was exercised; a
// mechanism that never happens counts as a failure. Results are reported
// through checks/failures when fin goes high.
module scl_harness
  import scl_ref_pkg::*;
#(
  parameter int N   = 32,
  parameter int L   = 8,
  parameter int Q   = 6,
  parameter int NCW = 40,
  parameter int SEED = 1,
  localparam int NS = $clog2(N),
  localparam int W  = Q + NS,
  localparam int C  = 4 * L,
  localparam int CB = $clog2(C)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  output logic                     start,
  output logic [N-1:0][1:0][Q-1:0] y,
  output logic [N-1:0]             frozen,
  input  logic                     busy,
  input  logic                     done,
  input  logic [N-1:0]             u_hat,
  input  logic [W-1:0]             metric,
  // probes
  input  logic [NS:1]              p_act,
  input  logic [NS-1:1]            p_m,
  input  logic [L-1:0]             p_pv,
  input  logic [L-1:0][N-3:0]      p_bl,
  input  logic                     p_dec,
  input  logic [C-1:0]             p_cv,
  input  logic [L-1:0][CB-1:0]     p_sel_idx,
  input  logic [L-1:0]             p_sel_v,
  input  logic                     p_fz1,
  input  logic                     p_fz2,
  output int                       checks,
  output int                       failures,
  output logic                     fin
);
  // mechanism counters
  int n_type1, n_type2, n_prune, n_full, n_dup, n_drop;
  int n_fz_both, n_fz_one, n_fz_none, n_busy;
  int n_gblk[4];
  int n_biterr_noisy;

  always @(negedge clk) begin
    if (rst_n) begin
      if (busy) n_busy++;
      if (p_act[3]) begin
        if (p_m[1]) n_type2++;
        else        n_type1++;
      end
      if (p_act[3] && p_m[1])
        for (int p = 0; p < L; p++)
          if (p_pv[p])
            for (int j = 0; j < N / 4; j++)
              n_gblk[{p_bl[p][j], p_bl[p][j + N/4]}]++;
      if (p_dec) begin
        bit dup, drop;
        if ($countones(p_cv) > L) n_prune++;
        if (&p_sel_v) n_full++;
        dup  = 0;
        drop = 0;
        for (int a = 0; a < L; a++)
          for (int b = a + 1; b < L; b++)
            if (p_sel_v[a] && p_sel_v[b] && p_sel_idx[a][CB-1:2] == p_sel_idx[b][CB-1:2])
              dup = 1;
        // a valid path with no surviving child
        for (int p = 0; p < L; p++) begin
          bit kept;
          kept = 0;
          for (int a = 0; a < L; a++)
            if (p_sel_v[a] && int'(p_sel_idx[a][CB-1:2]) == p) kept = 1;
          if (p_pv[p] && !kept) drop = 1;
        end
        if (dup)  n_dup++;
        if (drop) n_drop++;
        if (p_fz1 && p_fz2)      n_fz_both++;
        else if (p_fz1 || p_fz2) n_fz_one++;
        else                     n_fz_none++;
      end
    end
  end

  function automatic int clip(input int v);
    int lo = -(1 << (Q - 1));
    int hi = (1 << (Q - 1)) - 1;
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL N=%0d L=%0d: %s", N, L, what);
    end
  endtask

  initial begin
    bvec_t fr_good, fr, u, x, uref;
    ivec_t y0, y1;
    int    mref, seed, k;
    checks   = 0;
    failures = 0;
    fin      = 0;
    start    = 0;
    y        = '0;
    frozen   = '0;
    seed     = $urandom(SEED);
    fr_good  = construct(N, N / 2, 0.5);
    y0 = new[N];
    y1 = new[N];
    u  = new[N];
    @(posedge rst_n);
    repeat (2) @(posedge clk);
    for (int cw = 0; cw < NCW; cw++) begin
      int kind;
      kind = cw % 4;
      fr = new[N];
      for (int i = 0; i < N; i++)
        fr[i] = (kind < 2) ? fr_good[i] : ($urandom_range(0, 1) == 1);
      for (int i = 0; i < N; i++) u[i] = fr[i] ? 1'b0 : 1'($urandom_range(0, 1));
      x = encode(u);
      for (int i = 0; i < N; i++) begin
        int v, amp, noise;
        amp   = 6;
        noise = 0;
        if (kind == 1) noise = $urandom_range(0, 8) + $urandom_range(0, 8) - 8;
        if (kind == 2) noise = $urandom_range(0, 16) + $urandom_range(0, 16) - 16;
        v = (x[i] ? -amp : amp) + noise;
        if (kind == 3) begin
          y0[i] = clip(int'($urandom_range(0, 63)) - 32);
          y1[i] = clip(int'($urandom_range(0, 63)) - 32);
        end else begin
          y0[i] = clip((v < 0) ? v : 0);
          y1[i] = clip((v > 0) ? -v : 0);
        end
        y[i][0]   = Q'(y0[i]);
        y[i][1]   = Q'(y1[i]);
        frozen[i] = fr[i];
      end
      scl_decode(N, L, y0, y1, fr, uref, mref);

      // start pulse, then count the edges up to done
      @(negedge clk);
      start = 1;
      @(posedge clk);
      #1 start = 0;
      k = 1;
      while (!done && k < 4 * N) begin
        @(posedge clk);
        #1 k++;
      end
      check(k == N - 1, $sformatf("cw %0d latency %0d cycles, expected %0d", cw, k, N - 1));
      for (int i = 0; i < N; i++)
        check(u_hat[i] == uref[i], $sformatf("cw %0d bit %0d: got %0b want %0b", cw, i, u_hat[i], uref[i]));
      check($signed(metric) == mref, $sformatf("cw %0d metric %0d want %0d", cw, $signed(metric), mref));
      if (kind == 0)
        for (int i = 0; i < N; i++)
          check(u_hat[i] == u[i], $sformatf("cw %0d noiseless bit %0d", cw, i));
      if (kind == 1)
        for (int i = 0; i < N; i++) if (u_hat[i] != u[i]) n_biterr_noisy++;
      repeat ($urandom_range(0, 2)) @(posedge clk);
    end
    $display("N=%0d L=%0d: %0d codewords, type1 %0d type2 %0d, G00..G11 %0d %0d %0d %0d, prune %0d, full list %0d, split %0d, drop %0d, frozen pairs both/one/none %0d/%0d/%0d, noisy bit errors %0d",
             N, L, NCW, n_type1, n_type2, n_gblk[0], n_gblk[1], n_gblk[2], n_gblk[3],
             n_prune, n_full, n_dup, n_drop, n_fz_both, n_fz_one, n_fz_none, n_biterr_noisy);
    check(n_type1 > 0, "stage 2 type 1 (stage2_F) connection never used");
    check(n_type2 > 0, "stage 2 type 2 (stage2_G) connection never used");
    for (int b = 0; b < 4; b++) check(n_gblk[b] > 0, $sformatf("stage2_G%0d%0d never selected", b >> 1, b & 1));
    check(n_prune > 0, "no candidate was ever pruned");
    check(n_full > 0, "list never full");
    check(n_dup > 0, "no path ever split into two survivors");
    check(n_drop > 0, "no path was ever dropped");
    check(n_fz_both > 0 && n_fz_one > 0 && n_fz_none > 0, "not every frozen-pair kind seen");
    check(n_busy == NCW * (N - 2), $sformatf("busy cycles %0d, expected %0d", n_busy, NCW * (N - 2)));
    fin = 1;
  end
endmodule

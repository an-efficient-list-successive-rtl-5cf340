// tb_scl_configs: end-to-end decoding at the small sizes used to explain the
// architecture: N = 8 with L = 4 (smallest tree, stage 3 is the last stage
// and the lanes store nothing) and N = 8 with L = 2, plus N = 16 with L = 2
// and N = 64 with L = 4. Each instance is checked bit for bit against the
// software list decoder by its own scl_harness.
module tb_scl_configs;
  localparam int NI = 5;
  localparam int NCW = 40;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   ck[NI], fl[NI];
  logic fin[NI];

  always #5 clk = ~clk;

  `define SCL_INST(IDX, NN, LL) \
    begin : g_``IDX \
      localparam int W = 6 + $clog2(NN); \
      logic start, busy, done; \
      logic [NN-1:0][1:0][5:0] y; \
      logic [NN-1:0] frozen, u_hat; \
      logic [W-1:0] metric; \
      scl_decoder #(.N(NN), .L(LL), .Q(6)) dut ( \
        .clk(clk), .rst_n(rst_n), .start(start), .y(y), .frozen(frozen), \
        .busy(busy), .done(done), .u_hat(u_hat), .metric(metric)); \
      scl_harness #(.N(NN), .L(LL), .Q(6), .NCW(NCW), .SEED(IDX + 3)) u_h ( \
        .clk(clk), .rst_n(rst_n), .start(start), .y(y), .frozen(frozen), \
        .busy(busy), .done(done), .u_hat(u_hat), .metric(metric), \
        .p_act(dut.act), .p_m(dut.m), .p_pv(dut.pv), .p_bl(dut.fb_bl), \
        .p_dec(dut.dec), .p_cv(dut.cv), .p_sel_idx(dut.sel_idx), \
        .p_sel_v(dut.sel_v), .p_fz1(dut.fz1), .p_fz2(dut.fz2), \
        .checks(ck[IDX]), .failures(fl[IDX]), .fin(fin[IDX])); \
    end

  `SCL_INST(0, 8, 4)
  `SCL_INST(1, 8, 2)
  `SCL_INST(2, 16, 2)
  `SCL_INST(3, 64, 4)
  `SCL_INST(4, 32, 4)

  initial begin
    int checks, failures;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4]);
    checks = 0;
    failures = 0;
    for (int i = 0; i < NI; i++) begin
      checks += ck[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int checks, failures;
    repeat (NCW * 80 + 500) @(posedge clk);
    checks = 0;
    failures = 1;
    for (int i = 0; i < NI; i++) begin
      checks += ck[i];
      failures += fl[i];
    end
    $display("watchdog: a decoder did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

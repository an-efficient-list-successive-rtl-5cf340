// tb_scl_decoder: end-to-end test of the list decoder at its default size
// (N = 32, L = 8, 6-bit channel LL pairs), no parameter overrides.
// 80 codewords are decoded and compared bit for bit, metric and latency with
// a software list decoder (scl_harness, scl_ref_pkg).
module tb_scl_decoder;
  import polar_pkg::*;

  localparam int N  = N_DEFAULT;
  localparam int L  = L_DEFAULT;
  localparam int Q  = Q_DEFAULT;
  localparam int W  = Q + $clog2(N);
  localparam int NCW = 80;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start;
  logic [N-1:0][1:0][Q-1:0] y;
  logic [N-1:0] frozen;
  logic busy, done;
  logic [N-1:0] u_hat;
  logic [W-1:0] metric;
  int checks, failures;
  logic fin;

  always #5 clk = ~clk;

  scl_decoder dut (
    .clk(clk), .rst_n(rst_n), .start(start), .y(y), .frozen(frozen),
    .busy(busy), .done(done), .u_hat(u_hat), .metric(metric)
  );

  scl_harness #(.N(N), .L(L), .Q(Q), .NCW(NCW), .SEED(11)) u_h (
    .clk(clk), .rst_n(rst_n), .start(start), .y(y), .frozen(frozen),
    .busy(busy), .done(done), .u_hat(u_hat), .metric(metric),
    .p_act(dut.act), .p_m(dut.m), .p_pv(dut.pv), .p_bl(dut.fb_bl),
    .p_dec(dut.dec), .p_cv(dut.cv), .p_sel_idx(dut.sel_idx),
    .p_sel_v(dut.sel_v), .p_fz1(dut.fz1), .p_fz2(dut.fz2),
    .checks(checks), .failures(failures), .fin(fin)
  );

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCW * (N + 8) + 200) @(posedge clk);
    $display("watchdog: decoder did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

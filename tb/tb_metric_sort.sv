// tb_metric_sort: random candidate metrics (with many ties) and validity for
// L = 8; the expected survivors are found by repeated best-of selection in
// the testbench and compared slot by slot with the unit's outputs.
module tb_metric_sort;
  localparam int L = 8, W = 11, C = 4 * L, CB = $clog2(C);
  logic [C-1:0][W-1:0] cm;
  logic [C-1:0] cv;
  logic [L-1:0][CB-1:0] sel_idx;
  logic [L-1:0] sel_v;
  logic [L-1:0][W-1:0] sel_m;
  int checks = 0, failures = 0;

  metric_sort #(.L(L), .W(W)) dut (.cm(cm), .cv(cv), .sel_idx(sel_idx), .sel_v(sel_v), .sel_m(sel_m));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int it = 0; it < 500; it++) begin
      bit used[C];
      int mv[C];
      for (int i = 0; i < C; i++) begin
        mv[i] = (it % 3 == 0) ? int'($urandom_range(0, 7)) - 4 : int'($urandom_range(0, 2000)) - 1000;
        cm[i] = W'(mv[i]);
        cv[i] = (it % 5 == 0) ? ($urandom_range(0, 7) == 0) : ($urandom_range(0, 3) != 0);
        used[i] = 0;
      end
      #1;
      for (int r = 0; r < L; r++) begin
        int best;
        best = -1;
        for (int i = 0; i < C; i++)
          if (cv[i] && !used[i] && (best < 0 || mv[i] > mv[best])) best = i;
        if (best >= 0) begin
          used[best] = 1;
          chk(sel_v[r] == 1'b1, $sformatf("it %0d slot %0d should be valid", it, r));
          chk(int'(sel_idx[r]) == best, $sformatf("it %0d slot %0d idx %0d want %0d", it, r, sel_idx[r], best));
          chk($signed(sel_m[r]) == mv[best], $sformatf("it %0d slot %0d metric", it, r));
        end else begin
          chk(sel_v[r] == 1'b0, $sformatf("it %0d slot %0d should be empty", it, r));
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

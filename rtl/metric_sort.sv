// metric_sort: metric and sorting unit of the list decoder.
//
// Each of the L list paths offers four extensions by the bit pair it decodes
// next, candidate i = 4*path + 2*u1 + u2. cm[i] is the candidate's path metric:
// in this LL-domain decoder that is the max-log joint log-likelihood of the
// path's decoded bits including the pair, read directly from the last stage
// (G_u1 output, element u2), so larger is better. cv[i] is low for
// candidates that do not exist (invalid parent path, or a 1 on a frozen bit).
//
// The unit keeps the L best valid candidates. Candidate i's rank is the
// number of valid candidates that beat it: a larger metric, or an equal metric
// and a smaller index. Output slot r receives the candidate of rank r, so slot
// 0 always holds the most likely path. Slots with no candidate get sel_v = 0.
// Purely combinational: all C*(C-1) comparisons in parallel.
// The published design names a metric and sorting unit but gives no
// structure for it; the metric, the rank sorter and the tie rule are this
// design's own.
module metric_sort #(
  parameter int unsigned L  = 8,
  parameter int unsigned W  = 11,
  localparam int unsigned C  = 4 * L,
  localparam int unsigned CB = $clog2(C)
) (
  input  logic [C-1:0][W-1:0]   cm,
  input  logic [C-1:0]          cv,
  output logic [L-1:0][CB-1:0]  sel_idx,
  output logic [L-1:0]          sel_v,
  output logic [L-1:0][W-1:0]   sel_m
);
  logic [C-1:0][CB:0] rank;

  always_comb begin
    for (int i = 0; i < int'(C); i++) begin
      rank[i] = '0;
      for (int j = 0; j < int'(C); j++) begin
        if (j != i && cv[j] &&
            (($signed(cm[j]) > $signed(cm[i])) ||
             ((cm[j] == cm[i]) && (j < i))))
          rank[i] = rank[i] + 1'b1;
      end
    end
    for (int r = 0; r < int'(L); r++) begin
      sel_idx[r] = '0;
      sel_v[r]   = 1'b0;
      sel_m[r]   = '0;
      for (int i = 0; i < int'(C); i++) begin
        if (cv[i] && (rank[i] == (CB + 1)'(r))) begin
          sel_idx[r] = CB'(i);
          sel_v[r]   = 1'b1;
          sel_m[r]   = cm[i];
        end
      end
    end
  end
endmodule

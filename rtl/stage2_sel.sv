// stage2_sel: one list path's view of the shared stage 2 memories.
//
// Produces the N/4 LL pairs that enter this path's stage 3, i.e. the path's
// node at tree depth 2. For stage 2 MPE j:
//   block = m1 ? stage2_G{bl1[j], bl1[j+N/4]} : stage2_F
//   value = m2 ? (bl2[j] ? G1 : G0 of that block) : F of that block
// m1 and m2 are the decoder-wide stage select signals; bl1 (N/2 bits) and bl2
// (N/4 bits) are this path's partial sums of the last completed left node at
// depth 1 and depth 2, from its feedback part. Purely combinational.
// The published design states only that stage 3 picks its input from the
// stage 2 memories with select signals from the feedback part; this
// multiplexer is the simplest circuit that does that.
module stage2_sel #(
  parameter int unsigned N = 32,
  parameter int unsigned W = 11
) (
  input  logic [4:0][N/4-1:0][1:0][W-1:0]  s2_f,
  input  logic [4:0][N/4-1:0][1:0][W-1:0]  s2_g0,
  input  logic [4:0][N/4-1:0][1:0][W-1:0]  s2_g1,
  input  logic                             m1,
  input  logic                             m2,
  input  logic [N/2-1:0]                   bl1,
  input  logic [N/4-1:0]                   bl2,
  output logic [N/4-1:0][1:0][W-1:0]       node
);
  localparam int unsigned K = N / 4;

  always_comb begin
    for (int j = 0; j < int'(K); j++) begin
      logic [2:0] blk;
      blk = m1 ? (3'd1 + {1'b0, bl1[j], bl1[j + K]}) : 3'd0;
      if (!m2)          node[j] = s2_f[blk][j];
      else if (bl2[j])  node[j] = s2_g1[blk][j];
      else              node[j] = s2_g0[blk][j];
    end
  end
endmodule

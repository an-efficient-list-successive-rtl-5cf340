// stage1_block: the single stage 1 shared by all L list paths.
//
// Every list path would receive the same channel values, so the first stage
// is built once. It holds N/2 MPEs; MPE k combines the channel LL pairs
// y[k] and y[k+N/2] (natural-order polar tree, see the README). When en is
// high (the first cycle of a decode) the F, G0 and G1 results of all MPEs are
// stored; they stay valid for the rest of the codeword, because stage 1 is
// active only once per codeword.
// Sharing a single stage 1 is the published idea. The natural input order is
// this design's choice: the published drawings pair adjacent inputs
// (bit-reversed order), which differs only by a fixed input permutation.
module stage1_block #(
  parameter int unsigned N = 32,
  parameter int unsigned W = 11
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          en,
  input  logic [N-1:0][1:0][W-1:0]      y,
  output logic [N/2-1:0][1:0][W-1:0]    f,
  output logic [N/2-1:0][1:0][W-1:0]    g0,
  output logic [N/2-1:0][1:0][W-1:0]    g1
);
  localparam int unsigned K = N / 2;

  logic [K-1:0][1:0][W-1:0] a, b;

  always_comb begin
    for (int k = 0; k < int'(K); k++) begin
      a[k] = y[k];
      b[k] = y[k + K];
    end
  end

  mpe_bank #(.K(K), .W(W)) u_bank (
    .clk(clk), .rst_n(rst_n), .en(en), .a(a), .b(b),
    .ld(1'b0), .ld_f('0), .ld_g0('0), .ld_g1('0),
    .f(f), .g0(g0), .g1(g1)
  );
endmodule

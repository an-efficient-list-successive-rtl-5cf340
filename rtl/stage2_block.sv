// stage2_block: the five shared stage 2 blocks of the MPE-sharing decoder.
//
// Stage 2 MPE j combines depth-1 values j and j+N/4. Those values are either
// the F outputs of stage 1 (first half of the codeword, m1 = 0) or G outputs
// of stage 1 picked by each list path's own partial sums u_s(1) (for stage 1
// MPE j) and u_s(2) (for stage 1 MPE j+N/4). F outputs are the same for every
// path, and u_s(1), u_s(2) can take only four values, so five blocks of N/4
// MPEs cover every path:
//   block 0     stage2_F   : inputs F[j], F[j+N/4]
//   block 1+2a+b stage2_Gab: inputs G_a[j], G_b[j+N/4]   (a,b in {0,1})
// en_f stores block 0 (first activation of stage 2), en_g stores blocks 1..4
// (second activation). Each block keeps F, G0 and G1 of each MPE in
// registers; stage2_sel later picks, per path, the values it needs.
// The five blocks, their inputs and the write order follow the published
// algorithm; timing is one cycle per activation.
module stage2_block #(
  parameter int unsigned N = 32,
  parameter int unsigned W = 11
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               en_f,
  input  logic                               en_g,
  input  logic [N/2-1:0][1:0][W-1:0]         s1_f,
  input  logic [N/2-1:0][1:0][W-1:0]         s1_g0,
  input  logic [N/2-1:0][1:0][W-1:0]         s1_g1,
  output logic [4:0][N/4-1:0][1:0][W-1:0]    f,
  output logic [4:0][N/4-1:0][1:0][W-1:0]    g0,
  output logic [4:0][N/4-1:0][1:0][W-1:0]    g1
);
  localparam int unsigned K = N / 4;

  for (genvar blk = 0; blk < 5; blk++) begin : g_blk
    logic [K-1:0][1:0][W-1:0] a, b;

    always_comb begin
      for (int j = 0; j < int'(K); j++) begin
        if (blk == 0) begin
          a[j] = s1_f[j];
          b[j] = s1_f[j + K];
        end else begin
          a[j] = (((blk - 1) >> 1) & 1) != 0 ? s1_g1[j]     : s1_g0[j];
          b[j] = ((blk - 1) & 1) != 0        ? s1_g1[j + K] : s1_g0[j + K];
        end
      end
    end

    mpe_bank #(.K(K), .W(W)) u_bank (
      .clk(clk), .rst_n(rst_n), .en((blk == 0) ? en_f : en_g),
      .a(a), .b(b),
      .ld(1'b0), .ld_f('0), .ld_g0('0), .ld_g1('0),
      .f(f[blk]), .g0(g0[blk]), .g1(g1[blk])
    );
  end
endmodule

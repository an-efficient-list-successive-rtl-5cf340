// feedback_part: partial sums (u_s) and decoded bits of one list path.
//
// The G inputs of every stage need the partial sums of the left sibling of
// the node being decoded. This block keeps, for every tree depth d from 1 to
// log2(N)-1, the partial-sum vector of the most recently completed left node
// at that depth (N/2^d bits at offset bl_off(N, d) of bl), plus the decoded
// bits u of the path.
//
// Update, when upd is high in the cycle a pair of bits (u1 = u_2t,
// u2 = u_2t+1) is decided: the new path state is computed from the state of
// the path it descends from (par_bl, par_u), so a path copy and the update
// happen in the same edge. The pair forms the depth log2(N)-1 node sums
// (u1^u2, u2). Walking up the tree: if the node is a left child (bit
// log2(N)-1-d of t is 0) its sums are stored at depth d and the walk ends;
// if it is a right child, the parent's sums are (left ^ right, right) and the
// walk continues one depth higher. init clears the state at the start of a
// codeword.
// It produces the same partial sums as the published XOR / flip-flop feedback
// network, which is drawn only for N = 8; the walk-up organisation, which works
// for any N, is this design's own.
module feedback_part
  import polar_pkg::*;
#(
  parameter int unsigned N = 32,
  localparam int unsigned NS = $clog2(N)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            init,
  input  logic            upd,
  input  logic [NS-2:0]   t,
  input  logic            u1,
  input  logic            u2,
  input  logic [N-3:0]    par_bl,
  input  logic [N-1:0]    par_u,
  output logic [N-3:0]    bl,
  output logic [N-1:0]    u
);
  logic [N-3:0] nbl;
  logic [N-1:0] nu;

  always_comb begin
    logic [N-1:0] beta, nbeta;
    logic         walking;
    int unsigned  len;

    nbl     = par_bl;
    nu      = par_u;
    nu[2*t]     = u1;
    nu[2*t + 1] = u2;
    beta    = '0;
    beta[0] = u1 ^ u2;
    beta[1] = u2;
    len     = 2;
    walking = 1'b1;
    for (int d = int'(NS) - 1; d >= 1; d--) begin
      nbeta = '0;
      if (walking) begin
        if (!t[NS-1-d]) begin
          for (int k = 0; k < int'(N / 2); k++)
            if (k < int'(len)) nbl[bl_off(N, d) + k] = beta[k];
          walking = 1'b0;
        end else begin
          for (int k = 0; k < int'(N / 2); k++)
            if (k < int'(len)) begin
              nbeta[k]       = par_bl[bl_off(N, d) + k] ^ beta[k];
              nbeta[k + len] = beta[k];
            end
          beta = nbeta;
          len  = len * 2;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bl <= '0;
      u  <= '0;
    end else if (init) begin
      bl <= '0;
      u  <= '0;
    end else if (upd) begin
      bl <= nbl;
      u  <= nu;
    end
  end
endmodule

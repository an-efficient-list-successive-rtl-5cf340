// mpe_bank: K merged processing elements with their M registers.
//
// MPE k works on the LL pairs a[k] and b[k]. When en is high the F, G0 and G1
// results of all K MPEs are written into the bank's registers (the "M" boxes
// that follow every MPE in the decoder's stages). When ld is high instead, the
// registers take ld_f / ld_g0 / ld_g1: a list path uses this to copy the
// registers of the path it descends from. en and ld are never high together
// in the decoder; ld wins if they are. Registers clear on reset.
// Three registers per MPE follow the published latency-reduced decoder; the
// parallel load for path copies is this design's own.
module mpe_bank #(
  parameter int unsigned K = 16,
  parameter int unsigned W = 11
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic [K-1:0][1:0][W-1:0]  a,
  input  logic [K-1:0][1:0][W-1:0]  b,
  input  logic                      ld,
  input  logic [K-1:0][1:0][W-1:0]  ld_f,
  input  logic [K-1:0][1:0][W-1:0]  ld_g0,
  input  logic [K-1:0][1:0][W-1:0]  ld_g1,
  output logic [K-1:0][1:0][W-1:0]  f,
  output logic [K-1:0][1:0][W-1:0]  g0,
  output logic [K-1:0][1:0][W-1:0]  g1
);
  logic [K-1:0][1:0][W-1:0] cf, cg0, cg1;

  for (genvar k = 0; k < K; k++) begin : g_mpe
    mpe #(.W(W)) u_mpe (
      .a(a[k]), .b(b[k]), .us(1'b0), .ctrl(1'b0),
      .f(cf[k]), .g0(cg0[k]), .g1(cg1[k]), .y()
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f  <= '0;
      g0 <= '0;
      g1 <= '0;
    end else if (ld) begin
      f  <= ld_f;
      g0 <= ld_g0;
      g1 <= ld_g1;
    end else if (en) begin
      f  <= cf;
      g0 <= cg0;
      g1 <= cg1;
    end
  end
endmodule

// sc_lane: the private part of one list path, stages 3 .. log2(N).
//
// Stage s (3 <= s <= log2 N) has N/2^s MPEs. Its input is the path's node at
// tree depth s-1, N/2^(s-1) LL pairs:
//   s = 3 : node3, selected from the shared stage 2 memories by stage2_sel
//   s > 3 : from this lane's stage s-1 registers, value k being
//           m[s-1] ? (bl of depth s-1, bit k ? G1 : G0) : F   of MPE k
// MPE j of stage s combines input values j and j + N/2^s. Stages 3 ..
// log2(N)-1 store F, G0 and G1 of their MPEs in M registers when act[s] is
// high. The last stage (one MPE) is not stored: its outputs last_f, last_g0 and
// last_g1 go straight to metric and sorting in the cycle act[log2 N] is high.
// With ld high all registers take ld_f/ld_g0/ld_g1, the registers of the path
// this one is copied from after a sort.
//
// The flat register arrays hold stage s at MPE index stg_off(N, s). For N = 8
// the lane has no stored stage and the register ports are constant zero.
// These are the ordinary latency-reduced SC stages, as published; the register
// copy between paths is this design's own.
module sc_lane
  import polar_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned W = 11,
  localparam int unsigned NS  = $clog2(N),
  localparam int unsigned NM  = lane_mpes(N),
  localparam int unsigned NMA = (NM > 0) ? NM : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NS:1]                   act,
  input  logic [NS-1:1]                 m,
  input  logic [N-3:0]                  bl,
  input  logic [N/4-1:0][1:0][W-1:0]    node3,
  input  logic                          ld,
  input  logic [NMA-1:0][1:0][W-1:0]    ld_f,
  input  logic [NMA-1:0][1:0][W-1:0]    ld_g0,
  input  logic [NMA-1:0][1:0][W-1:0]    ld_g1,
  output logic [NMA-1:0][1:0][W-1:0]    f,
  output logic [NMA-1:0][1:0][W-1:0]    g0,
  output logic [NMA-1:0][1:0][W-1:0]    g1,
  output logic [1:0][W-1:0]             last_f,
  output logic [1:0][W-1:0]             last_g0,
  output logic [1:0][W-1:0]             last_g1
);
  for (genvar s = 3; s <= int'(NS); s++) begin : g_stage
    localparam int unsigned KI = N >> (s - 1);  // input values
    localparam int unsigned K  = N >> s;        // MPEs
    logic [KI-1:0][1:0][W-1:0] node;
    logic [K-1:0][1:0][W-1:0]  a, b;

    if (s == 3) begin : g_in3
      assign node = node3;
    end else begin : g_in
      localparam int unsigned SO = stg_off(N, s - 1);
      localparam int unsigned BO = bl_off(N, s - 1);
      always_comb begin
        for (int k = 0; k < int'(KI); k++) begin
          if (!m[s-1])          node[k] = f[SO + k];
          else if (bl[BO + k])  node[k] = g1[SO + k];
          else                  node[k] = g0[SO + k];
        end
      end
    end

    always_comb begin
      for (int j = 0; j < int'(K); j++) begin
        a[j] = node[j];
        b[j] = node[j + K];
      end
    end

    if (s < int'(NS)) begin : g_store
      localparam int unsigned SO = stg_off(N, s);
      mpe_bank #(.K(K), .W(W)) u_bank (
        .clk(clk), .rst_n(rst_n), .en(act[s]), .a(a), .b(b),
        .ld(ld),
        .ld_f(ld_f[SO +: K]), .ld_g0(ld_g0[SO +: K]), .ld_g1(ld_g1[SO +: K]),
        .f(f[SO +: K]), .g0(g0[SO +: K]), .g1(g1[SO +: K])
      );
    end else begin : g_last
      mpe #(.W(W)) u_mpe (
        .a(a[0]), .b(b[0]), .us(1'b0), .ctrl(1'b0),
        .f(last_f), .g0(last_g0), .g1(last_g1), .y()
      );
    end
  end

  if (NM == 0) begin : g_noreg
    // N = 8: stage 3 is the last stage, nothing is stored per path.
    assign f  = '0;
    assign g0 = '0;
    assign g1 = '0;
  end
endmodule

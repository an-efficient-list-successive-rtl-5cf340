// mpe: log-likelihood (LL) based merged processing element.
//
// One MPE evaluates, in one clock-free step, both polar-decoding kernels on
// two LL pairs a and b (element 0 = LL of bit 0, element 1 = LL of bit 1):
//   F  : the LL pair of a XOR-combined bit, max-log form
//        f[0] = max(a0+b0, a1+b1),  f[1] = max(a0+b1, a1+b0)
//   G0 : the LL pair of the second bit when the partial sum u_s = 0
//        g0 = (a0+b0, a1+b1)
//   G1 : the same when u_s = 1
//        g1 = (a1+b0, a0+b1)
// These are the LR-domain kernels F(a,b) = (ab+1)/(a+b) and
// G(a,b,u_s) = a^(1-2u_s) b taken into the log domain, where the +1 / sum of
// F becomes a compare-and-select (C&S) of two sums. Four adders are shared by
// F and both G outputs, and two C&S units produce F, as in the published
// LL-based MPE. y is the MPE's selected output: F when ctrl = 0, otherwise the
// G candidate picked by u_s.
//
// Purely combinational. The sums are W bits wide; the caller chooses W so that
// no sum can overflow (W = channel width + log2 N is enough for a whole tree).
// The kernels and the shared-adder structure follow the published design; the
// word width and the tie rule of the C&S (the first sum wins) are this
// design's own choices.
module mpe #(
  parameter int unsigned W = 11
) (
  input  logic [1:0][W-1:0] a,
  input  logic [1:0][W-1:0] b,
  input  logic              us,
  input  logic              ctrl,
  output logic [1:0][W-1:0] f,
  output logic [1:0][W-1:0] g0,
  output logic [1:0][W-1:0] g1,
  output logic [1:0][W-1:0] y
);
  logic signed [W-1:0] s00, s11, s01, s10;

  always_comb begin
    s00 = $signed(a[0]) + $signed(b[0]);
    s11 = $signed(a[1]) + $signed(b[1]);
    s01 = $signed(a[0]) + $signed(b[1]);
    s10 = $signed(a[1]) + $signed(b[0]);
    // compare and select
    f[0]  = (s00 >= s11) ? s00 : s11;
    f[1]  = (s01 >= s10) ? s01 : s10;
    g0[0] = s00;
    g0[1] = s11;
    g1[0] = s10;
    g1[1] = s01;
    y     = ctrl ? (us ? g1 : g0) : f;
  end
endmodule

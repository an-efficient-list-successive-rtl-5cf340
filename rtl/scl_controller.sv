// scl_controller: stage schedule of the latency-reduced SC / SCL decoder.
//
// One stage is active per clock cycle. The codeword is decoded two bits at a
// time; t (0 .. N/2-1) numbers the bit pairs. Before pair t is decided every
// stage whose input node changed since pair t-1 is re-run, lowest stage first:
// for t = 0 that is stages 1 .. log2 N, otherwise stages log2(N)-tz(t) ..
// log2 N, with tz(t) the number of trailing zero bits of t. Stage s is thus
// active 2^(s-1) times and a codeword takes N-1 cycles.
//
// Timing: stage 1 runs in the cycle start is high (act[1]); the next N-2
// cycles have busy high and run the other stages; done pulses for one cycle
// after the last pair is decided. m[d] (1 <= d <= log2(N)-1) is the select
// signal m_d of the stage d outputs: 0 selects F (left child), 1 selects G
// (right child); it equals bit log2(N)-1-d of t. dec is high in the cycles
// that decide a pair (last stage active), last in the final one of them.
// en_s2f / en_s2g mark the first / second activation of stage 2. A start
// while busy is ignored.
// This is the published latency-reduced schedule. The published list decoder
// staggers its lists behind extra memories and needs N + 4L - 6 cycles; that
// staggering is not described in enough detail to build and is not modelled:
// all lists run in lockstep here.
module scl_controller
  import polar_pkg::*;
#(
  parameter int unsigned N = 32,
  localparam int unsigned NS = $clog2(N)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            busy,
  output logic [NS:1]     act,
  output logic [NS-2:0]   t,
  output logic [NS-1:1]   m,
  output logic            en_s2f,
  output logic            en_s2g,
  output logic            dec,
  output logic            last,
  output logic            done
);
  phase_e              phase;
  logic [$clog2(NS+1)-1:0] s;
  logic [NS-2:0]       t_next;
  logic [$clog2(NS+1)-1:0] s_next;

  assign busy = (phase == PH_RUN);

  always_comb begin
    act = '0;
    if (phase == PH_IDLE) act[1] = start;
    else                  act[s] = 1'b1;
    for (int d = 1; d < int'(NS); d++) m[d] = t[NS-1-d];
    en_s2f = act[2] && !m[1];
    en_s2g = act[2] &&  m[1];
    dec    = busy && (s == NS[$bits(s)-1:0]);
    last   = dec && (t == '1);
    // first stage to run for the next pair: log2(N) - tz(t+1)
    t_next = t + 1'b1;
    s_next = NS[$bits(s)-1:0];
    for (int b = 0; b < int'(NS) - 1; b++) begin
      if (t_next[b]) break;
      s_next = s_next - 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_IDLE;
      s     <= '0;
      t     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (phase == PH_IDLE) begin
        if (start) begin
          phase <= PH_RUN;
          s     <= 2;
          t     <= '0;
        end
      end else if (!dec) begin
        s <= s + 1'b1;
      end else if (last) begin
        phase <= PH_IDLE;
        done  <= 1'b1;
      end else begin
        t <= t_next;
        s <= s_next;
      end
    end
  end

  // The stage schedule never runs two stages at once.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(act));
endmodule

// tb_scl_controller: records the stage activated in every cycle of a decode
// (N = 32) and compares it with the depth-first schedule: stages 1..5 for the
// first bit pair, then stages log2(N)-tz(t)..log2 N for pair t. Also checks
// the m_d select bits, the stage 2 enables, N-1 cycles per codeword, 2^(s-1)
// activations of stage s, and the done pulse.
module tb_scl_controller;
  localparam int N = 32, NS = 5;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, en_s2f, en_s2g, dec, last, done;
  logic [NS:1] act;
  logic [NS-2:0] t;
  logic [NS-1:1] m;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  scl_controller #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .act(act),
    .t(t), .m(m), .en_s2f(en_s2f), .en_s2g(en_s2g), .dec(dec), .last(last), .done(done));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int exp_s[$], exp_t[$];
    int cnt[NS+1];
    // expected schedule
    for (int tt = 0; tt < N / 2; tt++) begin
      int first, tz;
      tz = 0;
      while (tt != 0 && ((tt >> tz) & 1) == 0) tz++;
      first = (tt == 0) ? 1 : NS - tz;
      for (int s = first; s <= NS; s++) begin
        exp_s.push_back(s);
        exp_t.push_back(tt);
      end
    end
    chk(exp_s.size() == N - 1, "schedule length");
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      @(negedge clk);
      chk(!busy && act == '0, "idle before start");
      start = 1;
      foreach (cnt[s]) cnt[s] = 0;
      for (int c = 0; c < N - 1; c++) begin
        int s;
        #1;
        s = 0;
        for (int k = 1; k <= NS; k++) if (act[k]) s = k;
        chk($countones(act) == 1, $sformatf("cycle %0d one stage active", c));
        chk(s == exp_s[c], $sformatf("cycle %0d stage %0d want %0d", c, s, exp_s[c]));
        if (c > 0) begin
          chk(int'(t) == exp_t[c], $sformatf("cycle %0d t %0d want %0d", c, t, exp_t[c]));
          for (int d = 1; d < NS; d++)
            chk(m[d] == ((exp_t[c] >> (NS - 1 - d)) & 1), $sformatf("cycle %0d m%0d", c, d));
        end
        chk(en_s2f == (s == 2 && exp_t[c] == 0), "en_s2f");
        chk(en_s2g == (s == 2 && exp_t[c] == N / 4), "en_s2g");
        chk(dec == (s == NS), "dec");
        chk(last == (c == N - 2), "last");
        chk(!done, "no done while decoding");
        cnt[s]++;
        @(negedge clk);
        start = 0;
      end
      chk(done && !busy, "done one cycle after the last pair");
      for (int s = 1; s <= NS; s++)
        chk(cnt[s] == (1 << (s - 1)), $sformatf("stage %0d active %0d times", s, cnt[s]));
      @(negedge clk);
      chk(!done, "done is a single pulse");
      repeat (rep) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule

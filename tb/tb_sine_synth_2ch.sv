// tb_sine_synth_2ch: end-to-end run of the two-channel sine synthesizer front
// end at its default size (four 25-bit channels; one clock = 25 ns, 40 MHz).
//
// Sine channel 0 is set to 10 kHz (words 67108 and 134217: 2f and 4f at a
// per-channel rate of 10 MHz) and sine channel 1 to 1 kHz (words 6710 and
// 13421). The testbench checks, with numbers it derives from
// period = channels * 2^26 / w(2f) clocks:
//   * the period of each channel's three phase-shifted squares;
//   * that lead precedes mid, and lag follows mid, by one eighth of a period
//     (45 degrees), within two 4-clock frames (one frame of sampling, and
//     up to one more because w(4f) = 2 w(2f) + 1 lets the 4f wave drift);
//   * that the 1 : sqrt(2) : 1 sum of channel 0's three squares (what the
//     analog adder would form) has its 3rd and 5th harmonics suppressed below
//     2 % of the fundamental, while its 7th stays near 1/7 and a lone square's
//     3rd near 1/3;
//   * a switch of channel 0 to 40 kHz at a frame boundary: the accumulator
//     continues from its old phase (continuous-phase switching) and the new
//     period is 1000 clocks.
// It counts frames, low-stage carries, accumulator wraps, toggles of every
// flip-flop, overlaps of the 2f and 4f waves hidden by frame sampling, and
// frequency switches, and fails if any of them never happened.
module tb_sine_synth_2ch;
  localparam int unsigned CH = 4;
  localparam int RUN1 = 99999;  // ends in the last slot of a frame (RUN1 % 4 == 3)
  localparam int RUN2 = 20000;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [24:0] word [CH];
  logic [3:0]  sq;
  logic [1:0]  lead, mid, lag, slot;
  int checks = 0, failures = 0;

  always #12.5 clk = ~clk;

  sine_synth_2ch dut (
    .clk, .rst_n, .ctrl_word(word), .sq_out(sq),
    .shift_lead(lead), .shift_mid(mid), .shift_lag(lag), .frame_slot(slot)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    finish();
  end

  // Recorded behaviour.
  int  e_lead [2][$], e_mid [2][$], e_lag [2][$], e_mid_after [$];
  bit  w_lead [RUN1], w_mid [RUN1], w_lag [RUN1], w_sq0 [RUN1];
  int  n_frames = 0, n_carries = 0, n_wraps = 0, n_switches = 0, n_overlaps = 0;
  int  n_tog [3];

  function automatic real period_of(input int unsigned w2x);
    return real'(CH) * (2.0 ** 26) / real'(w2x);
  endfunction

  function automatic bit near(input real got, input real want, input real tol);
    return (got >= want - tol) && (got <= want + tol);
  endfunction

  // Magnitude of harmonic k of x over samples [a, b), which hold whole periods.
  function automatic real harmonic(input int k, input int a, input int b, input int periods,
                                   input real wl, input real wm, input real wg);
    real re = 0.0, im = 0.0, x, ang;
    for (int n = a; n < b; n++) begin
      x = wl * (w_lead[n] ? 1.0 : -1.0) + wm * (w_mid[n] ? 1.0 : -1.0)
        + wg * (w_lag[n] ? 1.0 : -1.0);
      ang = 2.0 * 3.14159265358979 * k * periods * real'(n - a) / real'(b - a);
      re += x * $cos(ang);
      im -= x * $sin(ang);
    end
    return $sqrt(re * re + im * im);
  endfunction

  logic [1:0] lead_p, mid_p, lag_p;
  logic [3:0] sq_p;
  bit         and_hidden;

  task automatic observe(input int n, input bit after);
    if (dut.u_squares.frame) n_frames++;
    if (dut.u_squares.u_adder.carry_q) n_carries++;
    for (int c = 0; c < 4; c++) if (sq_p[c] && !sq[c]) n_wraps++;
    // A 2f/4f overlap seen between frame samples but gone at the next sample.
    if (!dut.u_squares.frame && sq[0] && sq[1] && !(sq_p[0] && sq_p[1])) and_hidden = 1'b1;
    if (dut.u_squares.frame) begin
      if (and_hidden && !(sq[0] && sq[1])) n_overlaps++;
      and_hidden = 1'b0;
    end
    for (int k = 0; k < 2; k++) begin
      if (!lead_p[k] && lead[k]) e_lead[k].push_back(n);
      if (!mid_p[k] && mid[k]) begin
        if (after && k == 0) e_mid_after.push_back(n);
        else e_mid[k].push_back(n);
      end
      if (!lag_p[k] && lag[k]) e_lag[k].push_back(n);
      if (lead_p[k] != lead[k]) n_tog[0]++;
      if (mid_p[k]  != mid[k])  n_tog[1]++;
      if (lag_p[k]  != lag[k])  n_tog[2]++;
    end
    if (!after) begin
      w_lead[n] = lead[0]; w_mid[n] = mid[0]; w_lag[n] = lag[0]; w_sq0[n] = sq[0];
    end
    lead_p = lead; mid_p = mid; lag_p = lag; sq_p = sq;
  endtask

  // Periods between consecutive mid rising edges, and 45-degree offsets.
  task automatic check_channel(input int k, input int unsigned w2x);
    real p;
    int  cnt = 0;
    p = period_of(w2x);
    for (int i = 1; i < e_mid[k].size(); i++) begin
      check(near(real'(e_mid[k][i] - e_mid[k][i-1]), p, 8.0), $sformatf("ch%0d period", k));
      cnt++;
    end
    check(cnt >= 2, $sformatf("ch%0d saw at least two periods", k));
    foreach (e_mid[k][i]) begin
      int m, l, g;
      m = e_mid[k][i];
      l = -1; g = -1;
      foreach (e_lead[k][j]) if (e_lead[k][j] <= m) l = e_lead[k][j];
      foreach (e_lag[k][j])  if (e_lag[k][j] >= m && g < 0) g = e_lag[k][j];
      check(l >= 0 && near(real'(m - l), p / 8.0, 8.0), $sformatf("ch%0d lead is +45 deg", k));
      if (g >= 0) check(near(real'(g - m), p / 8.0, 8.0), $sformatf("ch%0d lag is -45 deg", k));
    end
    $display("sine channel %0d: %0d mid periods, expected period %.2f clocks", k, cnt, p);
  endtask

  initial begin
    logic [24:0] ph_before;
    word[0] = 25'd67108; word[1] = 25'd134217;
    word[2] = 25'd6710;  word[3] = 25'd13421;
    n_tog[0] = 0; n_tog[1] = 0; n_tog[2] = 0;
    lead_p = '0; mid_p = '0; lag_p = '0; sq_p = '0; and_hidden = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Part 1: 10 kHz and 1 kHz.
    for (int n = 0; n < RUN1; n++) begin
      observe(n, 1'b0);
      @(negedge clk);
    end
    // Part 2: switch channel 0 to 40 kHz in the last slot of a frame, so both
    // of its square channels take the new words in the same frame.
    check(slot == 2'd3, "switch in the last slot of a frame");
    ph_before = dut.u_squares.phase[0];
    word[0] = 25'd268432; word[1] = 25'd536868;
    n_switches++;
    for (int n = RUN1; n < RUN1 + RUN2; n++) begin
      if (n == RUN1 + 4)
        check(dut.u_squares.phase[0] == 25'(ph_before + 25'd268432), "continuous phase at switch");
      observe(n, 1'b1);
      @(negedge clk);
    end

    check_channel(0, 67108);
    check_channel(1, 6710);
    begin
      real p;
      p = period_of(268432);
      for (int i = 2; i < e_mid_after.size(); i++)
        check(near(real'(e_mid_after[i] - e_mid_after[i-1]), p, 4.0), "period after switch");
      check(e_mid_after.size() >= 5, "periods after switch");
    end
    // Harmonics of the weighted sum over 20 whole periods of channel 0.
    begin
      int a, b;
      real h1, h3, h5, h7, s1, s3;
      a = e_mid[0][2];
      b = e_mid[0][22];
      h1 = harmonic(1, a, b, 20, 1.0, $sqrt(2.0), 1.0);
      h3 = harmonic(3, a, b, 20, 1.0, $sqrt(2.0), 1.0);
      h5 = harmonic(5, a, b, 20, 1.0, $sqrt(2.0), 1.0);
      h7 = harmonic(7, a, b, 20, 1.0, $sqrt(2.0), 1.0);
      s1 = harmonic(1, a, b, 20, 0.0, 1.0, 0.0);
      s3 = harmonic(3, a, b, 20, 0.0, 1.0, 0.0);
      $display("weighted sum: H3/H1=%.4f H5/H1=%.4f H7/H1=%.4f; single square H3/H1=%.4f",
               h3 / h1, h5 / h1, h7 / h1, s3 / s1);
      check(h3 / h1 < 0.02, "3rd harmonic suppressed");
      check(h5 / h1 < 0.02, "5th harmonic suppressed");
      check(near(h7 / h1, 1.0 / 7.0, 0.02), "7th harmonic kept");
      check(near(s3 / s1, 1.0 / 3.0, 0.02), "single square 3rd harmonic");
    end
    $display("frames=%0d carries=%0d wraps=%0d toggles lead/mid/lag=%0d/%0d/%0d hidden overlaps=%0d switches=%0d",
             n_frames, n_carries, n_wraps, n_tog[0], n_tog[1], n_tog[2], n_overlaps, n_switches);
    check(n_frames > 0, "frames happened");
    check(n_carries > 0, "low-stage carries happened");
    check(n_wraps > 0, "accumulator wraps happened");
    check(n_tog[0] > 0 && n_tog[1] > 0 && n_tog[2] > 0, "all flip-flops toggled");
    check(n_overlaps > 0, "hidden overlaps happened");
    check(n_switches > 0, "frequency switch happened");
    finish();
  end
endmodule

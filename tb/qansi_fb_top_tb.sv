// qansi_fb_top_tb -- end-to-end test of the complete filter bank: analysis
// bank, band loop-back and synthesis bank.
//
// Loads a random symmetric coefficient set, feeds NSAMP = 6000 samples
// (250 ms of 24 kHz audio: two synthetic voiced sections and white noise)
// at the full rate of one sample every 33 clocks (with some longer gaps),
// and compares every band output, bit for bit and in order, with a
// reference model. The model keeps the three sample histories (input, IA1
// output decimated by 2, IA2 output decimated by 4) and evaluates each
// sub-filter as a plain N-tap convolution over the full, mirrored
// coefficient set, with round-to-nearest and 16-bit saturation. It also
// checks the schedule lengths of the delay lines (33/24/18 cycles for line 1
// depending on the sample phase, 52 for line 2, 125 for line 3), the output
// rates of the band groups and the line-1 latency, and counts how often each
// mechanism occurred: decimation by 2 and by 4, saturation, idle gaps.
// The bands are looped back unchanged into the synthesis bank; its output
// is compared bit for bit with a model that sums the band groups,
// zero-stuffs and interpolates them with the IA1/IA2 coefficients (gains 2
// and 4) and delays the paths by 54 and 166 samples. Its start (5th input
// sample), output count, latency after the tick and clipping are checked.
// The top runs with its default parameters.
module qansi_fb_top_tb;
  import afb_pkg::*;

  localparam int NSAMP = 6000;  // 250 ms of 24 kHz audio

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic                  in_valid = 0;
  logic signed [15:0]    data_in = 0;
  logic                  coef_we = 0;
  logic [CAW-1:0]        coef_addr = 0;
  logic signed [15:0]    coef_wdata = 0;
  logic [NBANDS-1:0]     out_valid;
  logic signed [15:0]    data_out [NBANDS];
  logic [2:0]            in_oct, do_oct;
  logic                  sat, sat_sfb;
  logic                  y_valid, y_started;
  logic signed [15:0]    y_out;

  // the per-band processing is a unit gain here: bands loop straight back
  qansi_fb_top dut (
    .clk, .rst, .in_valid, .data_in, .coef_we, .coef_addr, .coef_wdata,
    .band_out_valid(out_valid), .band_out(data_out),
    .band_in_valid(out_valid), .band_in(data_out),
    .y_valid, .y_out, .y_started, .in_oct, .do_oct, .sat_afb(sat), .sat_sfb);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---------------- reference model ----------------
  localparam int TAPS [14] = '{35, 49, 41, 33, 27, 67, 83, 95, 97, 97, 97, 97, 97, 97};
  int  hc   [14][97];     // full mirrored coefficients
  int  x1 [$], x2 [$], x3 [$];
  int  expq [NBANDS][$];
  int  nexp [NBANDS];
  int  bv [NSAMP][NBANDS];   // band values per input sample (looped back)

  function automatic int rsat(longint acc);
    longint r;
    r = (acc + (64'sd1 <<< 14)) >>> 15;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  // N-tap convolution starting `off` samples back in the history
  function automatic int conv(int f, ref int hist [$], input int off = 0);
    longint acc = 0;
    for (int i = 0; i < TAPS[f]; i++)
      if (off + i < hist.size()) acc += longint'(hc[f][i]) * longint'(hist[off + i]);
    return rsat(acc);
  endfunction

  int ref_sat = 0;
  // band filters are centred on the 41-tap (lines 1, 2) or 97-tap (line 3)
  // filter so that all bands of a line have the same delay
  function automatic void expect_band(int band, int f, ref int hist [$]);
    int y;
    y = conv(f, hist, (((band <= 12) ? 97 : 41) - TAPS[f]) / 2);
    if (y == 32767 || y == -32768) ref_sat++;
    expq[band-1].push_back(y);
    bv[n_ref][band-1] = y;
    nexp[band-1]++;
  endfunction

  int n_ref = 0;
  function automatic void ref_sample(int x);
    x1.push_front(x);
    if (x1.size() > 97) void'(x1.pop_back());
    expect_band(18, 4, x1); expect_band(17, 3, x1); expect_band(16, 2, x1);
    if (n_ref % 2 == 0) begin
      x2.push_front(conv(0, x1));
      expect_band(15, 4, x2); expect_band(14, 3, x2); expect_band(13, 2, x2);
    end
    if (n_ref % 4 == 0) begin
      x3.push_front(conv(1, x1));
      expect_band(12, 4, x3); expect_band(11, 3, x3); expect_band(10, 2, x3);
      for (int b = 9; b >= 1; b--) expect_band(b, 5 + (9 - b), x3);
    end
    n_ref++;
  endfunction

  // ---------------- output checking ----------------
  int ngot [NBANDS];
  always @(posedge clk) if (!rst) begin
    for (int b = 0; b < NBANDS; b++) if (out_valid[b]) begin
      ngot[b]++;
      if (expq[b].size() == 0) check(0, $sformatf("band %0d: unexpected output", b + 1));
      else begin
        int e;
        e = expq[b].pop_front();
        check(int'(data_out[b]) == e,
              $sformatf("band %0d sample %0d: got %0d expected %0d", b + 1, ngot[b], data_out[b], e));
      end
    end
  end

  // ---------------- schedule and latency monitors ----------------
  // A line's schedule length is the number of busy cycles between two of its
  // start pulses (schedules of line 1 may run back to back).
  int busy_len [3], cyc = 0, ph_cnt = 0;
  int t_q [$], ph_q [$];
  int len_hist [3][int];
  int lat16 [4];
  int n_dec2 = 0, n_dec4 = 0, n_sat = 0, n_gap = 0, n_in = 0;
  function automatic void close_run(int l);
    if (busy_len[l] > 0) len_hist[l][busy_len[l]]++;
    busy_len[l] = 0;
  endfunction
  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      for (int l = 0; l < 3; l++) begin
        if (do_oct[l]) busy_len[l]++;
        if (in_oct[l]) close_run(l);
      end
      if (in_valid) begin t_q.push_back(cyc); ph_q.push_back(ph_cnt); ph_cnt = (ph_cnt + 1) % 4; end
      if (in_oct[1]) n_dec2++;
      if (in_oct[2]) n_dec4++;
      if (sat) n_sat++;
      if (out_valid[15] && t_q.size() > 0) lat16[ph_q.pop_front()] = cyc - t_q.pop_front();
    end
  end

  // ---------------- synthesis bank model ----------------
  // Group sums (bands 16..18 every sample, 13..15 every 2nd, 1..12 every
  // 4th), zero stuffing, IS1 = IA1 (gain 2) and IS2 = IA2 (gain 4) as plain
  // convolutions, path delays of 54 and 166 samples, 16-bit clipping.
  localparam int BA = 54, BS = 166, Y_START = 5;
  int yexp [NSAMP];
  int n_y_clip = 0;
  function automatic int clip(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction
  task automatic sfb_model();
    int ga [NSAMP], ub [NSAMP], uc [NSAMP], s1 [NSAMP];
    for (int n = 0; n < NSAMP; n++) begin
      longint a = 0, b = 0, c = 0;
      for (int k = 15; k < 18; k++) a += bv[n][k];
      for (int k = 12; k < 15; k++) b += bv[n][k];
      for (int k = 0; k < 12; k++)  c += bv[n][k];
      ga[n] = clip(a);
      ub[n] = (n % 2 == 0) ? clip(b) : 0;
      uc[n] = (n % 4 == 0) ? clip(c) : 0;
    end
    for (int n = 0; n < NSAMP; n++) begin
      longint acc1 = 0, acc2 = 0, v;
      for (int k = 0; k < 35; k++) if (n >= k) acc1 += longint'(hc[0][k]) * ub[n - k];
      for (int k = 0; k < 49; k++) if (n >= k) acc2 += longint'(hc[1][k]) * uc[n - k];
      s1[n] = clip(longint'((n >= BA) ? ga[n - BA] : 0) + 2 * rsat(acc1));
      v = longint'((n >= BS) ? s1[n - BS] : 0) + 4 * rsat(acc2);
      yexp[n] = clip(v);
      if (yexp[n] != v) n_y_clip++;
    end
  endtask

  int y_got [$];
  int n_tick = 0, y_first_tick = -1, y_last_tick = 0, n_sfb_sat = 0, n_y_lat_bad = 0;
  always @(posedge clk) if (!rst) begin
    if (in_valid) begin
      if (y_started == 0 && dut.u_sfb.go) y_first_tick = n_tick;
      y_last_tick = cyc;
      n_tick++;
    end
    if (sat_sfb) n_sfb_sat++;
    if (y_valid) begin
      y_got.push_back(int'(y_out));
      if (cyc - y_last_tick != 28) n_y_lat_bad++;
    end
  end

  // ---------------- stimulus ----------------
  // Three 2000-sample sections: a voiced sound with a 220 Hz fundamental
  // (female-like), one with a 120 Hz fundamental (male-like), both with 12
  // harmonics falling off at 6 dB per octave, then white noise. A burst of
  // full-scale alternating samples at 300..339 drives the bands into
  // clipping.
  function automatic int stim(int n);
    real t, f0, v;
    if (n >= 300 && n < 340) return (n % 2) ? 32767 : -32768;
    if (n >= 4000) return $signed(16'($urandom)) / 2;
    f0 = (n < 2000) ? 220.0 : 120.0;
    t  = real'(n) / 24000.0;
    v  = 0.0;
    for (int h = 1; h <= 12; h++)
      v += $sin(2.0 * 3.14159265358979 * f0 * h * t + 0.7 * h) / h;
    return int'(v * 6000.0);
  endfunction

  initial begin
    int gap;
    repeat (3) @(posedge clk);
    rst <= 0;
    // coefficients: random symmetric halves; some large to reach saturation
    for (int f = 0; f < 14; f++) begin
      automatic int h = (TAPS[f] + 1) / 2;
      for (int i = 0; i < h; i++) begin
        int c;
        c = $signed(16'($urandom)) / ((f == 4) ? 1 : 16);
        hc[f][i] = c;
        hc[f][TAPS[f] - 1 - i] = c;
        @(negedge clk);
        coef_we = 1; coef_addr = CAW'(cbase(filt_e'(f)) + i); coef_wdata = 16'(c);
      end
    end
    @(negedge clk) coef_we = 0;
    repeat (5) @(posedge clk);

    for (int n = 0; n < NSAMP; n++) begin
      int x;
      x = stim(n);
      @(negedge clk);
      in_valid = 1; data_in = 16'(x);
      ref_sample(x);
      @(posedge clk);
      n_in++;
      @(negedge clk) in_valid = 0;
      gap = (n % 50 == 49) ? 33 + 20 : 33;
      if (gap > 33) n_gap++;
      repeat (gap - 1) @(posedge clk);
    end
    repeat (600) @(posedge clk);

    // final bookkeeping
    for (int b = 0; b < NBANDS; b++) begin
      check(ngot[b] == nexp[b], $sformatf("band %0d: %0d outputs, expected %0d", b + 1, ngot[b], nexp[b]));
      check(expq[b].size() == 0, $sformatf("band %0d: outputs missing", b + 1));
    end
    check(ngot[17] == NSAMP, "band 18 rate: one output per input sample");
    check(ngot[12] == NSAMP / 2, "band 13 rate: one output per two samples");
    check(ngot[0] == NSAMP / 4, "band 1 rate: one output per four samples");
    for (int l = 0; l < 3; l++) close_run(l);
    check(len_hist[0].num() == 3 && len_hist[0][33] == NSAMP / 4 && len_hist[0][24] == NSAMP / 4 &&
          len_hist[0][18] == NSAMP / 2, $sformatf("line-1 schedule lengths %p", len_hist[0]));
    check(len_hist[1].num() == 1 && len_hist[1][52] == NSAMP / 2, "line-2 schedule takes 52 cycles per run");
    check(len_hist[2].num() == 1 && len_hist[2][125] == NSAMP / 4, "line-3 schedule takes 125 cycles per run");
    // band 16 is the last job of line 1; the sample is taken at edge t, the
    // band register is written at t + schedule + 2 and seen here one edge later
    check(lat16[0] == 36 && lat16[2] == 27 && lat16[1] == 21 && lat16[3] == 21,
          $sformatf("band-16 latency %0d/%0d/%0d/%0d", lat16[0], lat16[1], lat16[2], lat16[3]));
    $display("mechanisms: inputs=%0d decimate-by-2=%0d decimate-by-4=%0d saturations=%0d (model %0d) long-gaps=%0d",
             n_in, n_dec2, n_dec4, n_sat, ref_sat, n_gap);
    check(n_dec2 > 0, "decimation by 2 happened");
    check(n_dec4 > 0, "decimation by 4 happened");
    check(n_sat > 0 && n_sat == ref_sat, "saturation happened and matched the model");
    check(n_gap > 0, "input gaps longer than the sample period happened");
    // synthesis bank: one output per input sample after start-up, bit exact
    sfb_model();
    check(y_first_tick == Y_START, $sformatf("synthesis output starts at input sample %0d", y_first_tick));
    check(y_got.size() == NSAMP - Y_START, $sformatf("%0d synthesis outputs", y_got.size()));
    for (int n = 0; n < y_got.size(); n++)
      check(y_got[n] == yexp[n], $sformatf("y[%0d] = %0d, expected %0d", n, y_got[n], yexp[n]));
    check(n_y_lat_bad == 0, "synthesis output 28 clocks after its tick");
    check(n_sfb_sat > 0 && n_y_clip > 0, "synthesis-bank clipping happened");
    $display("synthesis: outputs=%0d output-clips=%0d sat-pulses=%0d", y_got.size(), n_y_clip, n_sfb_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * (NSAMP * 40 + 5000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

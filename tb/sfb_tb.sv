// sfb_tb -- self-checking test of the synthesis filter bank.
//
// Loads random IA1/IA2 coefficients, then emulates the band outputs of the
// analysis bank for NS input samples, one every 33 clocks: bands 18..16 of
// every sample shortly after its tick, bands 15..13 of even samples and
// bands 12..1 of every 4th sample spread over the following 140 clocks, as
// the analysis schedules deliver them. One output tick is given per input
// sample. The reference model forms the three group sums, zero-stuffs the
// 2nd-octave and low-group sums, runs the 35- and 49-tap interpolators as
// plain convolutions with the mirrored coefficients (rounded and clipped),
// applies the gains 2 and 4, and delays the paths by 54 and 166 samples.
// Every output word is compared bit for bit and in order. The test also
// checks the first output tick, one output per tick afterwards, the output
// latency after its tick, and counts the mechanisms: zero stuffing by 2 and
// by 4, group-sum clipping and output clipping.
module sfb_tb;
  import afb_pkg::*;

  localparam int NS   = 520;   // input samples
  localparam int PER  = 33;    // clocks per sample
  localparam int NCYC = NS * PER + 400;
  localparam int BA = 54, BS = 166;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic                 tick = 0;
  logic [NBANDS-1:0]    band_valid = '0;
  logic signed [15:0]   band_in [NBANDS];
  logic                 coef_we = 0;
  logic [CAW-1:0]       coef_addr = 0;
  logic signed [15:0]   coef_wdata = 0;
  logic                 out_valid, started, sat;
  logic signed [15:0]   data_out;

  sfb dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // stimulus
  int               bval [NS][NBANDS];
  logic [NBANDS-1:0] ev_mask [NCYC];
  int               ev_samp [NCYC][NBANDS];
  int               c1 [18], c2 [25];

  // model
  int ga [NS], gb [NS], gc [NS], yexp [NS];
  int n_clip_group = 0, n_clip_out = 0, n_stuff2 = 0, n_stuff4 = 0;

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic int rsat(longint acc);
    return sat16((acc + 16384) >>> 15);
  endfunction

  // band delivery offsets, in clocks after the sample's tick
  function automatic int offs(int b);  // b = band index 0..17
    if (b >= 15) return 20 + 4 * (17 - b);          // 18,17,16
    if (b >= 12) return 45 + 8 * (14 - b);          // 15,14,13
    return 40 + 9 * (11 - b);                       // 12..1
  endfunction

  task automatic build();
    for (int c = 0; c < NCYC; c++) ev_mask[c] = '0;
    for (int n = 0; n < NS; n++)
      for (int b = 0; b < NBANDS; b++) begin
        automatic bit on = (b >= 15) || (b >= 12 && n % 2 == 0) || (b < 12 && n % 4 == 0);
        automatic int big = ($urandom % 10 == 0);
        bval[n][b] = big ? $signed(16'($urandom)) : $signed(16'($urandom)) / 16;
        if (on) begin
          automatic int c = n * PER + offs(b);
          ev_mask[c][b] = 1'b1;
          ev_samp[c][b] = n;
        end
      end
    for (int i = 0; i < 18; i++) c1[i] = $signed(16'($urandom)) / 8;
    for (int i = 0; i < 25; i++) c2[i] = $signed(16'($urandom)) / 8;
  endtask

  task automatic model();
    int ub [NS], uc [NS], s [NS];
    for (int n = 0; n < NS; n++) begin
      longint a = 0, b = 0, c = 0;
      for (int k = 15; k < 18; k++) a += bval[n][k];
      for (int k = 12; k < 15; k++) b += bval[n][k];
      for (int k = 0; k < 12; k++)  c += bval[n][k];
      ga[n] = sat16(a); gb[n] = sat16(b); gc[n] = sat16(c);
      if (ga[n] != a || (n % 2 == 0 && gb[n] != b) || (n % 4 == 0 && gc[n] != c)) n_clip_group++;
      ub[n] = (n % 2 == 0) ? gb[n] : 0;
      uc[n] = (n % 4 == 0) ? gc[n] : 0;
      if (n % 2) n_stuff2++;
      if (n % 4) n_stuff4++;
    end
    for (int n = 0; n < NS; n++) begin
      longint acc1 = 0, acc2 = 0, v;
      int is1, is2;
      for (int k = 0; k < 35; k++)
        if (n - k >= 0) acc1 += longint'(c1[(k < 18) ? k : 34 - k]) * ub[n - k];
      for (int k = 0; k < 49; k++)
        if (n - k >= 0) acc2 += longint'(c2[(k < 25) ? k : 48 - k]) * uc[n - k];
      is1 = rsat(acc1);
      is2 = rsat(acc2);
      s[n] = sat16(longint'((n >= BA) ? ga[n - BA] : 0) + 2 * is1);
      v = longint'((n >= BS) ? s[n - BS] : 0) + 4 * is2;
      yexp[n] = sat16(v);
      if (yexp[n] != v) n_clip_out++;
    end
  endtask

  // drive
  int cyc = 0;
  int first_tick = -1, n_ticks = 0;
  initial begin
    for (int b = 0; b < NBANDS; b++) band_in[b] = 0;
    build();
    model();
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 43; i++) begin
      coef_we = 1; coef_addr = CAW'(i);
      coef_wdata = 16'((i < 18) ? c1[i] : c2[i - 18]);
      @(negedge clk);
    end
    coef_we = 0;
    for (int c = 0; c < NCYC; c++) begin
      tick = (c % PER == 0) && (c / PER < NS);
      band_valid = ev_mask[c];
      for (int b = 0; b < NBANDS; b++)
        band_in[b] = ev_mask[c][b] ? 16'(bval[ev_samp[c][b]][b]) : 16'h5a5a;
      @(negedge clk);
      cyc = c + 1;
    end
    tick = 0; band_valid = '0;
    repeat (40) @(negedge clk);
    finish_up();
  end

  // The first low-group sum (sample 0) is complete at clock offs(0); the
  // first tick after that starts the output.
  localparam int FIRST_TICK = ((40 + 9 * 11) / PER + 1) * PER;

  // monitor
  int nout = 0, last_tick = -1, n_sat_flag = 0;
  always @(posedge clk) if (!rst) begin
    if (tick && dut.go) begin
      last_tick = cyc;
      n_ticks++;
      if (first_tick < 0) first_tick = cyc;
    end
    if (sat) n_sat_flag++;
    if (out_valid) begin
      check(nout < NS, "too many outputs");
      if (nout < NS) check(data_out == 16'(yexp[nout]),
        $sformatf("y[%0d] = %0d, expected %0d", nout, data_out, yexp[nout]));
      check(cyc - last_tick == 28, $sformatf("output %0d latency %0d", nout, cyc - last_tick));
      nout++;
    end
  end

  task automatic finish_up();
    check(first_tick == FIRST_TICK, $sformatf("first tick %0d, expected %0d", first_tick, FIRST_TICK));
    check(nout == n_ticks, $sformatf("%0d outputs for %0d ticks", nout, n_ticks));
    check(n_ticks == NS - FIRST_TICK / PER, $sformatf("%0d ticks used", n_ticks));
    check(n_stuff2 > 0 && n_stuff4 > 0, "zero stuffing occurred");
    check(n_clip_group > 0, "group-sum clipping occurred");
    check(n_clip_out > 0, "output clipping occurred");
    check(n_sat_flag > 0, "saturation flag raised");
    $display("outputs %0d, zero-stuffed x2 %0d, x4 %0d, group clips %0d, output clips %0d",
             nout, n_stuff2, n_stuff4, n_clip_group, n_clip_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (NCYC + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

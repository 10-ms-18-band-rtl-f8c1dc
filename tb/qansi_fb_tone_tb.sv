// qansi_fb_tone_tb -- frequency-selectivity test of the analysis bank.
//
// The testbench designs a simple coefficient set itself (Hamming-windowed
// ideal filters; a real fitting would use equiripple designs) and loads it:
//   H16..H18: band-passes for the 1/3-octave bands 16..18 at 24 kHz,
//   IA1: low-pass with cut-off 5.8 kHz at 24 kHz (decimation by 2),
//   IA2: low-pass with cut-off 2.9 kHz at 24 kHz (decimation by 4),
//   H1..H9: band-passes for bands 1..9 at 6 kHz.
// Band b has centre 1000 * 2^((b-9)/3) Hz and edges at 2^(+-1/6) times
// that. A sine at the centre of a test band is fed for SEG samples; the mean
// square of every band output over the second half of the segment is
// measured, and the band with the most energy must be the test band. This
// exercises the point of the multirate structure: the same three
// prototypes give bands 16..18 at 24 kHz, 13..15 after decimation by 2 and
// 10..12 after decimation by 4. The synthesis output must follow the input
// tone: its mean square must be within a factor of 4 of the input's.
module qansi_fb_tone_tb;
  import afb_pkg::*;

  localparam int SEG = 1200;
  localparam int NTEST = 12;
  localparam int TEST_BAND [NTEST] = '{18, 17, 16, 15, 14, 13, 12, 11, 10, 9, 6, 3};
  localparam real PI = 3.14159265358979;

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
  logic                  sat_afb, sat_sfb, y_valid, y_started;
  logic signed [15:0]    y_out;

  qansi_fb_top dut (
    .clk, .rst, .in_valid, .data_in, .coef_we, .coef_addr, .coef_wdata,
    .band_out_valid(out_valid), .band_out(data_out),
    .band_in_valid(out_valid), .band_in(data_out),
    .y_valid, .y_out, .y_started, .in_oct, .do_oct, .sat_afb, .sat_sfb);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic real fm(int b);
    return 1000.0 * $pow(2.0, real'(b - 9) / 3.0);
  endfunction

  function automatic real sinc(real x);
    return (x == 0.0) ? 1.0 : $sin(PI * x) / (PI * x);
  endfunction

  // tap i of an N-tap Hamming-windowed filter passing f1..f2 (in units of fs)
  function automatic real tap(int i, int n, real f1, real f2);
    real k, w;
    k = real'(i) - real'(n - 1) / 2.0;
    w = 0.54 - 0.46 * $cos(2.0 * PI * real'(i) / real'(n - 1));
    return w * (2.0 * f2 * sinc(2.0 * f2 * k) - 2.0 * f1 * sinc(2.0 * f1 * k));
  endfunction

  task automatic load_filter(filt_e f, real f1, real f2);
    for (int i = 0; i < int'(half(f)); i++) begin
      automatic real v = tap(i, int'(taps(f)), f1, f2) * 32768.0;
      if (v > 32767.0) v = 32767.0;
      @(negedge clk);
      coef_we = 1; coef_addr = CAW'(cbase(f) + i); coef_wdata = 16'($rtoi(v + ((v >= 0.0) ? 0.5 : -0.5)));
    end
    @(negedge clk);
    coef_we = 0;
  endtask

  // energy monitor
  bit  measuring = 0;
  real e_band [NBANDS], e_y, e_x;
  int  n_band [NBANDS], n_y, n_x;
  always @(posedge clk) if (!rst && measuring) begin
    for (int b = 0; b < NBANDS; b++)
      if (out_valid[b]) begin e_band[b] += real'(data_out[b]) ** 2; n_band[b]++; end
    if (y_valid) begin e_y += real'(y_out) ** 2; n_y++; end
    if (in_valid) begin e_x += real'(data_in) ** 2; n_x++; end
  end

  int n_ok = 0;
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int b = 16; b <= 18; b++)
      load_filter(filt_e'(int'(F_H16) + b - 16), fm(b) * $pow(2.0, -1.0 / 6.0) / 24000.0,
                  fm(b) * $pow(2.0, 1.0 / 6.0) / 24000.0);
    load_filter(F_IA1, 0.0, 5800.0 / 24000.0);
    load_filter(F_IA2, 0.0, 2900.0 / 24000.0);
    for (int b = 1; b <= 9; b++)
      load_filter(filt_e'(int'(F_H9) + 9 - b), fm(b) * $pow(2.0, -1.0 / 6.0) / 6000.0,
                  fm(b) * $pow(2.0, 1.0 / 6.0) / 6000.0);

    for (int t = 0; t < NTEST; t++) begin
      automatic int  tb_ = TEST_BAND[t];
      automatic int  best = 0;
      automatic real ms [NBANDS];
      for (int b = 0; b < NBANDS; b++) begin e_band[b] = 0.0; n_band[b] = 0; end
      e_y = 0.0; n_y = 0; e_x = 0.0; n_x = 0;
      for (int n = 0; n < SEG; n++) begin
        @(negedge clk);
        measuring = (n >= SEG / 2);
        in_valid = 1;
        data_in = 16'($rtoi(8000.0 * $sin(2.0 * PI * fm(tb_) * real'(n) / 24000.0)));
        @(negedge clk);
        in_valid = 0;
        repeat (31) @(negedge clk);
      end
      measuring = 0;
      for (int b = 0; b < NBANDS; b++) begin
        ms[b] = (n_band[b] > 0) ? e_band[b] / n_band[b] : 0.0;
        if (ms[b] > ms[best]) best = b;
      end
      check(best + 1 == tb_, $sformatf("tone at %0.0f Hz: strongest band %0d, expected %0d",
                                        fm(tb_), best + 1, tb_));
      check(n_y > 0 && e_y / n_y > 0.25 * e_x / n_x && e_y / n_y < 4.0 * e_x / n_x,
            $sformatf("tone at %0.0f Hz: output/input power %0.2f", fm(tb_), (e_y / n_y) / (e_x / n_x)));
      if (best + 1 == tb_) n_ok++;
      $display("tone %5.0f Hz: strongest band %0d (%0.1f dB over next), y/x power %0.2f",
               fm(tb_), best + 1, 10.0 * $log10(ms[best] /
               ((best == 0) ? ms[1] : (best == NBANDS - 1) ? ms[NBANDS - 2] :
                (ms[best - 1] > ms[best + 1] ? ms[best - 1] : ms[best + 1]))),
               (e_y / n_y) / (e_x / n_x));
    end
    check(n_ok == NTEST, "every test tone was separated into its own band");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NTEST * SEG * 33 + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// qansi_fb_delay_tb -- path-delay test of the complete filter bank.
//
// The filters are loaded as pure delays: a single non-zero coefficient at
// the centre tap. With such filters an impulse travels through each octave
// path unchanged except for its delay, so the output shows directly whether
// the paths are aligned. IA1/IS1 get 23170 (1/sqrt 2, so that IA1 x IS1 x 2
// has unit gain), IA2/IS2 get 16384 (1/2, unit gain with the factor 4), the
// band prototypes and H1 get 32767. Four runs, each from reset:
//   1. top octave only (H16): impulse at input sample 40;
//   2. low group only (IA2, H1): impulse at 40;
//   3. top and 2nd octave (H16, IA1): impulse at 41 (IA1 only runs on even
//      samples, and its centre tap is 17 samples back);
//   4. top octave and low group (H16, IA2, H1): impulse at 40; H16 also
//      makes band 10 on the low line.
// In every run the output must be zero everywhere except one sample, 240
// samples (10 ms) after the impulse, whose value is the sum of the path
// gains times the impulse (within rounding). Two misaligned paths would
// show up as two separate output pulses. The bands are looped back
// unchanged.
module qansi_fb_delay_tb;
  import afb_pkg::*;

  localparam int NSAMP = 320, X = 8000, DELAY = 240;

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

  int y [$];
  always @(posedge clk) if (!rst && y_valid) y.push_back(int'(y_out));

  task automatic load(filt_e f, int c);
    @(negedge clk);
    coef_we = 1; coef_addr = CAW'(cbase(f) + half(f) - 1); coef_wdata = 16'(c);
    @(negedge clk);
    coef_we = 0;
  endtask

  int n_aligned = 0;
  task automatic run(string name, bit h16, bit ia1, bit ia2_h1, int n0, int expv);
    int nz, pos;
    rst = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    y.delete();
    if (h16) load(F_H16, 32767);
    if (ia1) load(F_IA1, 23170);
    if (ia2_h1) begin load(F_IA2, 16384); load(F_H1, 32767); end
    for (int n = 0; n < NSAMP; n++) begin
      @(negedge clk);
      in_valid = 1; data_in = (n == n0) ? 16'(X) : 16'd0;
      @(negedge clk);
      in_valid = 0;
      repeat (31) @(negedge clk);
    end
    repeat (100) @(negedge clk);
    nz = 0; pos = -1;
    foreach (y[j]) if (y[j] != 0) begin nz++; pos = j; end
    check(nz == 1, $sformatf("%s: %0d non-zero output samples", name, nz));
    check(pos == n0 + DELAY, $sformatf("%s: pulse at output %0d, expected %0d", name, pos, n0 + DELAY));
    if (pos >= 0)
      check(y[pos] >= expv - 4 && y[pos] <= expv + 4,
            $sformatf("%s: pulse height %0d, expected %0d", name, y[pos], expv));
    if (nz == 1 && pos == n0 + DELAY) n_aligned++;
    $display("%s: %0d outputs, pulse %0d at %0d", name, y.size(), (pos >= 0) ? y[pos] : 0, pos);
  endtask

  initial begin
    run("top octave",             1, 0, 0, 40, X);
    run("low group",              0, 0, 1, 40, X);
    run("top + 2nd octave",       1, 1, 0, 41, 2 * X);
    run("top + low group + band 10", 1, 0, 1, 40, 3 * X);
    check(n_aligned == 4, "all path combinations aligned at 240 samples");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * (NSAMP * 33 + 400)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

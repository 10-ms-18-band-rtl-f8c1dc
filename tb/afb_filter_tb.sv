// afb_filter_tb -- checks the filter engine: three MAC sets and result routing.
//
// The three step inputs are driven with random jobs at the same time (set 1
// with 3 multipliers, set 2 with 1, set 3 with 4), each with random operands
// and a destination drawn from the bands that set serves (16..18 plus the
// IA1/IA2 returns for set 1, 13..15 for set 2, 1..12 for set 3). The test
// checks every band register and out_valid pulse against a model of the sums,
// that results for lines 2 and 3 leave on fb_* and touch no band, and that
// the other bands keep their values.
module afb_filter_tb;
  import afb_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  step_t              st1 = '0, st2 = '0, st3 = '0;
  logic signed [15:0] coef1 [3], d1a [3], d1b [3];
  logic signed [15:0] coef2 [1], d2a [1], d2b [1];
  logic signed [15:0] coef3 [4], d3a [4], d3b [4];
  logic               fb_valid, sat;
  logic [4:0]         fb_dest;
  logic signed [15:0] fb_data;
  logic [17:0]        out_valid;
  logic signed [15:0] data_out [18];

  afb_filter dut (.*);

  function automatic int rs(longint acc);
    longint r = (acc + 16384) >>> 15;
    return int'((r > 32767) ? 32767 : (r < -32768) ? -32768 : r);
  endfunction

  int bands [18];
  int n_fb = 0, n_band = 0;

  // one job per set, all three sets in parallel; returns after all finish
  task automatic run_round();
    int ns [3], dest [3], mac [3];
    longint acc [3];
    int steps_max, expect_fb, fb_seen;
    mac = '{3, 1, 4};
    for (int s = 0; s < 3; s++) begin
      ns[s] = 1 + $urandom % 8;
      acc[s] = 0;
    end
    case ($urandom % 5)
      0: dest[0] = 30;
      1: dest[0] = 31;
      default: dest[0] = 16 + $urandom % 3;
    endcase
    dest[1] = 13 + $urandom % 3;
    dest[2] = 1 + $urandom % 12;
    steps_max = 0;
    for (int s = 0; s < 3; s++) if (ns[s] > steps_max) steps_max = ns[s];
    for (int k = 0; k < steps_max; k++) begin
      for (int s = 0; s < 3; s++) begin
        step_t w;
        w = '0;
        if (k < ns[s]) w = '{valid: 1'b1, first: k == 0, last: k == ns[s] - 1, filt: F_H1, step: 6'(k), dest: 5'(dest[s]), off: 7'd0};
        for (int m = 0; m < mac[s]; m++) begin
          int c = $signed(16'($urandom)) / 32, a = $signed(16'($urandom)), b = $signed(16'($urandom));
          if (k < ns[s]) acc[s] += longint'(a + b) * longint'(c);
          case (s)
            0: begin coef1[m] = 16'(c); d1a[m] = 16'(a); d1b[m] = 16'(b); end
            1: begin coef2[m] = 16'(c); d2a[m] = 16'(a); d2b[m] = 16'(b); end
            default: begin coef3[m] = 16'(c); d3a[m] = 16'(a); d3b[m] = 16'(b); end
          endcase
        end
        if (s == 0) st1 = w; else if (s == 1) st2 = w; else st3 = w;
      end
      @(negedge clk);
      // set 1 result is on fb_* one cycle after its last step
      if (k == ns[0] - 1) begin
        if (dest[0] >= 30) begin
          check(fb_valid && int'(fb_dest) == dest[0] && int'(fb_data) == rs(acc[0]), "feedback result");
          n_fb++;
        end else check(!fb_valid, "no feedback for a band job");
      end
    end
    st1 = '0; st2 = '0; st3 = '0;
    // band registers are written one cycle after the MAC result
    for (int s = 0; s < 3; s++) if (dest[s] <= 18) bands[dest[s] - 1] = rs(acc[s]);
    @(negedge clk);
    repeat (9) @(negedge clk);
    for (int b = 0; b < 18; b++)
      check(int'(data_out[b]) == bands[b], $sformatf("band %0d: %0d expected %0d", b + 1, data_out[b], bands[b]));
  endtask

  // count out_valid pulses per band against the jobs issued
  int pulses [18], jobs_to [18];
  always @(posedge clk) if (!rst) for (int b = 0; b < 18; b++) if (out_valid[b]) pulses[b]++;
  always @(posedge clk) if (!rst) begin
    if (st1.valid && st1.last && st1.dest <= 18) jobs_to[st1.dest - 1]++;
    if (st2.valid && st2.last) jobs_to[st2.dest - 1]++;
    if (st3.valid && st3.last) jobs_to[st3.dest - 1]++;
  end

  initial begin
    for (int m = 0; m < 3; m++) begin coef1[m] = 0; d1a[m] = 0; d1b[m] = 0; end
    coef2[0] = 0; d2a[0] = 0; d2b[0] = 0;
    for (int m = 0; m < 4; m++) begin coef3[m] = 0; d3a[m] = 0; d3b[m] = 0; end
    for (int b = 0; b < 18; b++) bands[b] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int r = 0; r < 150; r++) run_round();
    for (int b = 0; b < 18; b++) begin
      check(pulses[b] == jobs_to[b], $sformatf("band %0d: %0d pulses for %0d jobs", b + 1, pulses[b], jobs_to[b]));
      check(jobs_to[b] > 0, $sformatf("band %0d exercised", b + 1));
    end
    check(n_fb > 0, "feedback results exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #300000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

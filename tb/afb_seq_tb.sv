// afb_seq_tb -- checks the step sequences of the three delay-line schedules.
//
// For line 1 (3 MACs) with each of the four job masks used by the sample
// phases, line 2 (1 MAC) and line 3 (4 MACs), the testbench starts the
// sequencer and compares every issued step (sub-filter, step index,
// first/last flags, destination) with a list built from the sub-filter tap
// lengths, and checks the total schedule length (33/24/18, 52, 125 cycles),
// the `done` flag on the final step and a back-to-back restart.
module afb_seq_tb;
  import afb_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic            start1 = 0, start2 = 0, start3 = 0;
  logic [4:0]      mask1 = 0;
  step_t           st1, st2, st3;
  logic            busy1, busy2, busy3, done1, done2, done3;

  afb_seq #(.LINE(1), .NMAC(3), .NJOB(5)) u1 (.clk, .rst, .start(start1), .job_mask(mask1), .st(st1), .busy(busy1), .done(done1));
  afb_seq #(.LINE(2), .NMAC(1), .NJOB(3)) u2 (.clk, .rst, .start(start2), .job_mask(3'b111), .st(st2), .busy(busy2), .done(done2));
  afb_seq #(.LINE(3), .NMAC(4), .NJOB(12)) u3 (.clk, .rst, .start(start3), .job_mask(12'hfff), .st(st3), .busy(busy3), .done(done3));

  // expected jobs: {filter, unique coefficients, destination}
  typedef struct { int f; int h; int d; } ej_t;
  ej_t L1 [5] = '{'{0, 18, 30}, '{1, 25, 31}, '{4, 14, 18}, '{3, 17, 17}, '{2, 21, 16}};
  ej_t L2 [3] = '{'{4, 14, 15}, '{3, 17, 14}, '{2, 21, 13}};
  ej_t L3 [12];

  // expected tap offset: band filters centred on 41 taps (lines 1, 2) or
  // 97 taps (line 3); the decimation filters start at the newest sample
  function automatic int exp_off(int line, ej_t jb);
    int n = 2 * jb.h - 1;
    if (jb.d >= 30) return 0;
    return (((line == 3) ? 97 : 41) - n) / 2;
  endfunction

  // Follow one schedule, starting at the first negedge after the start edge;
  // return its length.
  task automatic follow(int line, ej_t jobs [$], int nmac, output int len);
    step_t s;
    logic  dn;
    len = 0;
    foreach (jobs[j]) begin
      int ns = (jobs[j].h + nmac - 1) / nmac;
      for (int k = 0; k < ns; k++) begin
        s  = (line == 1) ? st1 : (line == 2) ? st2 : st3;
        dn = (line == 1) ? done1 : (line == 2) ? done2 : done3;
        len++;
        check(s.valid && int'(s.filt) == jobs[j].f && int'(s.step) == k && s.first == (k == 0) &&
              s.last == (k == ns - 1) && int'(s.dest) == jobs[j].d && int'(s.off) == exp_off(line, jobs[j]),
              $sformatf("line %0d job %0d step %0d: %p", line, j, k, s));
        check(dn == (j == jobs.size() - 1 && k == ns - 1), $sformatf("line %0d done flag", line));
        @(negedge clk);
      end
    end
  endtask

  initial begin
    int len;
    ej_t q [$];
    for (int j = 0; j < 3; j++) L3[j] = L2[j];
    L3[0].d = 12; L3[1].d = 11; L3[2].d = 10;
    for (int j = 3; j < 12; j++) L3[j] = '{5 + j - 3, (j == 3) ? 34 : (j == 4) ? 42 : (j == 5) ? 48 : 49, 12 - j};

    repeat (2) @(negedge clk);
    rst = 0;
    // line 1, phases 0, 1, 2, 3
    for (int ph = 0; ph < 4; ph++) begin
      q = {};
      if (ph % 2 == 0) q.push_back(L1[0]);
      if (ph == 0) q.push_back(L1[1]);
      for (int j = 2; j < 5; j++) q.push_back(L1[j]);
      @(negedge clk);
      mask1 = {3'b111, ph == 0, ph % 2 == 0}; start1 = 1;
      @(negedge clk) start1 = 0;
      follow(1, q, 3, len);
      check(len == ((ph == 0) ? 33 : (ph == 2) ? 24 : 18), $sformatf("line-1 phase %0d length %0d", ph, len));
      check(!busy1, "line 1 idle after schedule");
    end
    // back-to-back restart on the final step
    @(negedge clk); mask1 = 5'b11100; start1 = 1;
    @(negedge clk) start1 = 0;
    q = {}; for (int j = 2; j < 5; j++) q.push_back(L1[j]);
    for (int k = 0; k < 17; k++) @(negedge clk);
    check(done1, "done on step 18");
    start1 = 1; mask1 = 5'b11111;
    @(negedge clk) start1 = 0;
    check(st1.valid && st1.first && st1.filt == F_IA1, "restart right after the final step");
    // line 2
    @(negedge clk); start2 = 1;
    @(negedge clk) start2 = 0;
    q = {}; foreach (L2[j]) q.push_back(L2[j]);
    follow(2, q, 1, len);
    check(len == 52, $sformatf("line-2 length %0d", len));
    // line 3
    @(negedge clk); start3 = 1;
    @(negedge clk) start3 = 0;
    q = {}; foreach (L3[j]) q.push_back(L3[j]);
    follow(3, q, 4, len);
    check(len == 125, $sformatf("line-3 length %0d", len));
    check(!busy3 && !st3.valid, "line 3 idle after schedule");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

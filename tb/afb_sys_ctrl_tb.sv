// afb_sys_ctrl_tb -- checks the system controller on its own.
//
// The testbench plays the filter engine: one cycle after line 1 issues the
// last step of an IA1 or IA2 job it returns a random result on fb_*. It
// feeds input samples every 33 clocks (and sometimes later) and checks that
// each input sample and each returned result reaches the shared data bus one
// cycle later with the right one-hot in_oct, that the line-1 schedule length
// follows the sample phase (33, 18, 24, 18 cycles), that IA1 runs on even
// and IA2 on every fourth sample, that lines 2 and 3 start once per
// returned result and run 52 and 125 cycles, and that do_oct mirrors the
// three sequencers' activity.
module afb_sys_ctrl_tb;
  import afb_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic               in_valid = 0;
  logic signed [15:0] data_in = 0;
  logic               fb_valid = 0;
  logic [4:0]         fb_dest = 0;
  logic signed [15:0] fb_data = 0;
  logic [2:0]         in_oct, do_oct;
  logic signed [15:0] data;
  step_t              st1, st2, st3;

  afb_sys_ctrl dut (.*);

  // filter-engine stand-in and bus monitor
  int exp_data [$], exp_oct [$];
  int busy_len [3], len_hist [3][int];
  int n_ia1 = 0, n_ia2 = 0, n_in = 0, n_run1 = 0;
  always @(posedge clk) begin
    if (!rst) begin
      // what was on the bus last cycle must show up now
      for (int l = 0; l < 3; l++) begin
        if (do_oct[l]) busy_len[l]++;
        if (in_oct[l]) begin
          if (busy_len[l] > 0) len_hist[l][busy_len[l]]++;
          // line-1 schedule of input sample n_run1: 33 / 18 / 24 / 18 cycles
          if (l == 0 && busy_len[0] > 0) begin
            check(busy_len[0] == ((n_run1 % 4 == 0) ? 33 : (n_run1 % 4 == 2) ? 24 : 18),
                  $sformatf("sample %0d: line-1 schedule %0d cycles", n_run1, busy_len[0]));
            n_run1++;
          end
          busy_len[l] = 0;
        end
      end
      if (in_oct != 0) begin
        if (exp_oct.size() == 0) check(0, "unexpected bus write");
        else begin
          automatic int eo = exp_oct.pop_front();
          automatic int ed = exp_data.pop_front();
          check(int'(in_oct) == eo && int'(data) == ed,
                $sformatf("bus: in_oct %b data %0d, expected %b %0d", in_oct, data, eo, ed));
        end
      end
      check(do_oct == {st3.valid, st2.valid, st1.valid}, "do_oct shows the busy lines");
      if (in_valid) begin exp_oct.push_back(1); exp_data.push_back(int'(data_in)); n_in++; end
      if (fb_valid) begin
        exp_oct.push_back(fb_dest == DEST_DL2 ? 2 : 4); exp_data.push_back(int'(fb_data));
      end
      fb_valid <= 1'b0;
      if (st1.valid && st1.last && (st1.dest == DEST_DL2 || st1.dest == DEST_DL3)) begin
        fb_valid <= 1'b1;
        fb_dest  <= st1.dest;
        fb_data  <= 16'($urandom);
        if (st1.dest == DEST_DL2) n_ia1++; else n_ia2++;
      end
    end
  end

  localparam int NS = 80;
  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < NS; n++) begin
      @(negedge clk);
      in_valid = 1; data_in = 16'($urandom);
      @(negedge clk) in_valid = 0;
      repeat ((n % 9 == 8) ? 40 : 31) @(negedge clk);
    end
    repeat (300) @(negedge clk);
    for (int l = 0; l < 3; l++) if (busy_len[l] > 0) len_hist[l][busy_len[l]]++;
    check(exp_oct.size() == 0, "every bus write happened");
    check(n_ia1 == NS / 2 && n_ia2 == NS / 4, $sformatf("IA1 ran %0d times, IA2 %0d times", n_ia1, n_ia2));
    check(len_hist[0].num() == 3 && len_hist[0][33] == NS / 4 && len_hist[0][24] == NS / 4 &&
          len_hist[0][18] == NS / 2, $sformatf("line-1 schedule lengths %p", len_hist[0]));
    check(len_hist[1].num() == 1 && len_hist[1][52] == NS / 2, $sformatf("line-2 lengths %p", len_hist[1]));
    check(len_hist[2].num() == 1 && len_hist[2][125] == NS / 4, $sformatf("line-3 lengths %p", len_hist[2]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// afb_delay_line_tb -- checks the shift register and its symmetric pair reads.
//
// A 49-word, 3-multiplier delay line is filled with random samples while a
// model array shifts alongside. For every sub-filter that fits the line and
// every step of it, the testbench compares each multiplier's pair
// (x[i], x[N-1-i]) with the model, including the single centre tap of odd
// lengths, zeros beyond the last unique coefficient, zeros for an invalid
// step, and that the line holds its contents when `shift` is low.
module afb_delay_line_tb;
  import afb_pkg::*;

  localparam int DEPTH = 49, NMAC = 3;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic               shift = 0;
  logic signed [15:0] din = 0;
  step_t              st = '0;
  logic signed [15:0] da [NMAC], db [NMAC];
  int                 model [DEPTH];

  afb_delay_line #(.DEPTH(DEPTH), .NMAC(NMAC)) dut (.clk, .rst, .shift, .din, .st, .da, .db);

  task automatic push(int v);
    @(negedge clk);
    shift = 1; din = 16'(v);
    for (int k = DEPTH - 1; k > 0; k--) model[k] = model[k-1];
    model[0] = v;
    @(negedge clk) shift = 0;
  endtask

  task automatic check_all(string tag);
    // sub-filters that fit a 49-word line: IA1, IA2, H16, H17, H18
    int fl [5] = '{0, 1, 2, 3, 4};
    int tp [5] = '{35, 49, 41, 33, 27};
    for (int q = 0; q < 5; q++) begin
      int h = (tp[q] + 1) / 2;
      // offsets: none, centred on the line, and the largest that fits
      int offs [3] = '{0, (DEPTH - tp[q]) / 2, DEPTH - tp[q]};
      foreach (offs[o])
      for (int k = 0; k < (h + NMAC - 1) / NMAC; k++) begin
        st = '{valid: 1'b1, first: 1'b0, last: 1'b0, filt: filt_e'(fl[q]), step: 6'(k), dest: 5'd0, off: 7'(offs[o])};
        #1;
        for (int m = 0; m < NMAC; m++) begin
          int i = k * NMAC + m;
          int ea = (i < h) ? model[offs[o] + i] : 0;
          int eb = (i < h && tp[q] - 1 - i != i) ? model[offs[o] + tp[q] - 1 - i] : 0;
          check(int'(da[m]) == ea && int'(db[m]) == eb,
                $sformatf("%s filt %0d off %0d step %0d mac %0d: %0d/%0d expected %0d/%0d", tag, fl[q], offs[o], k, m, da[m], db[m], ea, eb));
        end
      end
    end
    st = '0;
    #1;
    for (int m = 0; m < NMAC; m++) check(da[m] == 0 && db[m] == 0, "invalid step reads zero");
  endtask

  initial begin
    for (int k = 0; k < DEPTH; k++) model[k] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    check_all("after reset");
    for (int n = 0; n < 60; n++) push($signed(16'($urandom)));
    check_all("filled");
    repeat (10) @(negedge clk);
    check_all("held");
    push(-32768); push(32767);
    check_all("extremes");
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

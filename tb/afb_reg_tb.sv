// afb_reg_tb -- checks the register module: coefficient and data addressing.
//
// Loads random coefficients, shifts random samples into the three delay
// lines through the one-hot in_oct select (each line gets a different
// number of samples), and then, for every sub-filter a line serves and
// every step, compares each multiplier's coefficient and sample pair with a
// model. The model uses its own table of tap lengths and coefficient base
// addresses (cumulative (N+1)/2 counts in the order IA1, IA2, H16, H17, H18,
// H9..H1).
module afb_reg_tb;
  import afb_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic [2:0]         in_oct = 0;
  logic signed [15:0] data = 0;
  step_t              st1 = '0, st2 = '0, st3 = '0;
  logic               coef_we = 0;
  logic [CAW-1:0]     coef_addr = 0;
  logic signed [15:0] coef_wdata = 0;
  logic signed [15:0] coef1 [3], d1a [3], d1b [3];
  logic signed [15:0] coef2 [1], d2a [1], d2b [1];
  logic signed [15:0] coef3 [4], d3a [4], d3b [4];

  afb_reg dut (.*);

  localparam int TAPS [14] = '{35, 49, 41, 33, 27, 67, 83, 95, 97, 97, 97, 97, 97, 97};
  int base [14];
  int cmem [513];
  int line [3][97];

  task automatic check_line(int l, int f, int nmac);
    int h = (TAPS[f] + 1) / 2;
    int off = (f < 2) ? 0 : (((l == 2) ? 97 : 41) - TAPS[f]) / 2;
    step_t s;
    for (int k = 0; k < (h + nmac - 1) / nmac; k++) begin
      s = '{valid: 1'b1, first: 1'b0, last: 1'b0, filt: filt_e'(f), step: 6'(k), dest: 5'd0, off: 7'(off)};
      st1 = '0; st2 = '0; st3 = '0;
      if (l == 0) st1 = s; else if (l == 1) st2 = s; else st3 = s;
      #1;
      for (int m = 0; m < nmac; m++) begin
        int i = k * nmac + m;
        int ec = (i < h) ? cmem[base[f] + i] : 0;
        int ea = (i < h) ? line[l][off + i] : 0;
        int eb = (i < h && TAPS[f] - 1 - i != i) ? line[l][off + TAPS[f] - 1 - i] : 0;
        int gc, ga, gb;
        gc = (l == 0) ? coef1[m] : (l == 1) ? coef2[m] : coef3[m];
        ga = (l == 0) ? d1a[m]   : (l == 1) ? d2a[m]   : d3a[m];
        gb = (l == 0) ? d1b[m]   : (l == 1) ? d2b[m]   : d3b[m];
        check(gc == ec && ga == ea && gb == eb,
              $sformatf("line %0d filt %0d step %0d mac %0d: %0d %0d %0d expected %0d %0d %0d",
                        l + 1, f, k, m, gc, ga, gb, ec, ea, eb));
      end
    end
    st1 = '0; st2 = '0; st3 = '0;
  endtask

  initial begin
    base[0] = 0;
    for (int f = 1; f < 14; f++) base[f] = base[f-1] + (TAPS[f-1] + 1) / 2;
    foreach (line[l, k]) line[l][k] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int a = 0; a < 513; a++) begin
      @(negedge clk);
      cmem[a] = $signed(16'($urandom));
      coef_we = 1; coef_addr = CAW'(a); coef_wdata = 16'(cmem[a]);
    end
    @(negedge clk) coef_we = 0;
    for (int n = 0; n < 300; n++) begin
      automatic int l = (n % 7 == 0) ? 2 : (n % 3 == 0) ? 1 : 0;
      automatic int v = $signed(16'($urandom));
      @(negedge clk);
      in_oct = 3'(1 << l); data = 16'(v);
      for (int k = 96; k > 0; k--) line[l][k] = line[l][k-1];
      line[l][0] = v;
    end
    @(negedge clk) in_oct = 0;
    for (int f = 0; f < 5; f++) check_line(0, f, 3);
    for (int f = 2; f < 5; f++) check_line(1, f, 1);
    for (int f = 2; f < 14; f++) check_line(2, f, 4);
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

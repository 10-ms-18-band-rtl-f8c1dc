// afb_coef_mem_tb -- checks the coefficient register file.
//
// After reset every word must read zero. The testbench then writes a random
// word to each of the 513 addresses, reads all of them back through all
// eight read ports (each port at a different address offset), checks that a
// write above the top address changes nothing and that an out-of-range read
// returns zero, and finally that a second reset clears the memory again.
module afb_coef_mem_tb;
  import afb_pkg::*;

  localparam int NRD = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic                 we = 0;
  logic [CAW-1:0]       waddr = 0;
  logic signed [15:0]   wdata = 0;
  logic [CAW-1:0]       raddr [NRD];
  logic signed [15:0]   rdata [NRD];
  int                   model [NCOEF];

  afb_coef_mem #(.NRD(NRD)) dut (.clk, .rst, .we, .waddr, .wdata, .raddr, .rdata);

  task automatic read_all(string tag, bit zero);
    for (int a = 0; a < NCOEF; a++) begin
      for (int p = 0; p < NRD; p++) raddr[p] = CAW'((a + 61 * p) % NCOEF);
      #1;
      for (int p = 0; p < NRD; p++)
        check(int'(rdata[p]) == (zero ? 0 : model[(a + 61 * p) % NCOEF]),
              $sformatf("%s port %0d addr %0d: %0d", tag, p, (a + 61 * p) % NCOEF, rdata[p]));
    end
  endtask

  initial begin
    for (int p = 0; p < NRD; p++) raddr[p] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    read_all("reset", 1);
    for (int a = 0; a < NCOEF; a++) begin
      @(negedge clk);
      model[a] = $signed(16'($urandom));
      we = 1; waddr = CAW'(a); wdata = 16'(model[a]);
    end
    @(negedge clk);
    we = 1; waddr = CAW'(NCOEF); wdata = 16'h1234;   // out of range: ignored
    @(negedge clk) we = 0;
    read_all("written", 0);
    raddr[0] = CAW'(1000);
    #1 check(rdata[0] == 0, "out-of-range read returns zero");
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    read_all("second reset", 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

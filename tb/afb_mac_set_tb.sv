// afb_mac_set_tb -- checks one 4-multiplier MAC set.
//
// Random jobs of 1 to 13 steps are fed with random coefficients and sample
// pairs. The expected result is the exact sum of (da+db)*coef over all steps,
// rounded to nearest at bit 15 and clipped to 16 bits; the testbench checks
// the result word, the destination tag, the one-cycle res_valid pulse, the
// saturation flag, and that jobs back to back restart the accumulator.
// Large operands are mixed in so that both clipping directions occur.
module afb_mac_set_tb;
  import afb_pkg::*;

  localparam int NMAC = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  step_t              st = '0;
  logic signed [15:0] coef [NMAC], da [NMAC], db [NMAC];
  logic               res_valid, sat;
  logic [4:0]         res_dest;
  logic signed [15:0] res;

  afb_mac_set #(.NMAC(NMAC)) dut (.clk, .rst, .st, .coef, .da, .db, .res_valid, .res_dest, .res, .sat);

  int n_pos_sat = 0, n_neg_sat = 0;

  initial begin
    for (int m = 0; m < NMAC; m++) begin coef[m] = 0; da[m] = 0; db[m] = 0; end
    repeat (2) @(negedge clk);
    rst = 0;
    for (int job = 0; job < 300; job++) begin
      automatic int     ns = 1 + $urandom % 13;
      automatic int     div = (job % 3 == 0) ? 1 : 64;
      automatic longint acc = 0;
      automatic int     dest = 1 + $urandom % 18;
      longint r;
      int     exp_res;
      bit     exp_sat;
      for (int k = 0; k < ns; k++) begin
        st = '{valid: 1'b1, first: k == 0, last: k == ns - 1, filt: F_H1, step: 6'(k), dest: 5'(dest), off: 7'd0};
        for (int m = 0; m < NMAC; m++) begin
          coef[m] = 16'($signed(16'($urandom)) / div);
          da[m]   = 16'($urandom);
          db[m]   = 16'($urandom);
          acc += (longint'(da[m]) + longint'(db[m])) * longint'(coef[m]);
        end
        @(negedge clk);
        if (k < ns - 1) check(!res_valid, "no result before the last step");
      end
      st = '0;
      r = (acc + 16384) >>> 15;
      exp_sat = (r > 32767) || (r < -32768);
      if (r > 32767) begin r = 32767; n_pos_sat++; end
      if (r < -32768) begin r = -32768; n_neg_sat++; end
      exp_res = int'(r);
      check(res_valid && int'(res) == exp_res && int'(res_dest) == dest && sat == exp_sat,
            $sformatf("job %0d: res %0d dest %0d sat %0d, expected %0d %0d %0d", job, res, res_dest, sat, exp_res, dest, exp_sat));
      if (job % 2 == 0) begin
        @(negedge clk);
        check(!res_valid, "res_valid lasts one cycle");
      end
    end
    check(n_pos_sat > 0 && n_neg_sat > 0, "both saturation directions exercised");
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

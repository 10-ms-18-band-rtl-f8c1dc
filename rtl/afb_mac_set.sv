// afb_mac_set -- one set of NMAC multiply-accumulate units.
//
// Each cycle with a valid step, multiplier m forms (da[m] + db[m]) * coef[m]
// (17-bit pre-add of the symmetric sample pair times a 16-bit coefficient)
// and the NMAC products are summed into one 40-bit accumulator. The first
// step of a job restarts the accumulator; on the last step the complete sum
// is rounded to nearest, shifted down by 15 bits (Q1.15 coefficients) and
// saturated to 16 bits, and appears on `res` with `res_valid` for one cycle
// after that clock edge, together with the job's destination `res_dest`.
// `sat` flags a result that was clipped. The number of MACs per set follows
// the published allocation (3, 1, 4); word formats are this design's choice.
module afb_mac_set
  import afb_pkg::*;
#(
  parameter int unsigned NMAC = 3
) (
  input  logic                  clk,
  input  logic                  rst,
  input  step_t                 st,
  input  logic signed [DW-1:0]  coef [NMAC],
  input  logic signed [DW-1:0]  da   [NMAC],
  input  logic signed [DW-1:0]  db   [NMAC],
  output logic                  res_valid,
  output logic [4:0]            res_dest,
  output logic signed [DW-1:0]  res,
  output logic                  sat
);

  logic signed [ACCW-1:0] acc, psum, acc_next, rnd;

  always_comb begin
    psum = '0;
    for (int unsigned m = 0; m < NMAC; m++)
      psum += ACCW'((DW+1)'(da[m]) + (DW+1)'(db[m])) * ACCW'(coef[m]);
    acc_next = (st.first ? ACCW'(0) : acc) + psum;
    rnd      = round_shift(acc_next);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc       <= '0;
      res_valid <= 1'b0;
      res_dest  <= '0;
      res       <= '0;
      sat       <= 1'b0;
    end else begin
      res_valid <= st.valid && st.last;
      if (st.valid) acc <= acc_next;
      if (st.valid && st.last) begin
        res      <= round_sat(acc_next);
        res_dest <= st.dest;
        sat      <= (rnd > OUT_MAX) || (rnd < OUT_MIN);
      end
    end
  end

endmodule

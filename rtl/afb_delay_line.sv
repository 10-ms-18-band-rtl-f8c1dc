// afb_delay_line -- data memory of one delay line, with symmetric read pairs.
//
// A DEPTH-word shift register of 16-bit samples; x[0] is the newest sample.
// `shift` moves every word one place and loads `din` into x[0]. All
// step word carries a tap offset `off`: a filter of N taps reads
// x[off..off+N-1], which lets shorter filters sit centred on the longest one
// of the line so that all its bands have the same delay. Because the filters
// are linear phase, the read side hands the MAC set, for each of its NMAC
// multipliers m, the pair of samples that share one coefficient: with
// i = step*NMAC + m, da = x[off+i] and db = x[off+N-1-i]. The
// centre tap of an odd-length filter reads db = 0 so it is counted once, and
// a multiplier with no work left in the last step of a job (i >= (N+1)/2)
// reads zeros. The reads are combinational from the registered step word.
// The depths (49, 41, 97) are those of the published design; the pairwise
// read ports correspond to the data1-x/data2-x/data3-x buses of the register
// module.
module afb_delay_line
  import afb_pkg::*;
#(
  parameter int unsigned DEPTH = 49,
  parameter int unsigned NMAC  = 3
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  shift,
  input  logic signed [DW-1:0]  din,
  input  step_t                 st,
  output logic signed [DW-1:0]  da [NMAC],
  output logic signed [DW-1:0]  db [NMAC]
);

  logic signed [DW-1:0] x [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned k = 0; k < DEPTH; k++) x[k] <= '0;
    end else if (shift) begin
      x[0] <= din;
      for (int unsigned k = 1; k < DEPTH; k++) x[k] <= x[k-1];
    end
  end

  always_comb begin
    for (int unsigned m = 0; m < NMAC; m++) begin
      int unsigned i, n, j;
      i = 32'(st.step) * NMAC + m;
      n = taps(st.filt);
      j = n - 1 - i;
      da[m] = '0;
      db[m] = '0;
      if (st.valid && i < half(st.filt) && 32'(st.off) + n <= DEPTH) begin
        da[m] = x[32'(st.off) + i];
        if (j != i) db[m] = x[32'(st.off) + j];
      end
    end
  end

endmodule

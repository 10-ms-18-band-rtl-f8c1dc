// afb_reg -- register module: coefficient memory plus the three delay lines.
//
// Line 1 (49 words) holds the 24 kHz input, line 2 (41 words) the IA1 output
// at 12 kHz and line 3 (97 words) the IA2 output at 6 kHz. `in_oct` selects
// which line shifts `data` in on this clock edge (one-hot, from the system
// controller). For every cycle of work the three step words st1..st3 select,
// per multiplier, one coefficient and the symmetric pair of samples it
// multiplies: coefficient address cbase(filt) + step*NMAC + m. The outputs
// coef1/d1a/d1b (3 multipliers), coef2/d2a/d2b (1) and coef3/d3a/d3b (4) are
// combinational and are consumed by the filter engine in the same cycle. The
// coefficient write port loads the coefficient memory.
module afb_reg
  import afb_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic [2:0]            in_oct,
  input  logic signed [DW-1:0]  data,
  input  step_t                 st1,
  input  step_t                 st2,
  input  step_t                 st3,
  input  logic                  coef_we,
  input  logic [CAW-1:0]        coef_addr,
  input  logic signed [DW-1:0]  coef_wdata,
  output logic signed [DW-1:0]  coef1 [NMAC1],
  output logic signed [DW-1:0]  d1a   [NMAC1],
  output logic signed [DW-1:0]  d1b   [NMAC1],
  output logic signed [DW-1:0]  coef2 [NMAC2],
  output logic signed [DW-1:0]  d2a   [NMAC2],
  output logic signed [DW-1:0]  d2b   [NMAC2],
  output logic signed [DW-1:0]  coef3 [NMAC3],
  output logic signed [DW-1:0]  d3a   [NMAC3],
  output logic signed [DW-1:0]  d3b   [NMAC3]
);

  localparam int unsigned NRD = NMAC1 + NMAC2 + NMAC3;

  afb_delay_line #(.DEPTH(DEPTH1), .NMAC(NMAC1)) u_dl1 (
    .clk, .rst, .shift(in_oct[0]), .din(data), .st(st1), .da(d1a), .db(d1b));
  afb_delay_line #(.DEPTH(DEPTH2), .NMAC(NMAC2)) u_dl2 (
    .clk, .rst, .shift(in_oct[1]), .din(data), .st(st2), .da(d2a), .db(d2b));
  afb_delay_line #(.DEPTH(DEPTH3), .NMAC(NMAC3)) u_dl3 (
    .clk, .rst, .shift(in_oct[2]), .din(data), .st(st3), .da(d3a), .db(d3b));

  logic [CAW-1:0]       raddr [NRD];
  logic signed [DW-1:0] rdata [NRD];

  // address of multiplier m of a step; NCOEF (reads as zero) when idle
  function automatic logic [CAW-1:0] caddr(step_t s, int unsigned nmac, int unsigned m);
    int unsigned i;
    i = 32'(s.step) * nmac + m;
    if (s.valid && i < half(s.filt)) return CAW'(cbase(s.filt) + i);
    return CAW'(NCOEF);
  endfunction

  always_comb begin
    for (int unsigned m = 0; m < NMAC1; m++) raddr[m] = caddr(st1, NMAC1, m);
    for (int unsigned m = 0; m < NMAC2; m++) raddr[NMAC1 + m] = caddr(st2, NMAC2, m);
    for (int unsigned m = 0; m < NMAC3; m++) raddr[NMAC1 + NMAC2 + m] = caddr(st3, NMAC3, m);
  end

  afb_coef_mem #(.NRD(NRD)) u_coef (
    .clk, .rst, .we(coef_we), .waddr(coef_addr), .wdata(coef_wdata),
    .raddr, .rdata);

  always_comb begin
    for (int unsigned m = 0; m < NMAC1; m++) coef1[m] = rdata[m];
    for (int unsigned m = 0; m < NMAC2; m++) coef2[m] = rdata[NMAC1 + m];
    for (int unsigned m = 0; m < NMAC3; m++) coef3[m] = rdata[NMAC1 + NMAC2 + m];
  end

endmodule

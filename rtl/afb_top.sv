// afb_top -- 10 ms, 18-band quasi-ANSI S1.11 1/3-octave analysis filter bank.
//
// Splits 24 kHz, 16-bit audio into the 18 standard 1/3-octave bands from
// 160 Hz to 8 kHz. The top octave (bands 16..18) is filtered at 24 kHz by
// three prototype filters H16..H18; IA1 plus decimation by 2 feeds the same
// three prototypes again for bands 13..15 at 12 kHz; IA2 plus decimation by
// 4 feeds them a third time for bands 10..12 and the nine relaxed filters
// H1..H9 for bands 1..9, all at 6 kHz. Three modules, as in the published
// low-power architecture: the system controller (schedule and input), the
// register module (coefficients and three delay lines of 49, 41 and 97
// words) and the filter engine (3 + 1 + 4 multipliers). One input sample may
// arrive every 33 clocks (792 kHz clock for 24 kHz audio). Band b's newest
// sample is data_out[b-1]; out_valid[b-1] pulses when it is updated.
// The coefficients are loaded through coef_we/coef_addr/coef_wdata after
// reset (the published design does not list them); see afb_pkg for the
// memory layout. `in_oct`/`do_oct` expose the controller's delay-line write
// and busy flags, `sat` pulses when a result was clipped to 16 bits.
module afb_top
  import afb_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic signed [DW-1:0]  data_in,
  input  logic                  coef_we,
  input  logic [CAW-1:0]        coef_addr,
  input  logic signed [DW-1:0]  coef_wdata,
  output logic [NBANDS-1:0]     out_valid,
  output logic signed [DW-1:0]  data_out [NBANDS],
  output logic [2:0]            in_oct,
  output logic [2:0]            do_oct,
  output logic                  sat
);

  step_t                st1, st2, st3;
  logic signed [DW-1:0] data;
  logic                 fb_valid;
  logic [4:0]           fb_dest;
  logic signed [DW-1:0] fb_data;
  logic signed [DW-1:0] coef1 [NMAC1], d1a [NMAC1], d1b [NMAC1];
  logic signed [DW-1:0] coef2 [NMAC2], d2a [NMAC2], d2b [NMAC2];
  logic signed [DW-1:0] coef3 [NMAC3], d3a [NMAC3], d3b [NMAC3];

  afb_sys_ctrl u_sys_ctrl (
    .clk, .rst, .in_valid, .data_in, .fb_valid, .fb_dest, .fb_data,
    .in_oct, .do_oct, .data, .st1, .st2, .st3);

  afb_reg u_reg (
    .clk, .rst, .in_oct, .data, .st1, .st2, .st3,
    .coef_we, .coef_addr, .coef_wdata,
    .coef1, .d1a, .d1b, .coef2, .d2a, .d2b, .coef3, .d3a, .d3b);

  afb_filter u_filter (
    .clk, .rst, .st1, .st2, .st3,
    .coef1, .d1a, .d1b, .coef2, .d2a, .d2b, .coef3, .d3a, .d3b,
    .fb_valid, .fb_dest, .fb_data, .out_valid, .data_out, .sat);

endmodule

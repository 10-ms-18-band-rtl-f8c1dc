// qansi_fb_top -- complete 18-band quasi-ANSI S1.11 filter bank: analysis
// bank, hooks for the per-band processing, and synthesis bank.
//
// Audio enters at 24 kHz (one sample every 33 clocks or more, 792 kHz clock)
// and is split into 18 1/3-octave bands by afb_top. The band samples leave
// the chip on band_out/band_out_valid, where the per-band gain or dynamic
// range compression (not part of this design) processes them and returns
// them on band_in/band_in_valid, in the same order and at the same rates.
// The synthesis bank sfb adds them back up per octave group, interpolates
// the two lower groups with IS1 = IA1 and IS2 = IA2, equalises the path
// delays and delivers one output sample (y_valid/y_out) per input sample.
// The sfb takes its output tick from in_valid. With the bands looped back
// unchanged, y starts 5 input samples after reset (the first low-band
// sum needs 4 sample periods) and then follows the input with 240 samples
// of filter delay (10 ms at 24 kHz) plus that start-up offset.
//
// One coefficient bus loads both banks: addresses 0..42 (IA1 and IA2) are
// written into both coefficient memories, as the interpolators reuse the
// decimation filters' coefficients. The split into analysis bank, external
// band processing and synthesis bank follows the published system; the
// loop-back ports and the shared coefficient bus are this design's own.
module qansi_fb_top
  import afb_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic signed [DW-1:0]  data_in,
  input  logic                  coef_we,
  input  logic [CAW-1:0]        coef_addr,
  input  logic signed [DW-1:0]  coef_wdata,
  // analysis bank outputs, to the per-band processing
  output logic [NBANDS-1:0]     band_out_valid,
  output logic signed [DW-1:0]  band_out [NBANDS],
  // processed bands, back into the synthesis bank
  input  logic [NBANDS-1:0]     band_in_valid,
  input  logic signed [DW-1:0]  band_in [NBANDS],
  // reconstructed output
  output logic                  y_valid,
  output logic signed [DW-1:0]  y_out,
  output logic                  y_started,
  // status
  output logic [2:0]            in_oct,
  output logic [2:0]            do_oct,
  output logic                  sat_afb,
  output logic                  sat_sfb
);

  afb_top u_afb (
    .clk, .rst, .in_valid, .data_in, .coef_we, .coef_addr, .coef_wdata,
    .out_valid(band_out_valid), .data_out(band_out), .in_oct, .do_oct, .sat(sat_afb));

  sfb u_sfb (
    .clk, .rst, .tick(in_valid), .band_valid(band_in_valid), .band_in,
    .coef_we, .coef_addr, .coef_wdata,
    .out_valid(y_valid), .data_out(y_out), .started(y_started), .sat(sat_sfb));

endmodule

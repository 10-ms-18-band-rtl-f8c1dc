// afb_filter -- filter engine: three independent MAC sets.
//
// Set 1 (3 multipliers) serves delay line 1, set 2 (1 multiplier) line 2 and
// set 3 (4 multipliers) line 3, the allocation of the published low-power
// design. Each set reads its coefficients and sample pairs from the register
// module in the same cycle as the step word. A finished job either updates a
// band output register (bands 16..18 from set 1, 13..15 from set 2, 1..12
// from set 3) or, for the decimation filters IA1/IA2 of set 1, is returned
// to the system controller on fb_* to be written into line 2 or 3.
// `data_out[b-1]` holds the latest sample of band b; `out_valid[b-1]` pulses
// for one cycle when it changes (band 16..18 once per input sample, 13..15
// every second, 1..12 every fourth). `sat` pulses when a result was clipped.
module afb_filter
  import afb_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  step_t                 st1,
  input  step_t                 st2,
  input  step_t                 st3,
  input  logic signed [DW-1:0]  coef1 [NMAC1],
  input  logic signed [DW-1:0]  d1a   [NMAC1],
  input  logic signed [DW-1:0]  d1b   [NMAC1],
  input  logic signed [DW-1:0]  coef2 [NMAC2],
  input  logic signed [DW-1:0]  d2a   [NMAC2],
  input  logic signed [DW-1:0]  d2b   [NMAC2],
  input  logic signed [DW-1:0]  coef3 [NMAC3],
  input  logic signed [DW-1:0]  d3a   [NMAC3],
  input  logic signed [DW-1:0]  d3b   [NMAC3],
  output logic                  fb_valid,
  output logic [4:0]            fb_dest,
  output logic signed [DW-1:0]  fb_data,
  output logic [NBANDS-1:0]     out_valid,
  output logic signed [DW-1:0]  data_out [NBANDS],
  output logic                  sat
);

  logic                 v1, v2, v3, s1, s2, s3;
  logic [4:0]           dst1, dst2, dst3;
  logic signed [DW-1:0] r1, r2, r3;

  afb_mac_set #(.NMAC(NMAC1)) u_mac1 (
    .clk, .rst, .st(st1), .coef(coef1), .da(d1a), .db(d1b),
    .res_valid(v1), .res_dest(dst1), .res(r1), .sat(s1));
  afb_mac_set #(.NMAC(NMAC2)) u_mac2 (
    .clk, .rst, .st(st2), .coef(coef2), .da(d2a), .db(d2b),
    .res_valid(v2), .res_dest(dst2), .res(r2), .sat(s2));
  afb_mac_set #(.NMAC(NMAC3)) u_mac3 (
    .clk, .rst, .st(st3), .coef(coef3), .da(d3a), .db(d3b),
    .res_valid(v3), .res_dest(dst3), .res(r3), .sat(s3));

  assign fb_valid = v1 && (dst1 == DEST_DL2 || dst1 == DEST_DL3);
  assign fb_dest  = dst1;
  assign fb_data  = r1;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= '0;
      sat       <= 1'b0;
      for (int unsigned b = 0; b < NBANDS; b++) data_out[b] <= '0;
    end else begin
      out_valid <= '0;
      sat       <= (v1 && s1) || (v2 && s2) || (v3 && s3);
      for (int unsigned b = 1; b <= NBANDS; b++) begin
        if (v1 && dst1 == 5'(b)) begin data_out[b-1] <= r1; out_valid[b-1] <= 1'b1; end
        if (v2 && dst2 == 5'(b)) begin data_out[b-1] <= r2; out_valid[b-1] <= 1'b1; end
        if (v3 && dst3 == 5'(b)) begin data_out[b-1] <= r3; out_valid[b-1] <= 1'b1; end
      end
    end
  end

endmodule

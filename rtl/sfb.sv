// sfb -- synthesis filter bank: recombines the 18 bands into one 24 kHz signal.
//
// The bands come back at the three rates of the analysis bank. They are
// summed per octave group as they arrive: bands 16..18 (top octave, fs),
// 13..15 (2nd octave, fs/2) and 1..12 (fs/4). A group is complete when its
// last band arrives (band 16, 13 and 1, the last jobs of the analysis
// schedules); its sum is queued. Each output tick (one per 24 kHz output
// sample, at most one every 33 clocks) takes one top-octave sum, every
// second tick a 2nd-octave sum and every fourth tick a low-group sum, so all
// three paths stay aligned on the same input sample. The 2nd-octave and
// low-group sums are up-sampled by zero stuffing into 35- and 49-word delay
// lines and interpolated by IS1 (= IA1 coefficients, gain 2) and IS2 (= IA2,
// gain 4), each on one multiplier with the symmetric pre-add: 18 and 25
// cycles per tick. Delay buffers equalise the paths to the 240-sample delay
// of the low group (IA2 24 + 4 x 48 + IS2 24): the top octave (20 samples)
// waits BUF_A samples, is added to the IS1 output (17 + 2 x 20 + 17 = 74
// samples) and the sum waits BUF_S more samples before the IS2 output is
// added: BUF_A + 74 + BUF_S = 240 and 20 + BUF_A + BUF_S = 240.
//
// Output starts at the first tick after the first low-group sum is queued;
// `data_out` is valid with the `out_valid` pulse about 28 clocks after a tick.
// The block structure (group sums, up-samplers, IS1/IS2, buffers) follows
// the published synthesis bank; the queues, the tick protocol, the
// coefficient port (the 43 IA1/IA2 words, same addresses as in the analysis
// bank) and the word formats are this design's own.
module sfb
  import afb_pkg::*;
#(
  parameter int unsigned BUF_A = 54,
  parameter int unsigned BUF_S = 166
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  tick,
  input  logic [NBANDS-1:0]     band_valid,
  input  logic signed [DW-1:0]  band_in [NBANDS],
  input  logic                  coef_we,
  input  logic [CAW-1:0]        coef_addr,
  input  logic signed [DW-1:0]  coef_wdata,
  output logic                  out_valid,
  output logic signed [DW-1:0]  data_out,
  output logic                  started,
  output logic                  sat
);

  localparam int unsigned GW = DW + 4;  // group sum width (up to 12 bands)

  function automatic logic signed [DW-1:0] sat16(logic signed [GW+2:0] v);
    if (v > (GW+3)'(32767)) return 16'sh7fff;
    if (v < -(GW+3)'(32768)) return 16'sh8000;
    return v[DW-1:0];
  endfunction

  // ---------------- group sums ----------------
  logic signed [GW-1:0] acc_a, acc_b, acc_c, add_a, add_b, add_c;
  logic                 push_a, push_b, push_c;

  always_comb begin
    add_a = '0; add_b = '0; add_c = '0;
    for (int unsigned b = 0; b < NBANDS; b++)
      if (band_valid[b]) begin
        if (b >= 15)      add_a += GW'(band_in[b]);
        else if (b >= 12) add_b += GW'(band_in[b]);
        else              add_c += GW'(band_in[b]);
      end
    push_a = band_valid[15];  // band 16
    push_b = band_valid[12];  // band 13
    push_c = band_valid[0];   // band 1
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_a <= '0; acc_b <= '0; acc_c <= '0;
    end else begin
      acc_a <= push_a ? '0 : acc_a + add_a;
      acc_b <= push_b ? '0 : acc_b + add_b;
      acc_c <= push_c ? '0 : acc_c + add_c;
    end
  end

  logic signed [DW-1:0] qa, qb, qc;
  logic                 ea, eb, ec, pop_a, pop_b, pop_c;

  sfb_fifo #(.DEPTH(8)) u_qa (.clk, .rst, .push(push_a), .din(sat16((GW+3)'(acc_a + add_a))),
    .pop(pop_a), .dout(qa), .empty(ea), .level());
  sfb_fifo #(.DEPTH(8)) u_qb (.clk, .rst, .push(push_b), .din(sat16((GW+3)'(acc_b + add_b))),
    .pop(pop_b), .dout(qb), .empty(eb), .level());
  sfb_fifo #(.DEPTH(8)) u_qc (.clk, .rst, .push(push_c), .din(sat16((GW+3)'(acc_c + add_c))),
    .pop(pop_c), .dout(qc), .empty(ec), .level());

  // ---------------- output ticks ----------------
  logic [1:0]           m;       // output sample phase
  logic                 go, sh;  // tick accepted / lines shift this edge
  logic signed [DW-1:0] a_q, b_in, c_in;

  assign go    = tick && (started || !ec);
  assign pop_a = go;
  assign pop_b = go && (started ? !m[0] : 1'b1);
  assign pop_c = go && (started ? (m == 2'd0) : 1'b1);

  always_ff @(posedge clk) begin
    if (rst) begin
      started <= 1'b0;
      m       <= '0;
      sh      <= 1'b0;
      a_q     <= '0;
      b_in    <= '0;
      c_in    <= '0;
    end else begin
      sh <= go;
      if (go) begin
        started <= 1'b1;
        m       <= started ? m + 2'd1 : 2'd1;
        a_q     <= qa;
        b_in    <= pop_b ? qb : '0;   // zero stuffing, factor 2
        c_in    <= pop_c ? qc : '0;   // zero stuffing, factor 4
      end
    end
  end

  // ---------------- interpolators IS1 and IS2 ----------------
  step_t                s1, s2;
  logic signed [DW-1:0] c1 [1], c2 [1], x1a [1], x1b [1], x2a [1], x2b [1];
  logic                 v1, v2, sat1, sat2;
  logic signed [DW-1:0] r1, r2;
  logic [CAW-1:0]       raddr [2];
  logic signed [DW-1:0] rdata [2];

  afb_seq #(.LINE(4), .NMAC(1), .NJOB(1)) u_seq1 (
    .clk, .rst, .start(sh), .job_mask(1'b1), .st(s1), .busy(), .done());
  afb_seq #(.LINE(5), .NMAC(1), .NJOB(1)) u_seq2 (
    .clk, .rst, .start(sh), .job_mask(1'b1), .st(s2), .busy(), .done());

  afb_delay_line #(.DEPTH(35), .NMAC(1)) u_is1_line (
    .clk, .rst, .shift(sh), .din(b_in), .st(s1), .da(x1a), .db(x1b));
  afb_delay_line #(.DEPTH(49), .NMAC(1)) u_is2_line (
    .clk, .rst, .shift(sh), .din(c_in), .st(s2), .da(x2a), .db(x2b));

  always_comb begin
    raddr[0] = s1.valid ? CAW'(cbase(F_IA1) + 32'(s1.step)) : CAW'(NCOEF_IS);
    raddr[1] = s2.valid ? CAW'(cbase(F_IA2) + 32'(s2.step)) : CAW'(NCOEF_IS);
    c1[0]    = rdata[0];
    c2[0]    = rdata[1];
  end

  afb_coef_mem #(.NRD(2), .NWORDS(NCOEF_IS)) u_coef (
    .clk, .rst, .we(coef_we), .waddr(coef_addr), .wdata(coef_wdata), .raddr, .rdata);

  afb_mac_set #(.NMAC(1)) u_mac1 (
    .clk, .rst, .st(s1), .coef(c1), .da(x1a), .db(x1b), .res_valid(v1), .res_dest(), .res(r1), .sat(sat1));
  afb_mac_set #(.NMAC(1)) u_mac2 (
    .clk, .rst, .st(s2), .coef(c2), .da(x2a), .db(x2b), .res_valid(v2), .res_dest(), .res(r2), .sat(sat2));

  // ---------------- delay equalisation and output ----------------
  // IS2 (25 steps) always finishes after IS1 (18 steps): its result pulse
  // closes the output sample.
  logic signed [DW-1:0] buf_a_out, buf_s_out, s_sum;
  always_comb s_sum = sat16((GW+3)'(buf_a_out) + ((GW+3)'(r1) <<< 1));

  sfb_buffer #(.DEPTH(BUF_A)) u_buf_a (.clk, .rst, .adv(v2), .din(a_q), .dout(buf_a_out));
  sfb_buffer #(.DEPTH(BUF_S)) u_buf_s (.clk, .rst, .adv(v2), .din(s_sum), .dout(buf_s_out));

  logic signed [GW+2:0] y_sum;
  always_comb y_sum = (GW+3)'(buf_s_out) + ((GW+3)'(r2) <<< 2);

  logic is1_done;  // IS1 result of the current tick is ready
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      data_out  <= '0;
      sat       <= 1'b0;
      is1_done  <= 1'b0;
    end else begin
      out_valid <= v2;
      if (v2) data_out <= sat16(y_sum);
      sat <= sat1 || sat2 ||
             (v2 && (y_sum > (GW+3)'(32767) || y_sum < -(GW+3)'(32768)));
      if (v1) is1_done <= 1'b1;
      else if (v2) is1_done <= 1'b0;
    end
  end

  // Every tick must find the queued group sums it consumes, and IS1 must be
  // finished when IS2 closes the output sample.
  always_ff @(posedge clk)
    if (!rst) begin
      assert (!(pop_a && ea)) else $error("sfb: tick before the top-octave sum is ready");
      assert (!(pop_b && eb)) else $error("sfb: tick before the 2nd-octave sum is ready");
      assert (!v2 || is1_done) else $error("sfb: IS2 finished before IS1");
    end

endmodule

// afb_sys_ctrl -- system controller of the analysis filter bank.
//
// It accepts one 16-bit input sample per `in_valid` pulse and keeps a
// two-bit sample phase that implements the recursive pyramid schedule:
// every sample runs the top-octave filters of line 1, even samples also run
// IA1 (decimation by 2) and samples with phase 0 also run IA2 (decimation by
// 4). The IA1 and IA2 results come back from the filter engine (`fb_*`) and
// are written into lines 2 and 3, which then run their own schedules. All
// writes into the delay lines share one data bus: `data` carries the word
// and the one-hot `in_oct` names the line that shifts it in on the next
// edge; the same edge starts that line's sequencer. `do_oct` shows which
// lines are computing. Three afb_seq instances generate the per-cycle step
// words st1..st3 for the register module and the filter engine.
//
// Timing: in_valid sampled at edge t -> line 1 shifts at t+1 and computes
// in the next 18/24/33 cycles, so `in_valid` may come at most once every
// CYCLES_PER_SAMPLE (33) clocks, i.e. 792 kHz for 24 kHz audio as in the
// published design. The IA jobs run first in a line-1 schedule, so their
// results never meet an input sample on the shared bus at that rate; both
// rules are checked by assertions. Register-level partitioning of the
// controller is this implementation's own.
module afb_sys_ctrl
  import afb_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic signed [DW-1:0]  data_in,
  input  logic                  fb_valid,
  input  logic [4:0]            fb_dest,
  input  logic signed [DW-1:0]  fb_data,
  output logic [2:0]            in_oct,
  output logic [2:0]            do_oct,
  output logic signed [DW-1:0]  data,
  output step_t                 st1,
  output step_t                 st2,
  output step_t                 st3
);

  logic [1:0]       phase;
  logic [NJOB1-1:0] mask1;
  logic busy1, busy2, busy3;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase  <= '0;
      in_oct <= '0;
      data   <= '0;
      mask1  <= '0;
    end else begin
      in_oct <= '0;
      if (in_valid) begin
        data   <= data_in;
        in_oct <= 3'b001;
        // job bits: 0 = IA1, 1 = IA2, 2..4 = bands 18..16
        mask1  <= {3'b111, phase == 2'd0, phase[0] == 1'b0};
        phase  <= phase + 2'd1;
      end else if (fb_valid && fb_dest == DEST_DL2) begin
        data   <= fb_data;
        in_oct <= 3'b010;
      end else if (fb_valid && fb_dest == DEST_DL3) begin
        data   <= fb_data;
        in_oct <= 3'b100;
      end
    end
  end

  afb_seq #(.LINE(1), .NMAC(NMAC1), .NJOB(NJOB1)) u_seq1 (
    .clk, .rst, .start(in_oct[0]), .job_mask(mask1), .st(st1), .busy(busy1), .done());
  afb_seq #(.LINE(2), .NMAC(NMAC2), .NJOB(NJOB2)) u_seq2 (
    .clk, .rst, .start(in_oct[1]), .job_mask({NJOB2{1'b1}}), .st(st2), .busy(busy2), .done());
  afb_seq #(.LINE(3), .NMAC(NMAC3), .NJOB(NJOB3)) u_seq3 (
    .clk, .rst, .start(in_oct[2]), .job_mask({NJOB3{1'b1}}), .st(st3), .busy(busy3), .done());

  assign do_oct = {busy3, busy2, busy1};

  // input-rate rule: at most one sample per CYCLES_PER_SAMPLE clocks
  int unsigned gap;
  always_ff @(posedge clk) begin
    if (rst) gap <= CYCLES_PER_SAMPLE;
    else if (in_valid) gap <= 1;
    else if (gap < CYCLES_PER_SAMPLE) gap <= gap + 1;
  end

  always_ff @(posedge clk)
    if (!rst) begin
      assert (!(in_valid && gap < CYCLES_PER_SAMPLE))
        else $error("afb_sys_ctrl: in_valid %0d cycles after the previous one", gap);
      assert (!(in_valid && fb_valid))
        else $error("afb_sys_ctrl: input sample and decimator result collide");
    end

endmodule

// afb_seq -- schedule sequencer of one delay line.
//
// Each delay line owns a set of NMAC multipliers. When `start` is pulsed
// (in the same clock edge that shifts the new sample into the delay line)
// the sequencer walks through the jobs of its line that are enabled in
// `job_mask`, in list order, and for each job issues ceil(((N+1)/2)/NMAC)
// consecutive steps, one per clock. A step carries the sub-filter, the step
// index and first/last flags so that the register module can address the
// coefficients and symmetric data pairs and the MAC set can restart and
// flush its accumulator. Steps are back to back, with no idle cycle between
// jobs, so a line needs exactly the sum of its job step counts: 33, 24 or 18
// cycles for line 1 (3 MACs), 52 for line 2 (1 MAC), 125 for line 3 (4 MACs).
//
// Interface: `st` is registered and valid in the cycles after the start
// edge. `done` is high while the final step of the schedule is issued; a new
// start is legal only then or when the sequencer is idle (checked by an
// assertion). The job lists come from afb_pkg::job_of; the job order inside a
// line is this implementation's choice.
module afb_seq
  import afb_pkg::*;
#(
  parameter int unsigned LINE = 1,
  parameter int unsigned NMAC = 3,
  parameter int unsigned NJOB = 5
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [NJOB-1:0]   job_mask,
  output step_t             st,
  output logic              busy,
  output logic              done
);

  logic [NJOB-1:0] mask_q;
  logic [3:0]      job_q;

  // first enabled job at or after index `from`; returns NJOB if none
  function automatic int unsigned next_job(logic [NJOB-1:0] m, int unsigned from);
    int unsigned r;
    r = NJOB;
    for (int unsigned j = NJOB; j > 0; j--)
      if ((j - 1) >= from && m[j-1]) r = j - 1;
    return r;
  endfunction

  function automatic step_t first_step(int unsigned j);
    step_t s;
    job_t  jb;
    jb      = job_of(LINE, j);
    s.valid = 1'b1;
    s.first = 1'b1;
    s.last  = (steps(jb.filt, NMAC) == 1);
    s.filt  = jb.filt;
    s.step  = '0;
    s.dest  = jb.dest;
    s.off   = jb.off;
    return s;
  endfunction

  int unsigned start_job, cont_job;
  always_comb begin
    start_job = next_job(job_mask, 0);
    cont_job  = next_job(mask_q, int'(job_q) + 1);
  end

  assign busy = st.valid;
  assign done = st.valid && st.last && (cont_job == NJOB);

  always_ff @(posedge clk) begin
    if (rst) begin
      st     <= '0;
      mask_q <= '0;
      job_q  <= '0;
    end else if (start) begin
      mask_q <= job_mask;
      if (start_job < NJOB) begin
        st    <= first_step(start_job);
        job_q <= 4'(start_job);
      end else begin
        st <= '0;
      end
    end else if (st.valid) begin
      if (!st.last) begin
        st.step  <= st.step + 6'd1;
        st.first <= 1'b0;
        st.last  <= (32'(st.step) + 2 == steps(st.filt, NMAC));
      end else if (cont_job < NJOB) begin
        st    <= first_step(cont_job);
        job_q <= 4'(cont_job);
      end else begin
        st <= '0;
      end
    end
  end

  // A new schedule may only start when the previous one is finishing.
  always_ff @(posedge clk)
    if (!rst && start)
      assert (!st.valid || done)
        else $error("afb_seq line %0d: start while schedule still running", LINE);

endmodule

// sfb_fifo -- small first-in first-out queue of 16-bit samples.
//
// Holds the group sums of the synthesis bank between the moment the analysis
// bank finishes a group and the output tick that consumes it. DEPTH words in
// a register array with read and write pointers; `push` and `pop` may occur
// in the same cycle. `dout` shows the oldest word combinationally. Pushing
// into a full or popping an empty queue is an error caught by assertions.
module sfb_fifo #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned W     = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 push,
  input  logic signed [W-1:0]  din,
  input  logic                 pop,
  output logic signed [W-1:0]  dout,
  output logic                 empty,
  output logic [$clog2(DEPTH+1)-1:0] level
);

  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned LW = $clog2(DEPTH+1);
  logic signed [W-1:0] mem [DEPTH];
  logic [PW-1:0]       wp, rp;

  assign empty = (level == 0);
  assign dout  = mem[rp];

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      level <= '0;
      for (int unsigned k = 0; k < DEPTH; k++) mem[k] <= '0;
    end else begin
      if (push) begin
        mem[wp] <= din;
        wp      <= (32'(wp) == DEPTH - 1) ? '0 : wp + 1'b1;
      end
      if (pop) rp <= (32'(rp) == DEPTH - 1) ? '0 : rp + 1'b1;
      level <= level + LW'(push) - LW'(pop);
    end
  end

  always_ff @(posedge clk)
    if (!rst) begin
      assert (!(push && !pop && 32'(level) == DEPTH)) else $error("sfb_fifo: overflow");
      assert (!(pop && level == 0)) else $error("sfb_fifo: underflow");
    end

endmodule

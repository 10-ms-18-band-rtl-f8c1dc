// sfb_buffer -- delay-equalising buffer of the synthesis bank.
//
// A DEPTH-word shift register advanced once per output sample (`adv`): `dout`
// is `din` delayed by DEPTH samples. The synthesis bank uses two of them so
// that the top-octave and the 2nd-octave paths leave with the same delay as
// the slowest (low-frequency) path, which keeps every band at the same phase
// shift. Reset clears the contents.
module sfb_buffer #(
  parameter int unsigned DEPTH = 166,
  parameter int unsigned W     = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                adv,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] dout
);

  logic signed [W-1:0] q [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned k = 0; k < DEPTH; k++) q[k] <= '0;
    end else if (adv) begin
      q[0] <= din;
      for (int unsigned k = 1; k < DEPTH; k++) q[k] <= q[k-1];
    end
  end

  assign dout = q[DEPTH-1];

endmodule

// afb_coef_mem -- coefficient memory of the 14 sub-filters.
//
// NWORDS 16-bit words (513 for the analysis bank, the 43 IA1/IA2 words for
// the synthesis bank) held in registers, as in the published chip,
// which built all its memories from 16-bit registers. Each sub-filter keeps
// one word per symmetric coefficient pair, (N+1)/2 words, at the base address
// afb_pkg::cbase(). The published design calls this a ROM but does not print
// its contents, so here it is loaded through a synchronous write port
// (we/waddr/wdata) after reset; reset clears it to zero. NRD combinational
// read ports serve all multipliers of the three MAC sets in the same cycle.
// A read with an address outside the memory returns zero.
module afb_coef_mem
  import afb_pkg::*;
#(
  parameter int unsigned NRD    = 8,
  parameter int unsigned NWORDS = NCOEF
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  we,
  input  logic [CAW-1:0]        waddr,
  input  logic signed [DW-1:0]  wdata,
  input  logic [CAW-1:0]        raddr [NRD],
  output logic signed [DW-1:0]  rdata [NRD]
);

  localparam int unsigned IW = $clog2(NWORDS);
  logic signed [DW-1:0] mem [NWORDS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned k = 0; k < NWORDS; k++) mem[k] <= '0;
    end else if (we && 32'(waddr) < NWORDS) begin
      mem[IW'(waddr)] <= wdata;
    end
  end

  always_comb
    for (int unsigned p = 0; p < NRD; p++)
      rdata[p] = (32'(raddr[p]) < NWORDS) ? mem[IW'(raddr[p])] : '0;

endmodule

// fpfa_outreg: bypassable 20-bit output register between an ALU output and the
// crossbar.
//
// With load high the ALU output is captured at the clock edge. With bypass high
// the crossbar sees the ALU output in the same cycle; otherwise it sees the
// stored value. That the register can be bypassed is the document's; the
// separate load enable and synchronous active-low reset are this design's.
module fpfa_outreg
  import fpfa_pkg::*;
#(
  parameter int W = DW
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         bypass,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] r;

  always_ff @(posedge clk) begin
    if (!rst_n)    r <= '0;
    else if (load) r <= d;
  end

  assign q = bypass ? d : r;

endmodule

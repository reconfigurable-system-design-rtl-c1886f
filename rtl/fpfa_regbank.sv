// fpfa_regbank: one input register bank of a processing part, four 20-bit
// registers in front of one ALU input.
//
// A register is written from the crossbar at the clock edge when we is high;
// the ALU reads the register named by raddr combinationally. The bank size and
// width are the document's; asynchronous read and clearing on reset are this
// design's choices. rst_n is synchronous, active low.
module fpfa_regbank
  import fpfa_pkg::*;
#(
  parameter int NREG = 4,
  parameter int W    = DW
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    we,
  input  logic [$clog2(NREG)-1:0] waddr,
  input  logic [W-1:0]            wdata,
  input  logic [$clog2(NREG)-1:0] raddr,
  output logic [W-1:0]            rdata
);

  logic [NREG-1:0][W-1:0] r;

  always_ff @(posedge clk) begin
    if (!rst_n)  r <= '0;
    else if (we) r[waddr] <= wdata;
  end

  assign rdata = r[raddr];

endmodule

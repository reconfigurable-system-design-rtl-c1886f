// fpfa_cfgreg: configuration register of one data-path entity.
//
// Holds DEPTH configurations of WIDTH control bits (the document's CR1..CR5 are
// 4x32 or 8x32). Before a program runs the host fills the entries through the
// write port; while it runs, the decoder's select picks the configuration that
// drives the entity this cycle. The select-to-output path is a combinational
// multiplexer; the write port is this design's loading path. The entries are
// cleared by reset so that an unloaded entry configures nothing.
module fpfa_cfgreg #(
  parameter int DEPTH = 4,
  parameter int WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] sel,
  output logic [WIDTH-1:0]         cfg
);

  logic [DEPTH-1:0][WIDTH-1:0] entry;

  always_ff @(posedge clk) begin
    if (!rst_n)  entry <= '0;
    else if (we) entry[waddr] <= wdata;
  end

  assign cfg = entry[sel];

endmodule

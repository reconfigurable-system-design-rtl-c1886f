// fpfa_decoder: vertical-microprogram decoder of the tile.
//
// A writable table of 64 entries, one per 6-bit tile instruction code. Each
// entry holds the 50 configuration-register select signals of the tile: 10 per
// processing part (CR1 2 bits, CR2 3, CR3 3, CR4/CR5 shared 2). The sequencer's
// code indexes the table combinationally. Table size and output width are the
// document's; the write port and asynchronous read are this design's. The table
// is not reset: the host loads it before a program runs.
module fpfa_decoder
  import fpfa_pkg::*;
(
  input  logic                  clk,
  input  logic                  we,
  input  logic [CODE_W-1:0]     waddr,
  input  ppsel_t [NPP-1:0]      wdata,
  input  logic [CODE_W-1:0]     code,
  output ppsel_t [NPP-1:0]      sel
);

  ppsel_t [NPP-1:0] table_q [2**CODE_W];

  always_ff @(posedge clk)
    if (we) table_q[waddr] <= wdata;

  assign sel = table_q[code];

endmodule

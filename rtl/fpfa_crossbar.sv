// fpfa_crossbar: the tile crossbar, NBUS shared 20-bit buses.
//
// Every source of the tile (per processing part: the two output registers and
// the two memory read ports) has a bus driver: when its enable is high it puts
// its data on the bus it names. The drivers drawn as tri-state buffers are
// modelled as an OR of the enabled sources, so an undriven bus reads 0. Two
// sources on one bus is a programming error; it is reported on conflict (the
// tile asserts it never happens while a program runs). Register banks and
// memories pick a bus with a multiplexer of their own (fpfa_pkg::bus_pick).
// The crossbar itself is the document's; the bus count and the driver scheme
// are this design's. Purely combinational.
module fpfa_crossbar
  import fpfa_pkg::*;
#(
  parameter int NSRC = NPP * NSRC_PP
) (
  input  logic [NSRC-1:0][DW-1:0]  src_data,
  input  logic [NSRC-1:0]          src_en,
  input  logic [NSRC-1:0][BSW-1:0] src_bus,
  output logic [NBUS-1:0][DW-1:0]  bus,
  output logic                     conflict
);

  always_comb begin
    bus      = '0;
    conflict = 1'b0;
    for (int k = 0; k < NBUS; k++) begin
      int unsigned n;
      n = 0;
      for (int s = 0; s < NSRC; s++) begin
        if (src_en[s] && int'(src_bus[s]) == k) begin
          bus[k] = bus[k] | src_data[s];
          n++;
        end
      end
      if (n > 1) conflict = 1'b1;
    end
  end

endmodule

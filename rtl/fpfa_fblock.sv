// fpfa_fblock: level-one reconfigurable function block of the FPFA ALU (f1, f2, f3).
//
// Computes one of five operations on two 20-bit two's-complement operands:
// add, subtract, absolute value, minimum and maximum. The five operations are
// the document's; the absolute value of a two-input block is read as |x - y|,
// which is what the example f3 = abs((a+b) - max(c,d)) needs. Results wrap at
// 20 bits; an undefined op code gives 0. Purely combinational.
module fpfa_fblock
  import fpfa_pkg::*;
#(
  parameter int W = DW
) (
  input  fop_e         op,
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] z
);

  logic signed [W-1:0] sx, sy, diff;

  always_comb begin
    sx   = signed'(x);
    sy   = signed'(y);
    diff = sx - sy;
    unique case (op)
      F_ADD:   z = x + y;
      F_SUB:   z = diff;
      F_ABS:   z = diff[W-1] ? -diff : diff;
      F_MIN:   z = (sx < sy) ? x : y;
      F_MAX:   z = (sx > sy) ? x : y;
      default: z = '0;
    endcase
  end

endmodule

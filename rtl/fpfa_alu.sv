// fpfa_alu: the three-level FPFA ALU (four 20-bit inputs a..d, two 20-bit outputs).
//
// Level 1: Z1 = f3(f1(a,b), f2(c,d)), three function blocks (fpfa_fblock).
// Level 2: a 19x19-bit unsigned multiplier on the operand magnitudes, with the
//   product sign the XOR of the operand signs (a 38-bit magnitude plus sign), and
//   a 40-bit adder: MAC = X*Y +/- E with X from a|b|c|d (mX), Y from a|b|c|d|Z1
//   (mY) and E from 0|d_fp|d_se|east (mE); cta selects subtraction. Z2 (mZ) is
//   either Z1 (sign-extended) or MAC. Z2 also leaves on the West output so that a
//   neighbouring ALU can add it through its East input.
// Level 3: B from 0|c_se|{c,d}|c_fp (mB); o1 = B + Z2 and o2 = B - Z2 form a
//   butterfly. out1 = o1_fp|o1_low|o1_high|o2_low, out2 = o2_fp|o2_low|o2_high|o1_high.
//
// The structure, the multiplexer choices and the control names follow the
// document. This design's own choices: the fixed-point position (x_fp = x << 15,
// o_fp = o >> 15, for Q1.15 operands), "low"/"high" as bits 19:0 and 39:20, "c & d"
// as the concatenation {c,d}, and magnitudes truncated to 19 bits (so -2^19 acts
// as 0 in the multiplier). Purely combinational; the configuration comes from CR1.
module fpfa_alu
  import fpfa_pkg::*;
(
  input  alu_fn_t        cfg,
  input  logic [DW-1:0]  a,
  input  logic [DW-1:0]  b,
  input  logic [DW-1:0]  c,
  input  logic [DW-1:0]  d,
  input  logic [ZW-1:0]  east,
  output logic [ZW-1:0]  west,
  output logic [DW-1:0]  out1,
  output logic [DW-1:0]  out2
);

  // ---------------- level 1 ----------------
  logic [DW-1:0] f1z, f2z, z1;

  fpfa_fblock u_f1 (.op(cfg.ctf1), .x(a),   .y(b),   .z(f1z));
  fpfa_fblock u_f2 (.op(cfg.ctf2), .x(c),   .y(d),   .z(f2z));
  fpfa_fblock u_f3 (.op(cfg.ctf3), .x(f1z), .y(f2z), .z(z1));

  // ---------------- level 2 ----------------
  logic [DW-1:0]         mx, my;
  logic signed [ZW-1:0]  me, mac, z2;
  logic [MAGW-1:0]       magx, magy;
  logic [2*MAGW-1:0]     prod_mag;
  logic signed [ZW-1:0]  prod;

  function automatic logic [MAGW-1:0] mag(input logic [DW-1:0] v);
    logic [DW-1:0] t;
    t = v[DW-1] ? -v : v;
    return t[MAGW-1:0];
  endfunction

  always_comb begin
    unique case (cfg.selmx)
      MX_A: mx = a;
      MX_B: mx = b;
      MX_C: mx = c;
      MX_D: mx = d;
    endcase
    case (cfg.selmy)
      MY_A:    my = a;
      MY_B:    my = b;
      MY_C:    my = c;
      MY_D:    my = d;
      default: my = z1;
    endcase
    unique case (cfg.selme)
      ME_ZERO: me = '0;
      ME_DFP:  me = to_fp(d);
      ME_DSE:  me = sext(d);
      ME_EAST: me = signed'(east);
    endcase
    magx     = mag(mx);
    magy     = mag(my);
    prod_mag = magx * magy;
    prod     = (mx[DW-1] ^ my[DW-1]) ? -ZW'(prod_mag) : ZW'(prod_mag);
    mac      = cfg.cta ? prod - me : prod + me;
    z2       = (cfg.selmz == MZ_MAC) ? mac : sext(z1);
  end

  assign west = z2;

  // ---------------- level 3 ----------------
  logic signed [ZW-1:0] mb, o1, o2, o1fp, o2fp;

  always_comb begin
    unique case (cfg.selmb)
      MB_ZERO: mb = '0;
      MB_CSE:  mb = sext(c);
      MB_CD:   mb = {c, d};
      MB_CFP:  mb = to_fp(c);
    endcase
    o1   = mb + z2;
    o2   = mb - z2;
    o1fp = o1 >>> FP_SHIFT;
    o2fp = o2 >>> FP_SHIFT;
    unique case (cfg.selmo1)
      MO1_O1FP: out1 = o1fp[DW-1:0];
      MO1_O1LO: out1 = o1[DW-1:0];
      MO1_O1HI: out1 = o1[ZW-1:DW];
      MO1_O2LO: out1 = o2[DW-1:0];
    endcase
    unique case (cfg.selmo2)
      MO2_O2FP: out2 = o2fp[DW-1:0];
      MO2_O2LO: out2 = o2[DW-1:0];
      MO2_O2HI: out2 = o2[ZW-1:DW];
      MO2_O1HI: out2 = o1[ZW-1:DW];
    endcase
  end

endmodule

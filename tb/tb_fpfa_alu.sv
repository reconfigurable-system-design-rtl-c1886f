// tb_fpfa_alu: drives the ALU with random configurations and operands and
// compares out1, out2 and west with a reference model written with 64-bit
// integer arithmetic. Also runs directed cases: the level-one example
// abs((a+b) - max(c,d)), a fixed-point multiply-add, linear interpolation in a
// single ALU pass, and a radix-2 butterfly split over two chained ALUs.
module tb_fpfa_alu;
  import fpfa_pkg::*;

  alu_fn_t       cfg, cfg2;
  logic [DW-1:0] a, b, c, d, o1, o2, p1, p2;
  logic [ZW-1:0] east, west, west2;
  int checks = 0, failures = 0;

  fpfa_alu dut  (.cfg(cfg),  .a, .b, .c, .d, .east, .west, .out1(o1), .out2(o2));
  // second ALU for the butterfly: its West output feeds dut's East input
  logic [DW-1:0] a2, b2, c2, d2;
  fpfa_alu dut2 (.cfg(cfg2), .a(a2), .b(b2), .c(c2), .d(d2), .east(40'd0), .west(west2), .out1(p1), .out2(p2));

  function automatic longint s(input logic [DW-1:0] v); return longint'(signed'(v)); endfunction

  function automatic longint fb(input fop_e o, input longint x, input longint y);
    longint r;
    case (o)
      F_ADD: r = x + y;  F_SUB: r = x - y;
      F_ABS: begin r = (x - y) & 64'hFFFFF; if (r >= 64'h80000) r -= 64'h100000; r = (r < 0) ? -r : r; end
      F_MIN: r = (x < y) ? x : y;  F_MAX: r = (x > y) ? x : y;
      default: r = 0;
    endcase
    // wrap to 20 bits signed
    r = r & 64'hFFFFF; if (r >= 64'h80000) r -= 64'h100000;
    return r;
  endfunction

  function automatic longint wrap40(input longint v);
    longint r; r = v & 64'hFF_FFFF_FFFF; if (r >= 64'h80_0000_0000) r -= 64'h100_0000_0000; return r;
  endfunction

  function automatic longint magn(input longint v);
    longint m; m = (v < 0) ? -v : v; return m & 64'h7FFFF;
  endfunction

  task automatic check(input string what);
    longint av, bv, cv, dv, z1, x, y, e, pr, z2, bb, r1, r2;
    logic [DW-1:0] e1, e2;
    av = s(a); bv = s(b); cv = s(c); dv = s(d);
    z1 = fb(cfg.ctf3, fb(cfg.ctf1, av, bv), fb(cfg.ctf2, cv, dv));
    case (cfg.selmx) MX_A: x = av; MX_B: x = bv; MX_C: x = cv; default: x = dv; endcase
    case (cfg.selmy) MY_A: y = av; MY_B: y = bv; MY_C: y = cv; MY_D: y = dv; default: y = z1; endcase
    case (cfg.selme) ME_ZERO: e = 0; ME_DFP: e = dv * 32768; ME_DSE: e = dv; default: e = longint'(signed'(east)); endcase
    pr = magn(x) * magn(y); if ((x < 0) != (y < 0)) pr = -pr;
    z2 = (cfg.selmz == MZ_MAC) ? wrap40(cfg.cta ? pr - e : pr + e) : z1;
    case (cfg.selmb) MB_ZERO: bb = 0; MB_CSE: bb = cv; MB_CD: bb = wrap40(cv * 1048576 + (dv & 64'hFFFFF)); default: bb = cv * 32768; endcase
    r1 = wrap40(bb + z2); r2 = wrap40(bb - z2);
    case (cfg.selmo1) MO1_O1FP: e1 = DW'(r1 >>> 15); MO1_O1LO: e1 = DW'(r1); MO1_O1HI: e1 = DW'(r1 >>> 20); default: e1 = DW'(r2); endcase
    case (cfg.selmo2) MO2_O2FP: e2 = DW'(r2 >>> 15); MO2_O2LO: e2 = DW'(r2); MO2_O2HI: e2 = DW'(r2 >>> 20); default: e2 = DW'(r1 >>> 20); endcase
    checks += 3;
    if (o1 !== e1 || o2 !== e2 || west !== ZW'(z2)) begin
      failures++;
      if (failures < 10) $display("FAIL %s cfg=%h a=%h b=%h c=%h d=%h: out1=%h/%h out2=%h/%h west=%h/%h",
        what, cfg, a, b, c, d, o1, e1, o2, e2, west, ZW'(z2));
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg2 = '0; a2 = '0; b2 = '0; c2 = '0; d2 = '0;
    for (int i = 0; i < 3000; i++) begin
      cfg.ctf1 = fop_e'($urandom_range(0, 4)); cfg.ctf2 = fop_e'($urandom_range(0, 4)); cfg.ctf3 = fop_e'($urandom_range(0, 4));
      cfg.selmx = selmx_e'($urandom_range(0, 3)); cfg.selmy = selmy_e'($urandom_range(0, 4));
      cfg.selme = selme_e'($urandom_range(0, 3)); cfg.cta = 1'($urandom); cfg.selmz = selmz_e'($urandom_range(0, 1));
      cfg.selmb = selmb_e'($urandom_range(0, 3)); cfg.selmo1 = selmo1_e'($urandom_range(0, 3)); cfg.selmo2 = selmo2_e'($urandom_range(0, 3));
      if (i % 2 == 0) begin
        a = DW'(signed'(16'($urandom))); b = DW'(signed'(16'($urandom)));
        c = DW'(signed'(16'($urandom))); d = DW'(signed'(16'($urandom)));
      end else begin
        a = DW'($urandom); b = DW'($urandom); c = DW'($urandom); d = DW'($urandom);
        if (a == 20'h80000) a = 0;
        if (b == 20'h80000) b = 0;
        if (c == 20'h80000) c = 0;
        if (d == 20'h80000) d = 0;
      end
      east = {8'($urandom), 32'($urandom)};
      #1; check("random");
    end

    // Z1 = abs((a+b) - max(c,d)) on out1 (o1_low, Z2 = Z1, B = 0)
    cfg = '0; cfg.ctf1 = F_ADD; cfg.ctf2 = F_MAX; cfg.ctf3 = F_ABS; cfg.selmz = MZ_Z1;
    cfg.selmb = MB_ZERO; cfg.selmo1 = MO1_O1LO; cfg.selmo2 = MO2_O2LO;
    a = 20'd3; b = 20'd4; c = 20'd20; d = -20'sd2; east = '0; #1;
    checks++; if (o1 !== 20'd13) begin failures++; $display("FAIL example out1=%0d", o1); end
    checks++; if (o2 !== -20'sd13) begin failures++; $display("FAIL example out2=%0d", signed'(o2)); end

    // Linear interpolation: a=F1, b=xf, c=F0, d=xf; Z1=(a-b)-(c-d)=F1-F0,
    // Z2 = d*Z1, out1 = (F0<<15 + Z2) >> 15 = F0 + xf*(F1-F0)
    cfg = '0; cfg.ctf1 = F_SUB; cfg.ctf2 = F_SUB; cfg.ctf3 = F_SUB; cfg.selmx = MX_D; cfg.selmy = MY_Z1;
    cfg.selme = ME_ZERO; cfg.selmz = MZ_MAC; cfg.selmb = MB_CFP; cfg.selmo1 = MO1_O1FP;
    a = 20'd1000; b = 20'd16384; c = 20'd200; d = 20'd16384; #1;   // xf = 0.5
    checks++; if (o1 !== 20'd600) begin failures++; $display("FAIL interp out1=%0d", o1); end
    a = -20'sd400; b = 20'd8192; c = 20'd400; d = 20'd8192; #1;    // xf = 0.25
    checks++; if (o1 !== 20'd200) begin failures++; $display("FAIL interp2 out1=%0d", signed'(o1)); end

    // Butterfly real part: dut2 Z2 = Wim*bim ; dut Z2 = Wre*bre - east,
    // out1 = a_re + Z2, out2 = a_re - Z2 (all Q1.15)
    cfg2 = '0; cfg2.selmx = MX_A; cfg2.selmy = MY_B; cfg2.selmz = MZ_MAC; cfg2.selme = ME_ZERO;
    a2 = 20'd8192; b2 = -20'sd16384;                // Wim = 0.25, bim = -0.5
    cfg = '0; cfg.selmx = MX_A; cfg.selmy = MY_B; cfg.selme = ME_EAST; cfg.cta = 1'b1; cfg.selmz = MZ_MAC;
    cfg.selmb = MB_CFP; cfg.selmo1 = MO1_O1FP; cfg.selmo2 = MO2_O2FP;
    a = 20'd16384; b = 20'd16384; c = 20'd4096; d = '0;   // Wre = 0.5, bre = 0.5, are = 0.125
    #1; east = west2; #1;
    // Wre*bre - Wim*bim = 0.25 + 0.125 = 0.375 ; A = 0.5, B = -0.25
    checks++; if (o1 !== 20'd16384) begin failures++; $display("FAIL bfly A=%0d", signed'(o1)); end
    checks++; if (o2 !== -20'sd8192) begin failures++; $display("FAIL bfly B=%0d", signed'(o2)); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

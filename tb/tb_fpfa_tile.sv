// tb_fpfa_tile: end-to-end test of one tile at its default size.
//
// Phase 1, 4-tap FIR (direct form). Processing part k (k = 0..3) computes the
// tap h[3-k] * I[j-k]: its mem2 word 0 holds the coefficient, its mem1 word i
// holds I[i-k]. The four ALUs are chained East-West, so ALU 0's Z2 is the whole
// sum O[j]; ALU 0's out1 goes through its bypassed output register onto a bus
// and into its own mem2 from word 16 on. The program is: prologue (load
// coefficients, first samples), a one-instruction loop body run N times by the
// sequencer's loop counter, epilogue; N+1 outputs in N+2 instruction cycles.
// Phase 2, reconfiguration and linear interpolation. Processing part 4 gets
// new configurations: mem1 holds a table F, mem2 word 0 holds the constant
// fraction and words 1.. the indices x0. For each index: look up F(x0) and
// F(x0+1) (address loaded from the bus), compute F0 + xf*(F1-F0) in one ALU
// pass, capture it in the output register and write it over the index.
// Phase 3, two data streams at once: one program runs the interpolation loop
// on part 4 and, in the first instruction of each pass, the FIR loop body on
// parts 0..3; the two use disjoint buses.
// Phase 4, radix-2 FFT butterfly on processing parts 0..3, reconfigured:
// parts 1 and 3 form W_im*b_im and W_im*b_re, parts 0 and 2 add W_re*b_re and
// W_re*b_im through the East input and produce A and B (both halves) with
// level three in fixed point.
// Every result is compared with a model computed here; the cycle counts of the
// programs, and that each mechanism (loop, bypass, output register load,
// East-West chaining, table lookup, stride addressing, reconfiguration, two
// streams in one program) was exercised, are checked too.
module tb_fpfa_tile;
  import fpfa_pkg::*;

  localparam int N = 40;        // FIR loop iterations (outputs N+1)
  localparam int NI = 12;       // interpolation points
  localparam int M = 10;        // iterations of the two-stream program

  logic clk = 0, rst_n = 0;
  logic host_we = 0;
  htgt_e host_tgt = H_CR;
  logic [2:0] host_pp = 0, host_sub = 0;
  logic [7:0] host_addr = 0;
  logic [NPP*10-1:0] host_wdata = 0;
  logic [MW-1:0] host_rdata;
  logic start = 0, busy, done;
  logic [5:0] start_pc = 0;
  logic [ZW-1:0] east_in = 0, west_out;

  int checks = 0, failures = 0;
  int n_loop = 0, n_bypass = 0, n_oload = 0, n_east = 0, n_index = 0, n_stride = 0, n_reconf = 0, n_done = 0, n_par = 0;
  bit counting_reconf = 0;

  fpfa_tile dut (.clk, .rst_n, .host_we, .host_tgt, .host_pp, .host_sub, .host_addr, .host_wdata,
                 .host_rdata, .start, .start_pc, .busy, .done, .east_in, .west_out);

  always #5 clk = ~clk;

  // ---------------- mechanism monitors ----------------
  always @(posedge clk) if (rst_n) begin
    if (done) n_done++;
    if (dut.u_ctl.running && dut.u_ctl.w.op == SQ_LOOP && dut.u_ctl.cnt != 0) n_loop++;
    if (dut.valid) begin
      if (dut.g_pp[0].u_pp.cr2.o_bypass[0] && dut.g_pp[0].u_pp.src_en[0]) n_bypass++;
      if (dut.g_pp[4].u_pp.cr2.o_load[0]) n_oload++;
      if (dut.g_pp[0].u_pp.cr1.fn.selme == ME_EAST && dut.g_pp[0].u_pp.cr1.fn.selmz == MZ_MAC) n_east++;
      if (dut.g_pp[4].u_pp.cr4.aop == AOP_INDEX) n_index++;
      if (dut.g_pp[1].u_pp.cr4.aop == AOP_STRIDE) n_stride++;
      if (dut.g_pp[1].u_pp.cr4.aop == AOP_STRIDE && dut.g_pp[4].u_pp.cr4.aop == AOP_INDEX) n_par++;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic hw(input htgt_e t, input int pp, input int sub, input int a, input logic [NPP*10-1:0] d);
    @(negedge clk);
    host_we = 1; host_tgt = t; host_pp = 3'(pp); host_sub = 3'(sub); host_addr = 8'(a); host_wdata = d;
    @(negedge clk);
    host_we = 0;
    if (t == H_CR && counting_reconf) n_reconf++;
  endtask

  task automatic cr(input int pp, input int num, input int idx, input logic [31:0] v);
    hw(H_CR, pp, num, idx, (NPP*10)'(v));
  endtask

  task automatic mem(input int pp, input int m, input int a, input int v);
    hw(H_MEM, pp, m, a, (NPP*10)'(MW'(v)));
  endtask

  task automatic prog(input int a, input sqop_e op, input int tgt, input int code);
    sqword_t w;
    w = '{spare: 2'b00, op: op, target: 6'(tgt), code: 6'(code)};
    hw(H_PROG, 0, 0, a, (NPP*10)'(w));
  endtask

  task automatic dec(input int code, input ppsel_t s [NPP]);
    ppsel_t [NPP-1:0] v;
    for (int i = 0; i < NPP; i++) v[i] = s[i];
    hw(H_DEC, 0, 0, code, v);
  endtask

  task automatic peek(input int pp, input int m, input int a, output logic [MW-1:0] v);
    @(negedge clk);
    host_pp = 3'(pp); host_sub = 3'(m); host_addr = 8'(a);
    #1 v = host_rdata;
  endtask

  // run the program at pc, return the number of cycles busy was high:
  // one fetch cycle plus one cycle per issued instruction
  task automatic run(input int pc, output int cycles);
    @(negedge clk); start = 1; start_pc = 6'(pc);
    @(negedge clk); start = 0;
    cycles = 0;
    while (busy && cycles < 10000) begin @(posedge clk); #1; cycles++; end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- test ----------------
  int h [4];
  int smp [N+1];
  int cyc;
  logic [MW-1:0] v;

  function automatic ppsel_t S(input int c1, input int c2, input int c3, input int c45);
    return '{cr45: 2'(c45), cr3: 3'(c3), cr2: 3'(c2), cr1: 2'(c1)};
  endfunction

  initial begin
    cr1_t c1; cr2_t c2; cr3_t c3; memcfg_t m4, m5;
    ppsel_t s [NPP];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);

    // ================= phase 1: FIR =================
    for (int k = 0; k < 4; k++) h[k] = $urandom_range(0, 14) - 7;
    for (int i = 0; i <= N; i++) smp[i] = $urandom_range(0, 2000) - 1000;
    for (int k = 0; k < 4; k++) begin
      mem(k, 1, 0, h[3-k]);
      for (int i = 0; i <= N; i++) mem(k, 0, i, (i - k >= 0) ? smp[i-k] : 0);
      // CR1[1]: Z2 = a*b (+ East except the last tap), out1 = o1_low
      c1 = '0; c1.fn.selmx = MX_A; c1.fn.selmy = MY_B; c1.fn.selmz = MZ_MAC;
      c1.fn.selme = (k == 3) ? ME_ZERO : ME_EAST; c1.fn.selmb = MB_ZERO; c1.fn.selmo1 = MO1_O1LO;
      cr(k, 1, 1, c1);
      // CR2: [1] banks a,b write ; [2] bank b writes (+ out1 bypass on PP0) ; [3] out1 bypass
      c2 = '0; c2.we = 4'b0011; cr(k, 2, 1, c2);
      c2 = '0; c2.we = 4'b0010; c2.o_bypass[0] = (k == 0); cr(k, 2, 2, c2);
      c2 = '0; c2.o_bypass[0] = (k == 0); cr(k, 2, 3, c2);
      // CR3: [1] a <- bus 4+k, b <- bus k ; [2] b <- bus k, PP0 out1 -> bus 8 ; [3] PP0 out1 -> bus 8
      c3 = '0; c3.insel[0] = BSW'(4 + k); c3.insel[1] = BSW'(k); cr(k, 3, 1, c3);
      c3 = '0; c3.insel[1] = BSW'(k); c3.odrv_en[0] = (k == 0); c3.odrv_bus[0] = 4'd8; cr(k, 3, 2, c3);
      c3 = '0; c3.odrv_en[0] = (k == 0); c3.odrv_bus[0] = 4'd8; cr(k, 3, 3, c3);
      // CR4/CR5: [1] mem1 -> bus k, stride 1 ; mem2 -> bus 4+k, then address 16
      m4 = '0; m4.drv_en = 1; m4.drv_bus = BSW'(k); m4.aop = AOP_STRIDE; m4.stride = 8'd1;
      m5 = '0; m5.drv_en = 1; m5.drv_bus = BSW'(4 + k); m5.aop = AOP_BASE; m5.base = 8'd16;
      cr(k, 4, 1, m4); cr(k, 5, 1, m5);
      //             [2] mem1 -> bus k, stride 1 ; PP0 mem2 <- bus 8, stride 1
      m5 = '0; m5.we = (k == 0); m5.wsel = 4'd8; m5.aop = (k == 0) ? AOP_STRIDE : AOP_HOLD; m5.stride = 8'd1;
      cr(k, 4, 2, m4); cr(k, 5, 2, m5);
      //             [3] mem1 hold ; PP0 mem2 <- bus 8, stride 1
      cr(k, 4, 3, 32'd0); cr(k, 5, 3, m5);
    end
    // decoder: code 1 prologue, 2 loop body, 3 epilogue (PP4 idle: all selects 0)
    for (int i = 0; i < NPP; i++) s[i] = (i < 4) ? S(0, 1, 1, 1) : S(0, 0, 0, 0);
    dec(1, s);
    for (int i = 0; i < NPP; i++) s[i] = (i < 4) ? S(1, 2, 2, 2) : S(0, 0, 0, 0);
    dec(2, s);
    for (int i = 0; i < NPP; i++) s[i] = (i < 4) ? S(1, 3, 3, 3) : S(0, 0, 0, 0);
    dec(3, s);
    for (int i = 0; i < NPP; i++) s[i] = S(0, 0, 0, 0);
    dec(0, s);
    prog(0, SQ_SETC, N - 1, 1);
    prog(1, SQ_LOOP, 1, 2);
    prog(2, SQ_HALT, 0, 3);

    run(0, cyc);
    chk(cyc === 1 + N + 2, $sformatf("FIR took %0d cycles, expected %0d", cyc, 1 + N + 2));
    for (int j = 0; j <= N; j++) begin
      int o;
      o = 0;
      for (int n = 0; n < 4; n++) if (j - n >= 0) o += h[3-n] * smp[j-n];
      peek(0, 1, 16 + j, v);
      chk(v === MW'(o), $sformatf("FIR O[%0d] = %0d, expected %0d", j, signed'(v), o));
    end

    // ================= phase 2: reconfigure PP4, linear interpolation =================
    counting_reconf = 1;
    begin
      int F [32];
      int xi [NI];
      int xf;
      xf = 8192;                           // 0.25 in Q1.15
      for (int i = 0; i < 32; i++) begin F[i] = $urandom_range(0, 20000) - 10000; mem(4, 0, i, F[i]); end
      mem(4, 1, 0, xf);
      for (int i = 0; i < NI; i++) begin xi[i] = $urandom_range(0, 30); mem(4, 1, 1 + i, xi[i]); end
      // ALU: a=F1, b=xf, c=F0, d=xf ; Z1=(a-b)-(c-d) ; Z2 = d*Z1 ; out1 = (c_fp + Z2)_fp
      c1 = '0; c1.fn.ctf1 = F_SUB; c1.fn.ctf2 = F_SUB; c1.fn.ctf3 = F_SUB; c1.fn.selmx = MX_D;
      c1.fn.selmy = MY_Z1; c1.fn.selme = ME_ZERO; c1.fn.selmz = MZ_MAC; c1.fn.selmb = MB_CFP;
      c1.fn.selmo1 = MO1_O1FP;
      cr(4, 1, 0, c1);
      c2 = '0; c2.we = 4'b1010; cr(4, 2, 1, c2);   // b, d <- fraction
      c2 = '0; c2.we = 4'b0100; cr(4, 2, 2, c2);   // c <- F(x0)
      c2 = '0; c2.we = 4'b0001; cr(4, 2, 3, c2);   // a <- F(x0+1)
      c2 = '0; c2.o_load[0] = 1; cr(4, 2, 4, c2);  // capture the result
      c3 = '0; for (int i = 0; i < 4; i++) c3.insel[i] = 4'd9; cr(4, 3, 1, c3);
      c3 = '0; c3.odrv_en[0] = 1; c3.odrv_bus[0] = 4'd9; cr(4, 3, 2, c3);
      // memories: [0] prologue: mem2 -> bus 9, stride ; [1] lookup: mem2 -> bus 9, mem1 addr <- bus
      //           [2] mem1 -> bus 9, stride ; [3] mem2 <- bus 9, stride
      m4 = '0; m5 = '0; m5.drv_en = 1; m5.drv_bus = 4'd9; m5.aop = AOP_STRIDE; m5.stride = 8'd1;
      cr(4, 4, 0, m4); cr(4, 5, 0, m5);
      m4 = '0; m4.wsel = 4'd9; m4.aop = AOP_INDEX; m4.base = 8'd0;
      m5 = '0; m5.drv_en = 1; m5.drv_bus = 4'd9; m5.aop = AOP_HOLD;
      cr(4, 4, 1, m4); cr(4, 5, 1, m5);
      m4 = '0; m4.drv_en = 1; m4.drv_bus = 4'd9; m4.aop = AOP_STRIDE; m4.stride = 8'd1;
      cr(4, 4, 2, m4); cr(4, 5, 2, 32'd0);
      m5 = '0; m5.we = 1; m5.wsel = 4'd9; m5.aop = AOP_STRIDE; m5.stride = 8'd1;
      cr(4, 4, 3, 32'd0); cr(4, 5, 3, m5);
      // decoder codes 8..13 (PP0..3 idle: selects 0)
      for (int i = 0; i < NPP; i++) s[i] = S(0, 0, 0, 0);
      s[4] = S(0, 1, 1, 0); dec(8, s);   // fraction into b, d
      s[4] = S(0, 0, 0, 1); dec(9, s);   // index -> mem1 address
      s[4] = S(0, 2, 1, 2); dec(10, s);  // F(x0) -> c
      s[4] = S(0, 3, 1, 2); dec(11, s);  // F(x0+1) -> a
      s[4] = S(0, 4, 0, 2); dec(12, s);  // compute, capture
      s[4] = S(0, 0, 2, 3); dec(13, s);  // result -> mem2 over the index
      prog(8, SQ_SETC, NI - 1, 8);
      prog(9, SQ_NEXT, 0, 9);
      prog(10, SQ_NEXT, 0, 10);
      prog(11, SQ_NEXT, 0, 11);
      prog(12, SQ_NEXT, 0, 12);
      prog(13, SQ_LOOP, 9, 13);
      prog(14, SQ_HALT, 0, 0);
      run(8, cyc);
      chk(cyc === 1 + 2 + 5 * NI, $sformatf("interpolation took %0d cycles, expected %0d", cyc, 1 + 2 + 5 * NI));
      for (int i = 0; i < NI; i++) begin
        longint e;
        e = (longint'(F[xi[i]]) * 32768 + longint'(xf) * (longint'(F[xi[i] + 1]) - longint'(F[xi[i]]))) >>> 15;
        peek(4, 1, 1 + i, v);
        chk(v === MW'(e), $sformatf("interp x0=%0d: %0d, expected %0d", xi[i], signed'(v), e));
      end
      // FIR results are untouched by the second program
      peek(0, 1, 16, v);
      chk(v === MW'(h[3] * smp[0]), "FIR result kept");
    end

    // ================= phase 3: FIR and interpolation side by side =================
    // One program drives both streams: the five-instruction interpolation loop
    // on part 4, with the FIR loop body of parts 0..3 in its first instruction.
    // Both reuse their configurations and continue from their address registers:
    // FIR samples from mem1 word N+1, coefficient of part 0 at mem2 word 16+N+1
    // (parts 1..3: word 16), outputs again from word 16. Part 4's idle entry
    // [0] of CR5 is its stride-1 prologue entry, so the HALT of the previous
    // program advanced its mem2 address too: fraction at word NI+2, indices
    // after it.
    begin
      int F [32];
      int xi [M];
      int hh [4];
      int sm [M+1];
      int xf;
      xf = 24576;                          // 0.75 in Q1.15
      for (int i = 0; i < 32; i++) begin F[i] = $urandom_range(0, 20000) - 10000; mem(4, 0, i, F[i]); end
      mem(4, 1, NI + 2, xf);
      for (int i = 0; i < M; i++) begin xi[i] = $urandom_range(0, 30); mem(4, 1, NI + 3 + i, xi[i]); end
      for (int k = 0; k < 4; k++) hh[k] = $urandom_range(0, 14) - 7;
      for (int i = 0; i <= M; i++) sm[i] = $urandom_range(0, 2000) - 1000;
      for (int k = 0; k < 4; k++) begin
        mem(k, 1, (k == 0) ? 16 + N + 1 : 16, hh[3-k]);
        for (int i = 0; i <= M; i++) mem(k, 0, N + 1 + i, (i - k >= 0) ? sm[i-k] : 0);
      end
      for (int i = 0; i < NPP; i++) s[i] = (i < 4) ? S(0, 1, 1, 1) : S(0, 1, 1, 0);
      dec(24, s);                          // FIR prologue + fraction into b, d
      for (int i = 0; i < NPP; i++) s[i] = (i < 4) ? S(1, 2, 2, 2) : S(0, 0, 0, 1);
      dec(25, s);                          // FIR loop body + index -> mem1 address
      prog(24, SQ_SETC, M - 1, 24);
      prog(25, SQ_NEXT, 0, 25);
      prog(26, SQ_NEXT, 0, 10);
      prog(27, SQ_NEXT, 0, 11);
      prog(28, SQ_NEXT, 0, 12);
      prog(29, SQ_LOOP, 25, 13);
      prog(30, SQ_HALT, 0, 3);             // FIR epilogue, part 4 idle
      run(24, cyc);
      chk(cyc === 1 + 2 + 5 * M, $sformatf("parallel program took %0d cycles, expected %0d", cyc, 1 + 2 + 5 * M));
      for (int j = 0; j <= M; j++) begin
        int o;
        o = 0;
        for (int n = 0; n < 4; n++) if (j - n >= 0) o += hh[3-n] * sm[j-n];
        peek(0, 1, 16 + j, v);
        chk(v === MW'(o), $sformatf("parallel FIR O[%0d] = %0d, expected %0d", j, signed'(v), o));
      end
      for (int i = 0; i < M; i++) begin
        longint e;
        e = (longint'(F[xi[i]]) * 32768 + longint'(xf) * (longint'(F[xi[i] + 1]) - longint'(F[xi[i]]))) >>> 15;
        peek(4, 1, NI + 3 + i, v);
        chk(v === MW'(e), $sformatf("parallel interp x0=%0d: %0d, expected %0d", xi[i], signed'(v), e));
      end
      chk(n_par === M, $sformatf("cycles with both streams active %0d, expected %0d", n_par, M));
    end

    // ================= phase 4: reconfigure PP0..3, FFT butterfly =================
    begin
      int are, aim, bre, bim, wre, wim;
      longint pr, pi, eAr, eAi, eBr, eBi;
      logic [MW-1:0] r [4];
      are = $urandom_range(0, 16000) - 8000; aim = $urandom_range(0, 16000) - 8000;
      bre = $urandom_range(0, 30000) - 15000; bim = $urandom_range(0, 30000) - 15000;
      wre = 23170; wim = -23170;          // W = e^{-j pi/4} in Q1.15
      // operands in mem1 word 100 of each part: PP0 {a=Wre, b=bre, c=are}, PP1 {a=Wim, b=bim},
      // PP2 {a=Wre, b=bim, c=aim}, PP3 {a=Wim, b=bre}; loaded one per cycle into banks a, b, c
      mem(0, 0, 100, wre); mem(0, 0, 101, bre); mem(0, 0, 102, are);
      mem(1, 0, 100, wim); mem(1, 0, 101, bim); mem(1, 0, 102, 0);
      mem(2, 0, 100, wre); mem(2, 0, 101, bim); mem(2, 0, 102, aim);
      mem(3, 0, 100, wim); mem(3, 0, 101, bre); mem(3, 0, 102, 0);
      for (int k = 0; k < 4; k++) begin
        // CR1[2]: Z2 = a*b (+/- East), B = c_fp, out1 = o1_fp, out2 = o2_fp
        c1 = '0; c1.fn.selmx = MX_A; c1.fn.selmy = MY_B; c1.fn.selmz = MZ_MAC;
        c1.fn.selme = (k == 0 || k == 2) ? ME_EAST : ME_ZERO;
        c1.fn.cta = (k == 0);              // re: Wre*bre - Wim*bim ; im: Wre*bim + Wim*bre
        c1.fn.selmb = MB_CFP; c1.fn.selmo1 = MO1_O1FP; c1.fn.selmo2 = MO2_O2FP;
        cr(k, 1, 2, c1);
        // CR2[4..6]: bank a / b / c write register 1 ; CR2[7]: both output registers load
        c2 = '0; c2.we = 4'b0001; c2.waddr[0] = 2'd1; cr(k, 2, 4, c2);
        c2 = '0; c2.we = 4'b0010; c2.waddr[1] = 2'd1; cr(k, 2, 5, c2);
        c2 = '0; c2.we = 4'b0100; c2.waddr[2] = 2'd1; cr(k, 2, 6, c2);
        c2 = '0; c2.o_load = 2'b11; cr(k, 2, 7, c2);
        // CR3[4]: all banks <- bus k ; CR3[5]: out1 -> bus 4+k
        c3 = '0; for (int i = 0; i < 4; i++) c3.insel[i] = BSW'(k); cr(k, 3, 4, c3);
        c3 = '0; c3.odrv_en[0] = 1; c3.odrv_bus[0] = BSW'(4 + k); cr(k, 3, 5, c3);
        // CR4/CR5[0] are reused: mem1 -> bus k stride 1 from the current address ; mem2 idle
        m4 = '0; m4.drv_en = 1; m4.drv_bus = BSW'(k); m4.aop = AOP_STRIDE; m4.stride = 8'd1;
        cr(k, 4, 0, m4); cr(k, 5, 0, 32'd0);
        // CR4/CR5[3]: mem1 address <- 100 ; then out1 is written into mem2 word 200 ... via [2]
        m4 = '0; m4.aop = AOP_BASE; m4.base = 8'd100;
        m5 = '0; m5.aop = AOP_BASE; m5.base = 8'd200;
        cr(k, 4, 3, m4); cr(k, 5, 3, m5);
        m5 = '0; m5.we = 1; m5.wsel = BSW'(4 + k); m5.aop = AOP_STRIDE; m5.stride = 8'd1;
        cr(k, 4, 2, 32'd0); cr(k, 5, 2, m5);
      end
      for (int i = 0; i < NPP; i++) s[i] = S(0, 0, 0, 0);
      for (int k = 0; k < 4; k++) s[k] = S(2, 0, 0, 3); dec(16, s);  // addresses
      for (int k = 0; k < 4; k++) s[k] = S(2, 4, 4, 0); dec(17, s);  // a <- word 100
      for (int k = 0; k < 4; k++) s[k] = S(2, 5, 4, 0); dec(18, s);  // b <- word 101
      for (int k = 0; k < 4; k++) s[k] = S(2, 6, 4, 0); dec(19, s);  // c <- word 102
      for (int k = 0; k < 4; k++) s[k] = S(2, 7, 0, 1); dec(20, s);  // compute, capture
      for (int k = 0; k < 4; k++) s[k] = S(2, 0, 5, 2); dec(21, s);  // out1 -> mem2
      // CR1 read addresses must point at register 1 for this program
      for (int k = 0; k < 4; k++) begin
        c1 = '0; c1.fn.selmx = MX_A; c1.fn.selmy = MY_B; c1.fn.selmz = MZ_MAC;
        c1.fn.selme = (k == 0 || k == 2) ? ME_EAST : ME_ZERO; c1.fn.cta = (k == 0);
        c1.fn.selmb = MB_CFP; c1.fn.selmo1 = MO1_O1FP; c1.fn.selmo2 = MO2_O2FP;
        for (int i = 0; i < 4; i++) c1.raddr[i] = 2'd1;
        cr(k, 1, 2, c1);
      end
      // the CR4/CR5 entry [1] sits between compute and write: keep it idle
      for (int k = 0; k < 4; k++) begin cr(k, 4, 1, 32'd0); cr(k, 5, 1, 32'd0); end
      prog(16, SQ_NEXT, 0, 16);
      prog(17, SQ_NEXT, 0, 17);
      prog(18, SQ_NEXT, 0, 18);
      prog(19, SQ_NEXT, 0, 19);
      prog(20, SQ_NEXT, 0, 20);
      prog(21, SQ_HALT, 0, 21);
      run(16, cyc);
      chk(cyc === 1 + 6, $sformatf("butterfly took %0d cycles, expected 7", cyc));
      pr  = longint'(wre) * bre - longint'(wim) * bim;   // Re(W*b), Q2.30
      pi  = longint'(wre) * bim + longint'(wim) * bre;   // Im(W*b)
      eAr = (longint'(are) * 32768 + pr) >>> 15;
      eBr = (longint'(are) * 32768 - pr) >>> 15;
      eAi = (longint'(aim) * 32768 + pi) >>> 15;
      eBi = (longint'(aim) * 32768 - pi) >>> 15;
      peek(0, 1, 200, r[0]); peek(2, 1, 200, r[2]);
      chk(r[0] === MW'(eAr), $sformatf("A_re %0d expected %0d", signed'(r[0]), eAr));
      chk(r[2] === MW'(eAi), $sformatf("A_im %0d expected %0d", signed'(r[2]), eAi));
      // B halves are in the output registers of parts 0 and 2 (out2)
      chk(dut.g_pp[0].u_pp.u_oreg2.q === DW'(eBr), "B_re in output register 2 of part 0");
      chk(dut.g_pp[2].u_pp.u_oreg2.q === DW'(eBi), "B_im in output register 2 of part 2");
    end

    // ---------------- mechanisms exercised ----------------
    chk(n_loop  >= N - 1, $sformatf("loop jumps %0d", n_loop));
    chk(n_bypass > 0, "output register bypass never used");
    chk(n_oload  > 0, "output register load never used");
    chk(n_east   > 0, "East-West chaining never used");
    chk(n_index  > 0, "table lookup addressing never used");
    chk(n_stride > 0, "stride addressing never used");
    chk(n_reconf > 0, "no reconfiguration between programs");
    chk(n_done === 4, $sformatf("done pulses %0d", n_done));
    $display("mechanisms: loop=%0d bypass=%0d oreg_load=%0d east=%0d lookup=%0d stride=%0d reconfig_writes=%0d two_streams=%0d",
             n_loop, n_bypass, n_oload, n_east, n_index, n_stride, n_reconf, n_par);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fpfa_fft: radix-2 decimation-in-time FFTs computed in place on one tile
// at its default size: first 8 points, then 16 points, the largest size whose
// address table (4 words per butterfly) fits one 256-word memory and whose
// butterfly count (32) fits the sequencer's loop counter. The configuration
// is loaded once; each size only reloads data, twiddles, table and the loop
// count. Below, N is the size being run.
//
// Data: x_re in mem1 of part 0 and x_im in mem1 of part 1 (loaded in
// bit-reversed order), twiddles W_N^k = cos(2 pi k/N) - j sin(2 pi k/N) in
// Q1.15 in mem1 of parts 2 (real) and 3 (imaginary), and an address table in
// mem1 of part 4 holding {ib, iw, ia, ib} for each of the (N/2) log2 N
// butterflies. The same 8-instruction loop body runs every butterfly:
// its addresses come from the table over a bus (AOP_INDEX), operands are
// broadcast over the crossbar into the register banks of parts 0..3, parts 1
// and 3 form W_im*b_im and W_im*b_re and pass them East-West to parts 0 and 2,
// which produce A = a + W*b and B = a - W*b in their two output registers;
// A and B are written back over a and b. Results are checked bit-exactly
// against a model of the same fixed-point arithmetic (floor after each
// product sum) and, within N+1 LSB, against a floating-point DFT.
module tb_fpfa_fft;
  import fpfa_pkg::*;

  localparam int NMAX = 16;                 // largest size run
  localparam int NBMAX = NMAX / 2 * 4;      // its butterflies: 4 stages x 8

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
  int n_lookup = 0;

  fpfa_tile dut (.clk, .rst_n, .host_we, .host_tgt, .host_pp, .host_sub, .host_addr, .host_wdata,
                 .host_rdata, .start, .start_pc, .busy, .done, .east_in, .west_out);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && dut.valid && dut.g_pp[0].u_pp.cr4.aop == AOP_INDEX) n_lookup++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic hw(input htgt_e t, input int pp, input int sub, input int a, input logic [NPP*10-1:0] d);
    @(negedge clk);
    host_we = 1; host_tgt = t; host_pp = 3'(pp); host_sub = 3'(sub); host_addr = 8'(a); host_wdata = d;
    @(negedge clk);
    host_we = 0;
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

  function automatic ppsel_t S(input int c1, input int c2, input int c3, input int c45);
    return '{cr45: 2'(c45), cr3: 3'(c3), cr2: 3'(c2), cr1: 2'(c1)};
  endfunction

  function automatic int bitrev(input int i, input int lg);
    int r;
    r = 0;
    for (int k = 0; k < lg; k++) r |= ((i >> k) & 1) << (lg - 1 - k);
    return r;
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one FFT of size n on the configured tile: data, twiddles, table, loop count, run, check
  task automatic fft(input int n);
    int lg, nb, cyc, amp, lk0;
    int xr [NMAX], xi [NMAX];     // input, natural order
    longint mr [NMAX], mi [NMAX]; // model, in place
    int wr [NMAX/2], wi [NMAX/2];
    int tab [4*NBMAX];
    real pi2, tol;
    pi2 = 6.283185307179586;
    lg = $clog2(n);
    amp = 16000 / n;              // keeps every stage inside 16 bits
    // each stage floors (error < 1 LSB) and a stage doubles the error it is
    // given, so after lg stages the error is below 2^lg - 1 = n - 1 LSB, plus
    // the rounding of the twiddles
    tol = real'(n) + 1.0;

    for (int i = 0; i < n; i++) begin
      xr[i] = $urandom_range(0, 2 * amp) - amp;
      xi[i] = $urandom_range(0, 2 * amp) - amp;
      mem(0, 0, bitrev(i, lg), xr[i]); mem(1, 0, bitrev(i, lg), xi[i]);
      mr[bitrev(i, lg)] = longint'(xr[i]); mi[bitrev(i, lg)] = longint'(xi[i]);
    end
    for (int k = 0; k < n / 2; k++) begin
      wr[k] = $rtoi($floor(32767.0 * $cos(pi2 * k / n) + 0.5));
      wi[k] = -$rtoi($floor(32767.0 * $sin(pi2 * k / n) + 0.5));
      mem(2, 0, k, wr[k]); mem(3, 0, k, wi[k]);
    end
    nb = 0;
    for (int half = 1; half < n; half *= 2)
      for (int g = 0; g < n; g += 2 * half)
        for (int j = 0; j < half; j++) begin
          int ia, ib, iw;
          ia = g + j; ib = ia + half; iw = j * (n / 2 / half);
          tab[4*nb+0] = ib; tab[4*nb+1] = iw; tab[4*nb+2] = ia; tab[4*nb+3] = ib;
          nb++;
        end
    for (int i = 0; i < 4 * nb; i++) mem(4, 0, i, tab[i]);
    prog(0, SQ_SETC, nb - 1, 1);

    lk0 = n_lookup;
    @(negedge clk); start = 1; start_pc = 6'd0;
    @(negedge clk); start = 0;
    cyc = 0;
    while (busy && cyc < 10000) begin @(posedge clk); #1; cyc++; end
    // fetch + prologue + nb butterflies x 8 + halt
    chk(cyc == 1 + 1 + 8 * nb + 1, $sformatf("%0d-point FFT took %0d cycles, expected %0d", n, cyc, 3 + 8 * nb));

    // ---------------- bit-exact model ----------------
    for (int b = 0; b < nb; b++) begin
      int ia, ib, iw;
      longint pr, pim, ar, ai;
      ib = tab[4*b]; iw = tab[4*b+1]; ia = tab[4*b+2];
      pr  = longint'(wr[iw]) * mr[ib] - longint'(wi[iw]) * mi[ib];
      pim = longint'(wr[iw]) * mi[ib] + longint'(wi[iw]) * mr[ib];
      ar = mr[ia]; ai = mi[ia];
      mr[ia] = (ar * 32768 + pr) >>> 15;  mr[ib] = (ar * 32768 - pr) >>> 15;
      mi[ia] = (ai * 32768 + pim) >>> 15; mi[ib] = (ai * 32768 - pim) >>> 15;
    end
    for (int i = 0; i < n; i++) begin
      real dr, di;
      logic [MW-1:0] gr, gi;
      @(negedge clk); host_pp = 3'd0; host_sub = 3'd0; host_addr = 8'(i); #1 gr = host_rdata;
      @(negedge clk); host_pp = 3'd1; host_sub = 3'd0; host_addr = 8'(i); #1 gi = host_rdata;
      chk(gr === MW'(mr[i]) && gi === MW'(mi[i]),
          $sformatf("N=%0d X[%0d] = (%0d, %0d), model (%0d, %0d)", n, i, signed'(gr), signed'(gi), mr[i], mi[i]));
      dr = 0.0; di = 0.0;
      for (int k = 0; k < n; k++) begin
        dr += xr[k] * $cos(pi2 * i * k / n) + xi[k] * $sin(pi2 * i * k / n);
        di += xi[k] * $cos(pi2 * i * k / n) - xr[k] * $sin(pi2 * i * k / n);
      end
      chk(((dr - real'(signed'(gr))) < tol) && ((real'(signed'(gr)) - dr) < tol) &&
          ((di - real'(signed'(gi))) < tol) && ((real'(signed'(gi)) - di) < tol),
          $sformatf("N=%0d X[%0d] = (%0d, %0d), DFT (%f, %f)", n, i, signed'(gr), signed'(gi), dr, di));
    end
    chk(n_lookup - lk0 == 3 * nb, $sformatf("N=%0d table lookups %0d", n, n_lookup - lk0));
  endtask

  initial begin
    cr1_t c1; cr2_t c2; cr3_t c3; memcfg_t m;
    ppsel_t [NPP-1:0] s;

    repeat (3) @(posedge clk);
    rst_n <= 1;

    // ---------------- configuration ----------------
    for (int k = 0; k < 4; k++) begin
      // ALU: Z2 = a*b (parts 1, 3) ; Z2 = a*b -/+ East, o = c_fp +/- Z2 (parts 0, 2)
      c1 = '0; c1.fn.selmx = MX_A; c1.fn.selmy = MY_B; c1.fn.selmz = MZ_MAC;
      c1.fn.selme = (k == 0 || k == 2) ? ME_EAST : ME_ZERO; c1.fn.cta = (k == 0);
      c1.fn.selmb = MB_CFP; c1.fn.selmo1 = MO1_O1FP; c1.fn.selmo2 = MO2_O2FP;
      cr(k, 1, 1, c1);
      c2 = '0; c2.we = 4'b0010; cr(k, 2, 1, c2);    // b
      c2 = '0; c2.we = 4'b0001; cr(k, 2, 2, c2);    // a
      c2 = '0; c2.we = 4'b0100; cr(k, 2, 3, c2);    // c
      c2 = '0; c2.o_load = 2'b11; cr(k, 2, 4, c2);  // capture A, B
      // bank sources: a <- W (bus 2 re / bus 3 im), b <- b_re (bus 0) / b_im (bus 1), c <- a_re / a_im
      c3 = '0;
      c3.insel[0] = (k == 0 || k == 2) ? 4'd2 : 4'd3;
      c3.insel[1] = (k == 0 || k == 3) ? 4'd0 : 4'd1;
      c3.insel[2] = (k == 0) ? 4'd0 : 4'd1;
      cr(k, 3, 1, c3);
      c3.odrv_bus[0] = (k == 0) ? 4'd4 : 4'd5; c3.odrv_bus[1] = c3.odrv_bus[0];
      c3.odrv_en = 2'b01; cr(k, 3, 2, c3);          // A out
      c3.odrv_en = 2'b10; cr(k, 3, 3, c3);          // B out
      // mem1: [1] address <- bus 9 ; [2] drive own bus ; [3] write A/B (parts 0, 1)
      m = '0; m.wsel = 4'd9; m.aop = AOP_INDEX; m.base = 8'd0; cr(k, 4, 1, m);
      m = '0; m.drv_en = 1; m.drv_bus = BSW'(k); cr(k, 4, 2, m);
      m = '0; m.we = (k < 2); m.wsel = (k == 0) ? 4'd4 : 4'd5; cr(k, 4, 3, m);
    end
    m = '0; m.drv_en = 1; m.drv_bus = 4'd9; m.aop = AOP_STRIDE; m.stride = 8'd1; cr(4, 4, 1, m);
    m = '0; m.aop = AOP_BASE; m.base = 8'd0; cr(4, 4, 2, m);

    // decoder: code 1 prologue, codes 2..9 the butterfly steps t1..t8
    s = '0; hw(H_DEC, 0, 0, 0, s);
    s = '0; s[4] = S(0, 0, 0, 2); hw(H_DEC, 0, 0, 1, s);
    s = '0; s[4] = S(0, 0, 0, 1); s[0] = S(0, 0, 0, 1); s[1] = S(0, 0, 0, 1);            // t1 addr <- ib
    hw(H_DEC, 0, 0, 2, s);
    s = '0; s[4] = S(0, 0, 0, 1); s[2] = S(0, 1, 1, 1); s[3] = S(0, 1, 1, 1);            // t2 addr <- iw, b <- x[ib]
    s[0] = S(0, 1, 1, 2); s[1] = S(0, 1, 1, 2); hw(H_DEC, 0, 0, 3, s);
    s = '0; s[4] = S(0, 0, 0, 1); s[0] = S(0, 2, 1, 1); s[1] = S(0, 2, 1, 1);            // t3 addr <- ia, a <- W
    s[2] = S(0, 2, 1, 2); s[3] = S(0, 2, 1, 2); hw(H_DEC, 0, 0, 4, s);
    s = '0; s[0] = S(0, 3, 1, 2); s[1] = S(0, 0, 1, 2); s[2] = S(0, 3, 1, 0);            // t4 c <- x[ia]
    hw(H_DEC, 0, 0, 5, s);
    s = '0; for (int k = 0; k < 4; k++) s[k] = S(1, (k % 2 == 0) ? 4 : 0, 0, 0);         // t5 compute
    hw(H_DEC, 0, 0, 6, s);
    s = '0; s[0] = S(0, 0, 2, 3); s[1] = S(0, 0, 0, 3); s[2] = S(0, 0, 2, 0);            // t6 write A at ia
    hw(H_DEC, 0, 0, 7, s);
    s = '0; s[4] = S(0, 0, 0, 1); s[0] = S(0, 0, 0, 1); s[1] = S(0, 0, 0, 1);            // t7 addr <- ib
    hw(H_DEC, 0, 0, 8, s);
    s = '0; s[0] = S(0, 0, 3, 3); s[1] = S(0, 0, 0, 3); s[2] = S(0, 0, 3, 0);            // t8 write B at ib
    hw(H_DEC, 0, 0, 9, s);
    for (int t = 0; t < 7; t++) prog(1 + t, SQ_NEXT, 0, 2 + t);
    prog(8, SQ_LOOP, 1, 9);
    prog(9, SQ_HALT, 0, 0);

    fft(8);
    fft(NMAX);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fpfa_fir_transposed: 4-tap FIR in direct transposed form on one tile at
// its default size.
//
// The input sample is broadcast from mem1 of part 0 to register bank b of
// parts 0..3. Part k multiplies it by its coefficient (bank a) and adds the
// partial sum part k-1 produced in the previous cycle (bank d, sign-extended;
// part 0 adds 0). The partial sums travel through bypassed output registers
// and the crossbar into the next part's bank d, so each crossbar hop is one
// register delay of the transposed structure. Part 3's sum is the filter
// output and is written into its mem2 from word 16 on. Coefficients are placed
// so the output is O[j] = sum_n h[3-n] * I[j-n]: the part at the start of the
// chain holds h[0]. The loop body is one instruction; N+1 outputs take N+1
// iterations plus a prologue and the halt.
module tb_fpfa_fir_transposed;
  import fpfa_pkg::*;

  localparam int N = 60;

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
  int n_xfer = 0;

  fpfa_tile dut (.clk, .rst_n, .host_we, .host_tgt, .host_pp, .host_sub, .host_addr, .host_wdata,
                 .host_rdata, .start, .start_pc, .busy, .done, .east_in, .west_out);

  always #5 clk = ~clk;

  // partial sums handed from part to part through the crossbar
  always @(posedge clk) if (rst_n && dut.valid && dut.g_pp[2].u_pp.cr2.we[3]) n_xfer++;

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

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int h [4];
  int smp [N+2];

  initial begin
    cr1_t c1; cr2_t c2; cr3_t c3; memcfg_t m4, m5;
    ppsel_t [NPP-1:0] s;
    int cyc;
    logic [MW-1:0] v;
    repeat (3) @(posedge clk);
    rst_n <= 1;

    for (int k = 0; k < 4; k++) h[k] = $urandom_range(0, 14) - 7;
    for (int i = 0; i < N + 2; i++) begin smp[i] = $urandom_range(0, 2000) - 1000; mem(0, 0, i, smp[i]); end
    for (int k = 0; k < 4; k++) begin
      mem(k, 1, 0, h[k]);                      // chain start holds h[0]
      c1 = '0; c1.fn.selmx = MX_A; c1.fn.selmy = MY_B; c1.fn.selmz = MZ_MAC;
      c1.fn.selme = (k == 0) ? ME_ZERO : ME_DSE; c1.fn.selmb = MB_ZERO; c1.fn.selmo1 = MO1_O1LO;
      cr(k, 1, 1, c1);
      c2 = '0; c2.we = 4'b0011; cr(k, 2, 1, c2);                                 // a, b
      c2 = '0; c2.we = (k == 0) ? 4'b0010 : 4'b1010; c2.o_bypass[0] = 1; cr(k, 2, 2, c2); // b, d
      c3 = '0; c3.insel[0] = BSW'(4 + k); c3.insel[1] = 4'd0; cr(k, 3, 1, c3);
      c3 = '0; c3.insel[1] = 4'd0; c3.insel[3] = BSW'(3 + k);
      c3.odrv_en[0] = 1; c3.odrv_bus[0] = (k < 3) ? BSW'(4 + k) : 4'd8; cr(k, 3, 2, c3);
      // memories: [1] prologue ; [2] loop body
      m4 = '0;
      if (k == 0) begin m4.drv_en = 1; m4.drv_bus = 4'd0; m4.aop = AOP_STRIDE; m4.stride = 8'd1; end
      m5 = '0; m5.drv_en = 1; m5.drv_bus = BSW'(4 + k); m5.aop = AOP_BASE; m5.base = 8'd16;
      cr(k, 4, 1, m4); cr(k, 5, 1, m5);
      m5 = '0;
      if (k == 3) begin m5.we = 1; m5.wsel = 4'd8; m5.aop = AOP_STRIDE; m5.stride = 8'd1; end
      cr(k, 4, 2, m4); cr(k, 5, 2, m5);
    end
    s = '0; hw(H_DEC, 0, 0, 0, s);
    for (int k = 0; k < 4; k++) s[k] = S(0, 1, 1, 1);
    hw(H_DEC, 0, 0, 1, s);
    for (int k = 0; k < 4; k++) s[k] = S(1, 2, 2, 2);
    hw(H_DEC, 0, 0, 2, s);
    prog(0, SQ_SETC, N, 1);
    prog(1, SQ_LOOP, 1, 2);
    prog(2, SQ_HALT, 0, 0);

    @(negedge clk); start = 1; start_pc = 6'd0;
    @(negedge clk); start = 0;
    cyc = 0;
    while (busy && cyc < 10000) begin @(posedge clk); #1; cyc++; end
    // fetch + prologue + (N+1) loop iterations + halt
    chk(cyc == 1 + 1 + (N + 1) + 1, $sformatf("took %0d cycles, expected %0d", cyc, N + 4));

    for (int j = 0; j <= N; j++) begin
      int o;
      o = 0;
      for (int n = 0; n < 4; n++) if (j - n >= 0) o += h[3-n] * smp[j-n];
      @(negedge clk); host_pp = 3'd3; host_sub = 3'd1; host_addr = 8'(16 + j);
      #1 v = host_rdata;
      chk(v === MW'(o), $sformatf("O[%0d] = %0d, expected %0d", j, signed'(v), o));
    end
    chk(n_xfer == N + 1, $sformatf("partial-sum transfers %0d", n_xfer));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

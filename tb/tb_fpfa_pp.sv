// tb_fpfa_pp: one processing part driven from a stand-in crossbar (buses set
// by the testbench). Loads configuration registers through the host port and
// checks, for several select words: memory reads on the chosen bus with stride
// addressing, register bank writes from chosen buses and reads by the ALU,
// output register bypass versus load, the East-West path, memory writes from a
// bus, and that nothing changes state while run is low.
module tb_fpfa_pp;
  import fpfa_pkg::*;

  logic clk = 0, rst_n = 0, run = 0;
  ppsel_t sel;
  logic [NBUS-1:0][DW-1:0] bus;
  logic [NSRC_PP-1:0][DW-1:0] src_data;
  logic [NSRC_PP-1:0] src_en;
  logic [NSRC_PP-1:0][BSW-1:0] src_bus;
  logic [ZW-1:0] east, west;
  logic cr_we = 0;
  logic [2:0] cr_num = 0, cr_idx = 0;
  logic [CFG_W-1:0] cr_wdata = 0;
  logic mem_we = 0, mem_sel = 0;
  logic [MAW-1:0] mem_addr = 0;
  logic [MW-1:0] mem_wdata = 0, mem_rdata;
  int checks = 0, failures = 0;

  fpfa_pp dut (.clk, .rst_n, .run, .sel, .bus, .src_data, .src_en, .src_bus, .east, .west,
               .cr_we, .cr_num, .cr_idx, .cr_wdata, .mem_we, .mem_sel, .mem_addr, .mem_wdata, .mem_rdata);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic load_cr(input int num, input int idx, input logic [31:0] v);
    @(negedge clk); cr_we = 1; cr_num = 3'(num); cr_idx = 3'(idx); cr_wdata = v;
    @(negedge clk); cr_we = 0;
  endtask

  task automatic load_mem(input bit m, input int a, input int v);
    @(negedge clk); mem_we = 1; mem_sel = m; mem_addr = MAW'(a); mem_wdata = MW'(v);
    @(negedge clk); mem_we = 0;
  endtask

  task automatic peek(input bit m, input int a, input logic [MW-1:0] exp, input string what);
    mem_sel = m; mem_addr = MAW'(a);
    #1; chk(mem_rdata === exp, what);
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cr1_t c1; cr2_t c2; cr3_t c3; memcfg_t m;
    logic [DW-1:0] v [4];
    logic [DW-1:0] sum;
    sel = '0; bus = '0; east = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 8; i++) load_mem(0, i, 100 * i - 300);

    // CR4[1]: mem1 drives bus 3, address steps by 1
    m = '0; m.drv_en = 1; m.drv_bus = 4'd3; m.aop = AOP_STRIDE; m.stride = 8'd1;
    load_cr(4, 1, m);
    // CR3[1]: banks a..d from buses 0..3 ; CR2[1]: all banks write register 2
    c3 = '0; for (int i = 0; i < 4; i++) c3.insel[i] = BSW'(i);
    load_cr(3, 1, c3);
    c2 = '0; c2.we = 4'hF; for (int i = 0; i < 4; i++) c2.waddr[i] = 2'd2;
    load_cr(2, 1, c2);
    // CR1[1]: out1 = a+b+c+d (o1_low, Z2 = Z1), out2 = -(a+b+c+d); banks read register 2
    c1 = '0; c1.fn.ctf1 = F_ADD; c1.fn.ctf2 = F_ADD; c1.fn.ctf3 = F_ADD; c1.fn.selmz = MZ_Z1;
    c1.fn.selmb = MB_ZERO; c1.fn.selmo1 = MO1_O1LO; c1.fn.selmo2 = MO2_O2LO;
    for (int i = 0; i < 4; i++) c1.raddr[i] = 2'd2;
    load_cr(1, 1, c1);
    // CR2[2]: out1 register bypassed, out2 register loads ; CR3[2]: drivers on buses 5 and 6
    c2 = '0; c2.o_bypass = 2'b01; c2.o_load = 2'b10;
    load_cr(2, 2, c2);
    c3 = '0; c3.odrv_en = 2'b11; c3.odrv_bus[0] = 4'd5; c3.odrv_bus[1] = 4'd6;
    load_cr(3, 2, c3);

    // run low: selections act on nothing
    @(negedge clk); run = 0; sel = '{cr45: 2'd1, cr3: 3'd1, cr2: 3'd1, cr1: 2'd1};
    for (int k = 0; k < 3; k++) bus[k] = DW'($urandom);
    #1; chk(src_en === '0, "no drivers while idle");
    @(posedge clk); #1;
    chk(src_data[2] === DW'(-300), "address unchanged while idle");

    // cycle 1: mem1 on bus 3 (word 0), banks capture buses 0..3
    @(negedge clk); run = 1;
    #1; chk(src_en[2] && src_bus[2] === 4'd3, "mem1 drives bus 3");
    chk(src_data[2] === DW'(-300), "mem1 word 0 sign-extended");
    bus[3] = src_data[2];
    for (int k = 0; k < 4; k++) v[k] = bus[k];
    @(posedge clk); #1;
    chk(src_data[2] === DW'(-200), "mem1 stride to word 1");
    sum = v[0] + v[1] + v[2] + v[3];

    // cycle 2: ALU result, bypass on out1, load on out2
    @(negedge clk); sel = '{cr45: 2'd0, cr3: 3'd2, cr2: 3'd2, cr1: 2'd1};
    #1;
    chk(src_data[0] === sum, "out1 bypassed in the same cycle");
    chk(src_data[1] === '0, "out2 register not yet loaded");
    chk(src_en[1:0] === 2'b11 && src_bus[0] === 4'd5 && src_bus[1] === 4'd6, "output drivers");
    @(posedge clk); #1;
    chk(src_data[1] === DW'(-sum), "out2 register loaded");

    // CR1[3]: same function, banks read register 0 (never written: 0) except a reads register 2
    c1.raddr[1] = 2'd0; c1.raddr[2] = 2'd0; c1.raddr[3] = 2'd0;
    load_cr(1, 3, c1);
    @(negedge clk); sel = '{cr45: 2'd0, cr3: 3'd2, cr2: 3'd2, cr1: 2'd3};
    #1; chk(src_data[0] === v[0], "register read addresses come from CR1");
    c1.raddr[0] = 2'd0; load_cr(1, 3, c1);
    @(negedge clk); #1; chk(src_data[0] === '0, "register 0 of every bank still clear");

    // East-West: CR1[2]: Z2 = a*b + east
    c1 = '0; c1.fn.selmx = MX_A; c1.fn.selmy = MY_B; c1.fn.selme = ME_EAST; c1.fn.selmz = MZ_MAC;
    for (int i = 0; i < 4; i++) c1.raddr[i] = 2'd2;
    load_cr(1, 2, c1);
    @(negedge clk); sel = '{cr45: 2'd0, cr3: 3'd0, cr2: 3'd0, cr1: 2'd2}; east = 40'd123456789;
    #1;
    chk(west === ZW'(longint'(signed'(v[0])) * longint'(signed'(v[1])) + 123456789)
        || (v[0] == 20'h80000 || v[1] == 20'h80000), "west = a*b + east");

    // memory write: CR5[2]: mem2 writes bus 4 and steps by 2 from base 10
    m = '0; m.aop = AOP_BASE; m.base = 8'd10;
    load_cr(5, 1, m);
    m = '0; m.we = 1; m.wsel = 4'd4; m.aop = AOP_STRIDE; m.stride = 8'd2;
    load_cr(5, 2, m);
    @(negedge clk); sel = '{cr45: 2'd1, cr3: 3'd0, cr2: 3'd0, cr1: 2'd0};
    // the CR4/CR5 select is shared: select 1 also applies mem1's entry 1 (driving bus 3)
    #1; chk(src_en[2] && src_bus[2] === 4'd3, "mem1 follows the shared CR4/CR5 select");
    @(negedge clk); sel.cr45 = 2'd2; bus[4] = 20'h01234;
    @(negedge clk); bus[4] = 20'h05678;
    @(negedge clk); run = 0; #1;
    peek(1, 10, 16'h1234, "mem2 word 10 written from bus 4");
    peek(1, 12, 16'h5678, "mem2 word 12 written after stride");
    peek(0, 3, MW'(0), "mem1 word 3 untouched");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// fpfa_pp: one processing part of an FPFA tile.
//
// Holds an ALU, two local memories (mem1, mem2), four input register banks
// (one per ALU input a..d), two bypassable output registers and the five
// configuration registers that control them:
//   CR1 4x32  ALU function and register bank read addresses   (select 2 bits)
//   CR2 8x32  register bank writes, output register load/bypass (select 3 bits)
//   CR3 8x32  crossbar taps: bank input buses, output drivers   (select 3 bits)
//   CR4 4x32  mem1                                               (select 2 bits)
//   CR5 4x32  mem2, sharing the CR4 select                       (select 2 bits)
// so ten select bits from the decoder choose the whole 160-bit configuration of
// the part for the cycle. The CR sizes, the select widths and which entity each
// CR serves are the document's; the split of fields inside CR2..CR5 is this
// design's own (see fpfa_pkg).
//
// Timing: with run high, the selected configuration acts in the same cycle.
// Register banks, output registers, memory words and address registers update
// at the clock edge; ALU, output bypass and memory read are combinational. With
// run low nothing changes state and nothing drives the crossbar.
// Crossbar sources of the part: 0 = output register 1, 1 = output register 2,
// 2 = mem1 read port, 3 = mem2 read port. East/West chain the 40-bit Z2 of
// neighbouring ALUs. The host loads CR entries (cr_num 1..5) and memory words.
module fpfa_pp
  import fpfa_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          run,
  input  ppsel_t                        sel,
  input  logic [NBUS-1:0][DW-1:0]       bus,
  output logic [NSRC_PP-1:0][DW-1:0]    src_data,
  output logic [NSRC_PP-1:0]            src_en,
  output logic [NSRC_PP-1:0][BSW-1:0]   src_bus,
  input  logic [ZW-1:0]                 east,
  output logic [ZW-1:0]                 west,
  // configuration loading
  input  logic                          cr_we,
  input  logic [2:0]                    cr_num,
  input  logic [2:0]                    cr_idx,
  input  logic [CFG_W-1:0]              cr_wdata,
  // host access to the local memories
  input  logic                          mem_we,
  input  logic                          mem_sel,
  input  logic [MAW-1:0]                mem_addr,
  input  logic [MW-1:0]                 mem_wdata,
  output logic [MW-1:0]                 mem_rdata
);

  // ---------------- configuration registers ----------------
  cr1_t    cr1;
  cr2_t    cr2;
  cr3_t    cr3;
  memcfg_t cr4, cr5;

  fpfa_cfgreg #(.DEPTH(4), .WIDTH(CFG_W)) u_cr1 (
    .clk, .rst_n, .we(cr_we && cr_num == 3'd1), .waddr(cr_idx[1:0]), .wdata(cr_wdata),
    .sel(sel.cr1), .cfg(cr1));
  fpfa_cfgreg #(.DEPTH(8), .WIDTH(CFG_W)) u_cr2 (
    .clk, .rst_n, .we(cr_we && cr_num == 3'd2), .waddr(cr_idx), .wdata(cr_wdata),
    .sel(sel.cr2), .cfg(cr2));
  fpfa_cfgreg #(.DEPTH(8), .WIDTH(CFG_W)) u_cr3 (
    .clk, .rst_n, .we(cr_we && cr_num == 3'd3), .waddr(cr_idx), .wdata(cr_wdata),
    .sel(sel.cr3), .cfg(cr3));
  fpfa_cfgreg #(.DEPTH(4), .WIDTH(CFG_W)) u_cr4 (
    .clk, .rst_n, .we(cr_we && cr_num == 3'd4), .waddr(cr_idx[1:0]), .wdata(cr_wdata),
    .sel(sel.cr45), .cfg(cr4));
  fpfa_cfgreg #(.DEPTH(4), .WIDTH(CFG_W)) u_cr5 (
    .clk, .rst_n, .we(cr_we && cr_num == 3'd5), .waddr(cr_idx[1:0]), .wdata(cr_wdata),
    .sel(sel.cr45), .cfg(cr5));

  // ---------------- input register banks ----------------
  logic [3:0][DW-1:0] opnd;

  for (genvar i = 0; i < 4; i++) begin : g_bank
    fpfa_regbank #(.NREG(4), .W(DW)) u_bank (
      .clk, .rst_n,
      .we    (run && cr2.we[i]),
      .waddr (cr2.waddr[i]),
      .wdata (bus_pick(bus, cr3.insel[i])),
      .raddr (cr1.raddr[i]),
      .rdata (opnd[i]));
  end

  // ---------------- ALU ----------------
  logic [DW-1:0] out1, out2;

  fpfa_alu u_alu (
    .cfg(cr1.fn), .a(opnd[0]), .b(opnd[1]), .c(opnd[2]), .d(opnd[3]),
    .east, .west, .out1, .out2);

  // ---------------- output registers ----------------
  fpfa_outreg #(.W(DW)) u_oreg1 (
    .clk, .rst_n, .load(run && cr2.o_load[0]), .bypass(cr2.o_bypass[0]), .d(out1), .q(src_data[0]));
  fpfa_outreg #(.W(DW)) u_oreg2 (
    .clk, .rst_n, .load(run && cr2.o_load[1]), .bypass(cr2.o_bypass[1]), .d(out2), .q(src_data[1]));

  assign src_en[0]  = run && cr3.odrv_en[0];
  assign src_en[1]  = run && cr3.odrv_en[1];
  assign src_bus[0] = cr3.odrv_bus[0];
  assign src_bus[1] = cr3.odrv_bus[1];

  // ---------------- local memories ----------------
  logic [MW-1:0]  m1_hrd, m2_hrd;
  logic [MAW-1:0] m1_addr, m2_addr;

  fpfa_mem u_mem1 (
    .clk, .rst_n, .en(run), .cfg(cr4), .bus, .rdata(src_data[2]), .addr(m1_addr),
    .host_we(mem_we && !mem_sel), .host_addr(mem_addr), .host_wdata(mem_wdata), .host_rdata(m1_hrd));
  fpfa_mem u_mem2 (
    .clk, .rst_n, .en(run), .cfg(cr5), .bus, .rdata(src_data[3]), .addr(m2_addr),
    .host_we(mem_we && mem_sel), .host_addr(mem_addr), .host_wdata(mem_wdata), .host_rdata(m2_hrd));

  assign src_en[2]  = run && cr4.drv_en;
  assign src_en[3]  = run && cr5.drv_en;
  assign src_bus[2] = cr4.drv_bus;
  assign src_bus[3] = cr5.drv_bus;

  assign mem_rdata = mem_sel ? m2_hrd : m1_hrd;

endmodule

// fpfa_tile: one FPFA processor tile, the top of this design.
//
// Five identical processing parts (fpfa_pp) share a crossbar (fpfa_crossbar)
// and one control unit. The control unit has three parts, as in the document:
// the tile control sequencer (fpfa_tilectl) issues a 6-bit tile instruction
// code per cycle; the decoder (fpfa_decoder) turns it into 50 select signals,
// 10 per processing part; these pick one stored configuration from each of the
// 25 configuration registers, which together drive the 5 x 160 data-path
// control bits. So a program needs only 6 bits per cycle once the decoder and
// configuration registers are loaded ("configuring the device").
//
// The ALUs are chained East-West: ALU i's East input is ALU i+1's West output
// (its Z2); ALU 4's East input is east_in and ALU 0's West output is west_out.
//
// Host port (stands in for the tile's communication unit, which the document
// does not describe). With host_we high, at the clock edge:
//   host_tgt = H_CR   : PP host_pp, CR host_sub (1..5), entry host_addr[2:0] <= host_wdata[31:0]
//   host_tgt = H_DEC  : decoder entry host_addr[5:0] <= host_wdata[49:0] (PP i in bits 10i+9:10i)
//   host_tgt = H_PROG : program word host_addr[5:0] <= host_wdata[15:0]
//   host_tgt = H_MEM  : PP host_pp, memory host_sub[0] (0 = mem1), word host_addr <= host_wdata[15:0]
// host_rdata shows the word host_pp / host_sub[0] / host_addr combinationally.
// A pulse on start (while not busy) runs the program from start_pc. The data
// path acts on a code in the cycle after the sequencer fetched it; done pulses
// during the last instruction, and results are in memory the cycle after.
module fpfa_tile
  import fpfa_pkg::*;
#(
  parameter int PROG_DEPTH = 64
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          host_we,
  input  htgt_e                         host_tgt,
  input  logic [2:0]                    host_pp,
  input  logic [2:0]                    host_sub,
  input  logic [7:0]                    host_addr,
  input  logic [NPP*10-1:0]             host_wdata,
  output logic [MW-1:0]                 host_rdata,
  input  logic                          start,
  input  logic [$clog2(PROG_DEPTH)-1:0] start_pc,
  output logic                          busy,
  output logic                          done,
  input  logic [ZW-1:0]                 east_in,
  output logic [ZW-1:0]                 west_out
);

  localparam int NSRC = NPP * NSRC_PP;

  // ---------------- control ----------------
  logic [CODE_W-1:0] code;
  logic              valid;
  ppsel_t [NPP-1:0]  sel;

  fpfa_tilectl #(.PROG_DEPTH(PROG_DEPTH)) u_ctl (
    .clk, .rst_n,
    .prog_we   (host_we && host_tgt == H_PROG),
    .prog_addr (host_addr[$clog2(PROG_DEPTH)-1:0]),
    .prog_wdata(sqword_t'(host_wdata[15:0])),
    .start, .start_pc, .code, .valid, .busy, .done);

  fpfa_decoder u_dec (
    .clk,
    .we   (host_we && host_tgt == H_DEC),
    .waddr(host_addr[CODE_W-1:0]),
    .wdata(host_wdata),
    .code, .sel);

  // ---------------- data path ----------------
  logic [NBUS-1:0][DW-1:0]          bus;
  logic [NSRC-1:0][DW-1:0]          src_data;
  logic [NSRC-1:0]                  src_en;
  logic [NSRC-1:0][BSW-1:0]         src_bus;
  logic                             conflict;
  logic [NPP:0][ZW-1:0]             chain;   // chain[i] = East input of ALU i
  logic [NPP-1:0][MW-1:0]           mem_rd;

  assign chain[NPP] = east_in;

  for (genvar i = 0; i < NPP; i++) begin : g_pp
    fpfa_pp u_pp (
      .clk, .rst_n,
      .run      (valid),
      .sel      (sel[i]),
      .bus,
      .src_data (src_data[NSRC_PP*i +: NSRC_PP]),
      .src_en   (src_en[NSRC_PP*i +: NSRC_PP]),
      .src_bus  (src_bus[NSRC_PP*i +: NSRC_PP]),
      .east     (chain[i+1]),
      .west     (chain[i]),
      .cr_we    (host_we && host_tgt == H_CR && int'(host_pp) == i),
      .cr_num   (host_sub),
      .cr_idx   (host_addr[2:0]),
      .cr_wdata (host_wdata[CFG_W-1:0]),
      .mem_we   (host_we && host_tgt == H_MEM && int'(host_pp) == i),
      .mem_sel  (host_sub[0]),
      .mem_addr (host_addr),
      .mem_wdata(host_wdata[MW-1:0]),
      .mem_rdata(mem_rd[i]));
  end

  fpfa_crossbar #(.NSRC(NSRC)) u_xbar (.src_data, .src_en, .src_bus, .bus, .conflict);

  assign west_out   = chain[0];
  assign host_rdata = (int'(host_pp) < NPP) ? mem_rd[host_pp] : '0;

  // Two drivers on one crossbar bus is a programming error.
  a_no_bus_conflict: assert property (@(posedge clk) disable iff (!rst_n) !conflict)
    else $error("fpfa_tile: two sources drive one crossbar bus");

endmodule

// fpfa_mem: local memory of a processing part, 256 words of 16 bits, with its
// address register.
//
// Each cycle in which the tile runs (en high) the memory configuration selected
// from CR4/CR5 decides: whether the word at the current address is overwritten
// by the low 16 bits of the crossbar bus chosen by wsel, and how the address
// register moves on (hold, load base, add stride, or base plus the low 8 bits of
// the chosen bus, which gives table lookup). The read port shows the word at the
// current address, sign-extended to 20 bits, in the same cycle (asynchronous
// read from the address register); the processing part drives it onto the bus
// named by drv_bus. A host port writes and reads words directly; a host write
// has priority. Size and width are the document's; the addressing scheme, the
// timing and the host port are this design's choices.
module fpfa_mem
  import fpfa_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  memcfg_t                   cfg,
  input  logic [NBUS-1:0][DW-1:0]   bus,
  output logic [DW-1:0]             rdata,
  output logic [MAW-1:0]            addr,
  input  logic                      host_we,
  input  logic [MAW-1:0]            host_addr,
  input  logic [MW-1:0]             host_wdata,
  output logic [MW-1:0]             host_rdata
);

  logic [MW-1:0]  ram [MDEPTH];
  logic [MAW-1:0] addr_q;
  logic [DW-1:0]  win;

  assign win = bus_pick(bus, cfg.wsel);

  always_ff @(posedge clk) begin
    if (host_we)              ram[host_addr] <= host_wdata;
    else if (en && cfg.we)    ram[addr_q]    <= win[MW-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) addr_q <= '0;
    else if (en) begin
      unique case (cfg.aop)
        AOP_HOLD:   addr_q <= addr_q;
        AOP_BASE:   addr_q <= cfg.base;
        AOP_STRIDE: addr_q <= addr_q + cfg.stride;
        AOP_INDEX:  addr_q <= cfg.base + win[MAW-1:0];
      endcase
    end
  end

  assign addr       = addr_q;
  assign rdata      = DW'(signed'(ram[addr_q]));
  assign host_rdata = ram[host_addr];

endmodule

// tb_fpfa_mem: loads the memory through the host port, then runs random memory
// configurations (address hold / base / stride / bus index, writes from a
// random bus, en on and off) and checks the read port, the address register and
// the memory contents against a model.
module tb_fpfa_mem;
  import fpfa_pkg::*;

  logic clk = 0, rst_n = 0, en = 0, host_we = 0;
  memcfg_t cfg;
  logic [NBUS-1:0][DW-1:0] bus;
  logic [DW-1:0] rdata;
  logic [MAW-1:0] addr, host_addr = 0;
  logic [MW-1:0] host_wdata = 0, host_rdata;
  logic [MW-1:0] model [MDEPTH];
  logic [MAW-1:0] maddr;
  int checks = 0, failures = 0;
  int n_stride = 0, n_index = 0, n_write = 0;

  fpfa_mem dut (.clk, .rst_n, .en, .cfg, .bus, .rdata, .addr, .host_we, .host_addr, .host_wdata, .host_rdata);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0; bus = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < MDEPTH; i++) begin
      @(negedge clk); host_we = 1; host_addr = MAW'(i); host_wdata = MW'($urandom); model[i] = host_wdata;
    end
    @(negedge clk); host_we = 0;
    maddr = '0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = ($urandom_range(0, 7) != 0);
      cfg = memcfg_t'($urandom);
      for (int k = 0; k < NBUS; k++) bus[k] = DW'($urandom);
      #1;
      checks += 2;
      if (addr !== maddr) begin failures++; if (failures < 10) $display("FAIL addr %0d exp %0d", addr, maddr); end
      if (rdata !== DW'(signed'(model[maddr]))) begin failures++; if (failures < 10) $display("FAIL rdata %h", rdata); end
      host_addr = MAW'($urandom); #1; checks++;
      if (host_rdata !== model[host_addr]) failures++;
      @(posedge clk); #1;
      if (en) begin
        logic [DW-1:0] w;
        w = (int'(cfg.wsel) < NBUS) ? bus[cfg.wsel] : '0;
        if (cfg.we) begin model[maddr] = w[MW-1:0]; n_write++; end
        case (cfg.aop)
          AOP_HOLD:   ;
          AOP_BASE:   maddr = cfg.base;
          AOP_STRIDE: begin maddr = maddr + cfg.stride; n_stride++; end
          AOP_INDEX:  begin maddr = cfg.base + w[MAW-1:0]; n_index++; end
        endcase
      end
    end
    @(negedge clk); en = 0;
    for (int i = 0; i < MDEPTH; i++) begin
      host_addr = MAW'(i); #1; checks++;
      if (host_rdata !== model[i]) begin failures++; if (failures < 10) $display("FAIL word %0d", i); end
    end
    checks++; if (n_stride == 0 || n_index == 0 || n_write == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

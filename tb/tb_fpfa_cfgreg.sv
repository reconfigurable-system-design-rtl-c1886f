// tb_fpfa_cfgreg: fills an 8x32 configuration register, then selects entries at
// random and checks the configuration that comes out; also checks reset clears
// the entries and that a 4-entry instance works.
module tb_fpfa_cfgreg;
  logic clk = 0, rst_n = 0, we = 0, we4 = 0;
  logic [2:0] waddr = 0, sel = 0;
  logic [1:0] waddr4 = 0, sel4 = 0;
  logic [31:0] wdata = 0, cfg, cfg4;
  logic [31:0] shadow [8];
  int checks = 0, failures = 0;

  fpfa_cfgreg #(.DEPTH(8), .WIDTH(32)) dut  (.clk, .rst_n, .we, .waddr, .wdata, .sel, .cfg);
  fpfa_cfgreg #(.DEPTH(4), .WIDTH(32)) dut4 (.clk, .rst_n, .we(we4), .waddr(waddr4), .wdata, .sel(sel4), .cfg(cfg4));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 8; i++) begin sel = 3'(i); #1; checks++; if (cfg !== '0) failures++; end
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); we = 1; waddr = 3'(i); wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); we4 = 1; waddr4 = 2'(i); wdata = shadow[7-i];
    end
    @(negedge clk); we4 = 0; wdata = $urandom;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk); sel = 3'($urandom); sel4 = 2'($urandom); #1;
      checks += 2;
      if (cfg !== shadow[sel]) begin failures++; if (failures < 10) $display("FAIL sel=%0d cfg=%h", sel, cfg); end
      if (cfg4 !== shadow[7-sel4]) begin failures++; if (failures < 10) $display("FAIL4 sel=%0d cfg=%h", sel4, cfg4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

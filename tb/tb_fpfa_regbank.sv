// tb_fpfa_regbank: random writes and reads of the four-register bank against a
// shadow copy; checks reset clears the bank and that we=0 leaves it unchanged.
module tb_fpfa_regbank;
  import fpfa_pkg::*;

  logic clk = 0, rst_n = 0, we = 0;
  logic [1:0] waddr = 0, raddr = 0;
  logic [DW-1:0] wdata = 0, rdata;
  logic [DW-1:0] shadow [4];
  int checks = 0, failures = 0;

  fpfa_regbank dut (.clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata);

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
    foreach (shadow[i]) shadow[i] = '0;
    for (int i = 0; i < 4; i++) begin
      raddr = 2'(i); #1; checks++; if (rdata !== '0) failures++;
    end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 2'($urandom); wdata = DW'($urandom);
      @(posedge clk); #1;
      if (we) shadow[waddr] = wdata;
      for (int r = 0; r < 4; r++) begin
        raddr = 2'(r); #1; checks++;
        if (rdata !== shadow[r]) begin
          failures++;
          if (failures < 10) $display("FAIL reg %0d = %h, expected %h", r, rdata, shadow[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

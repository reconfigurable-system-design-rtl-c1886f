// tb_fpfa_outreg: checks that the output register captures only with load and
// that bypass shows the input in the same cycle.
module tb_fpfa_outreg;
  import fpfa_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, bypass = 0;
  logic [DW-1:0] d = 0, q, held;
  int checks = 0, failures = 0;

  fpfa_outreg dut (.clk, .rst_n, .load, .bypass, .d, .q);

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
    held = '0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      load = 1'($urandom); bypass = 1'($urandom); d = DW'($urandom);
      #1; checks++;
      if (q !== (bypass ? d : held)) begin
        failures++;
        if (failures < 10) $display("FAIL before edge q=%h", q);
      end
      @(posedge clk); #1;
      if (load) held = d;
      bypass = 0; #1; checks++;
      if (q !== held) begin
        failures++;
        if (failures < 10) $display("FAIL after edge q=%h held=%h", q, held);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fpfa_decoder: writes all 64 tile instruction codes with random 50-bit
// select words, then reads them back in random order through the code input.
module tb_fpfa_decoder;
  import fpfa_pkg::*;

  logic clk = 0, we = 0;
  logic [CODE_W-1:0] waddr = 0, code = 0;
  ppsel_t [NPP-1:0] wdata, sel;
  logic [NPP*10-1:0] shadow [64];
  int checks = 0, failures = 0;

  fpfa_decoder dut (.clk, .we, .waddr, .wdata, .code, .sel);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wdata = '0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); we = 1; waddr = CODE_W'(i);
      wdata = {18'($urandom), 32'($urandom)}; shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk); code = CODE_W'($urandom); #1;
      checks++;
      if (sel !== shadow[code]) begin failures++; if (failures < 10) $display("FAIL code %0d", code); end
      // select fields land in the right processing part
      checks++;
      if (sel[2].cr3 !== shadow[code][20+5 +: 3]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

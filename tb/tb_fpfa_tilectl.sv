// tb_fpfa_tilectl: loads a program with a straight part, a counted loop and a
// halt, and checks the exact sequence of issued codes, the busy/done timing and
// that a second start runs a program from another address.
module tb_fpfa_tilectl;
  import fpfa_pkg::*;

  logic clk = 0, rst_n = 0, prog_we = 0, start = 0;
  logic [5:0] prog_addr = 0, start_pc = 0;
  sqword_t prog_wdata;
  logic [CODE_W-1:0] code;
  logic valid, busy, done;
  int checks = 0, failures = 0;
  logic [CODE_W-1:0] got [$];
  int done_seen;

  fpfa_tilectl dut (.clk, .rst_n, .prog_we, .prog_addr, .prog_wdata, .start, .start_pc, .code, .valid, .busy, .done);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && valid) got.push_back(code);

  task automatic wr(input int a, input sqop_e op, input int tgt, input int c);
    @(negedge clk);
    prog_we = 1; prog_addr = 6'(a);
    prog_wdata = '{spare: 2'b00, op: op, target: 6'(tgt), code: 6'(c)};
    @(negedge clk); prog_we = 0;
  endtask

  task automatic run(input int pc, input int expect_codes[$]);
    int cyc;
    got.delete(); done_seen = 0;
    @(negedge clk); start = 1; start_pc = 6'(pc);
    @(negedge clk); start = 0;
    cyc = 0;
    while (busy && cyc < 200) begin
      @(posedge clk); #1; cyc++;
      if (done) done_seen++;
    end
    checks++;
    if (got.size() != expect_codes.size()) begin
      failures++; $display("FAIL %0d codes issued, expected %0d", got.size(), expect_codes.size());
    end else
      foreach (expect_codes[i]) begin
        checks++;
        if (got[i] != 6'(expect_codes[i])) begin failures++; $display("FAIL code %0d = %0d exp %0d", i, got[i], expect_codes[i]); end
      end
    checks++; if (done_seen != 1) begin failures++; $display("FAIL done seen %0d times", done_seen); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    checks++; if (busy || valid) failures++;
    // program A at 0: 10, SETC 2 (code 11), body 12, 13 LOOP->2, 14, HALT 15
    wr(0, SQ_NEXT, 0, 10);
    wr(1, SQ_SETC, 2, 11);
    wr(2, SQ_NEXT, 0, 12);
    wr(3, SQ_LOOP, 2, 13);
    wr(4, SQ_NEXT, 0, 14);
    wr(5, SQ_HALT, 0, 15);
    // program B at 40: SETC 0, LOOP body runs once, HALT
    wr(40, SQ_SETC, 0, 33);
    wr(41, SQ_LOOP, 41, 34);
    wr(42, SQ_HALT, 0, 35);
    run(0, '{10, 11, 12, 13, 12, 13, 12, 13, 14, 15});
    run(40, '{33, 34, 35});
    checks++; if (code != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

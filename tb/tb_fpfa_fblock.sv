// tb_fpfa_fblock: checks the five level-one operations on random and corner
// operands against integer arithmetic (results taken modulo 2^20).
module tb_fpfa_fblock;
  import fpfa_pkg::*;

  fop_e          op;
  logic [DW-1:0] x, y, z;
  int checks = 0, failures = 0;

  fpfa_fblock dut (.op, .x, .y, .z);

  function automatic longint s20(input logic [DW-1:0] v);
    return longint'(signed'(v));
  endfunction

  function automatic logic [DW-1:0] model(input fop_e o, input logic [DW-1:0] xa, input logic [DW-1:0] ya);
    longint xs, ys, r;
    xs = s20(xa); ys = s20(ya);
    case (o)
      F_ADD: r = xs + ys;
      F_SUB: r = xs - ys;
      F_ABS: begin r = longint'(signed'(DW'(xs - ys))); r = (r < 0) ? -r : r; end  // |x-y| of the 20-bit difference
      F_MIN: r = (xs < ys) ? xs : ys;
      F_MAX: r = (xs > ys) ? xs : ys;
      default: r = 0;
    endcase
    return r[DW-1:0];
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      op = fop_e'(i % 5);
      if (i < 50) begin
        x = (i % 3 == 0) ? 20'h80000 : 20'h7FFFF;
        y = (i % 2 == 0) ? 20'h00001 : 20'hFFFFF;
      end else begin
        x = DW'($urandom);
        y = DW'($urandom);
        if (i % 4 == 0) begin x = DW'(signed'(16'($urandom))); y = DW'(signed'(16'($urandom))); end
      end
      #1;
      checks++;
      if (z !== model(op, x, y)) begin
        failures++;
        if (failures < 10) $display("FAIL op=%0d x=%h y=%h z=%h exp=%h", op, x, y, z, model(op, x, y));
      end
    end
    // documented example, level-one style: abs((a+b) - max(c,d))
    op = F_ABS; x = 20'd5; y = 20'd12; #1; checks++; if (z !== 20'd7) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

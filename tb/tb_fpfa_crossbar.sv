// tb_fpfa_crossbar: random driver settings with at most one driver per bus,
// checked against a per-bus model; then deliberate double drives must raise
// conflict.
module tb_fpfa_crossbar;
  import fpfa_pkg::*;
  localparam int NSRC = NPP * NSRC_PP;

  logic [NSRC-1:0][DW-1:0]  src_data;
  logic [NSRC-1:0]          src_en;
  logic [NSRC-1:0][BSW-1:0] src_bus;
  logic [NBUS-1:0][DW-1:0]  bus;
  logic                     conflict;
  int checks = 0, failures = 0;

  fpfa_crossbar dut (.src_data, .src_en, .src_bus, .bus, .conflict);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 500; it++) begin
      int owner [NBUS];
      foreach (owner[k]) owner[k] = -1;
      for (int s = 0; s < NSRC; s++) begin
        src_data[s] = DW'($urandom);
        src_bus[s]  = BSW'($urandom_range(0, 15));
        src_en[s]   = 1'b0;
        if ($urandom_range(0, 2) == 0) begin
          if (int'(src_bus[s]) >= NBUS) src_en[s] = 1'b1;      // off-range bus: goes nowhere
          else if (owner[src_bus[s]] < 0) begin owner[src_bus[s]] = s; src_en[s] = 1'b1; end
        end
      end
      #1;
      for (int k = 0; k < NBUS; k++) begin
        checks++;
        if (bus[k] !== ((owner[k] < 0) ? DW'(0) : src_data[owner[k]])) begin
          failures++;
          if (failures < 10) $display("FAIL bus %0d = %h", k, bus[k]);
        end
      end
      checks++; if (conflict) failures++;
      // now make two sources drive one bus
      if (it % 5 == 0) begin
        src_en[0] = 1; src_bus[0] = BSW'(it % NBUS);
        src_en[NSRC-1] = 1; src_bus[NSRC-1] = BSW'(it % NBUS);
        #1; checks++; if (!conflict) begin failures++; $display("FAIL no conflict flagged"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// fpfa_tilectl: tile control sequencer.
//
// Issues one 6-bit tile instruction code per cycle to the decoder. A small
// program memory holds 16-bit words {op, target, code}. After start the words
// run from start_pc; each word's code is issued (code valid one cycle after the
// word is fetched) and its op decides what comes next: NEXT goes on, SETC loads
// the loop counter with target, LOOP jumps back to target while the counter is
// non-zero (decrementing it), and HALT stops. A loop body closed by LOOP with
// the counter set to n runs n+1 times. valid is high in every cycle in which
// code is an issued instruction; done pulses with the last one. That a
// sequencer generates the decoder's six input bits is the document's; the
// program format and loop mechanism are this design's.
module fpfa_tilectl
  import fpfa_pkg::*;
#(
  parameter int PROG_DEPTH = 64
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          prog_we,
  input  logic [$clog2(PROG_DEPTH)-1:0] prog_addr,
  input  sqword_t                       prog_wdata,
  input  logic                          start,
  input  logic [$clog2(PROG_DEPTH)-1:0] start_pc,
  output logic [CODE_W-1:0]             code,
  output logic                          valid,
  output logic                          busy,
  output logic                          done
);

  localparam int PAW = $clog2(PROG_DEPTH);

  sqword_t        prog [PROG_DEPTH];
  logic           running;
  logic [PAW-1:0] pc;
  logic [5:0]     cnt;
  sqword_t        w;

  always_ff @(posedge clk)
    if (prog_we) prog[prog_addr] <= prog_wdata;

  assign w = prog[pc];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running <= 1'b0;
      pc      <= '0;
      cnt     <= '0;
      code    <= '0;
      valid   <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!running) begin
        valid <= 1'b0;
        code  <= '0;
        if (start) begin
          running <= 1'b1;
          pc      <= start_pc;
        end
      end else begin
        code  <= w.code;
        valid <= 1'b1;
        unique case (w.op)
          SQ_NEXT: pc <= pc + 1'b1;
          SQ_SETC: begin cnt <= w.target; pc <= pc + 1'b1; end
          SQ_LOOP: begin
            if (cnt != 0) begin
              cnt <= cnt - 1'b1;
              pc  <= PAW'(w.target);
            end else begin
              pc  <= pc + 1'b1;
            end
          end
          SQ_HALT: begin running <= 1'b0; done <= 1'b1; end
        endcase
      end
    end
  end

  assign busy = running | valid;

endmodule

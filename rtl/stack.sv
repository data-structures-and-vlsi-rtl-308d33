// stack: LIFO of WORDCOUNT words of WORDLENGTH bits, mapped on a RAM.
//
// A counter sp holds the number of stored words; the top is word sp-1.
// One operation per rising clock edge while en is high, each in one clock:
//   S_CLEAR  empty the stack
//   S_PUSH   store d_in on top (ignored when full)
//   S_POP    d_out := top, then remove it (ignored when empty)
//   S_TOP    d_out := top (ignored when empty)
// full and empty are registered and valid after the executing edge; d_out
// holds between pops. The operation set, the flags and the sizes follow
// the described stack; the counter encoding is this design's own.
module stack
  import ds_pkg::*;
#(
  parameter int unsigned WORDCOUNT  = 4,
  parameter int unsigned WORDLENGTH = 4,
  localparam int unsigned PW = $clog2(WORDCOUNT + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  stack_op_e             op,
  input  logic [WORDLENGTH-1:0] d_in,
  output logic [WORDLENGTH-1:0] d_out,
  output logic                  full,
  output logic                  empty
);
  logic [WORDLENGTH-1:0] mem [WORDCOUNT];
  logic [PW-1:0] sp;

  assign full  = sp == PW'(WORDCOUNT);
  assign empty = sp == '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp    <= '0;
      d_out <= '0;
    end else if (en) begin
      unique case (op)
        S_CLEAR: sp <= '0;
        S_PUSH: if (!full) begin
          mem[sp[$clog2(WORDCOUNT)-1:0]] <= d_in;
          sp <= sp + PW'(1);
        end
        S_POP: if (!empty) begin
          d_out <= mem[sp[$clog2(WORDCOUNT)-1:0] - 1'b1];
          sp    <= sp - PW'(1);
        end
        S_TOP: if (!empty) d_out <= mem[sp[$clog2(WORDCOUNT)-1:0] - 1'b1];
      endcase
    end
  end
  // the stack pointer never exceeds the capacity
  always_comb
    assert final (!rst_n || sp <= PW'(WORDCOUNT)) else $error("stack pointer %0d out of range", sp);
endmodule

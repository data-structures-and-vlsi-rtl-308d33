// queue: FIFO of WORDCOUNT words of WORDLENGTH bits as a circular buffer.
//
// An enqueue cursor and a dequeue cursor run around a RAM modulo
// WORDCOUNT; a full flag tells the two cases with equal cursors apart.
// One operation per rising clock edge while en is high, each in one clock:
//   Q_CLEAR    empty the queue
//   Q_ENQUEUE  append d_in at the rear (ignored when full)
//   Q_DEQUEUE  d_out := front element, then remove it (ignored when empty)
//   Q_FRONT    d_out := front element (ignored when empty)
// full and empty are valid after the executing edge. The cursors, the
// modulo wrap and the sizes follow the described queue.
module queue
  import ds_pkg::*;
#(
  parameter int unsigned WORDCOUNT  = 4,
  parameter int unsigned WORDLENGTH = 4,
  localparam int unsigned AW = (WORDCOUNT > 1) ? $clog2(WORDCOUNT) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  queue_op_e             op,
  input  logic [WORDLENGTH-1:0] d_in,
  output logic [WORDLENGTH-1:0] d_out,
  output logic                  full,
  output logic                  empty
);
  logic [WORDLENGTH-1:0] mem [WORDCOUNT];
  logic [AW-1:0] enq_addr, deq_addr, enq_next, deq_next;

  function automatic logic [AW-1:0] wrap_inc(logic [AW-1:0] a);
    return (a == AW'(WORDCOUNT - 1)) ? '0 : a + AW'(1);
  endfunction

  assign enq_next = wrap_inc(enq_addr);
  assign deq_next = wrap_inc(deq_addr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enq_addr <= '0;
      deq_addr <= '0;
      full     <= 1'b0;
      empty    <= 1'b1;
      d_out    <= '0;
    end else if (en) begin
      unique case (op)
        Q_CLEAR: begin
          enq_addr <= '0;
          deq_addr <= '0;
          full     <= 1'b0;
          empty    <= 1'b1;
        end
        Q_ENQUEUE: if (!full) begin
          mem[enq_addr] <= d_in;
          enq_addr      <= enq_next;
          full          <= enq_next == deq_addr;
          empty         <= 1'b0;
        end
        Q_DEQUEUE: if (!empty) begin
          d_out    <= mem[deq_addr];
          deq_addr <= deq_next;
          empty    <= deq_next == enq_addr;
          full     <= 1'b0;
        end
        Q_FRONT: if (!empty) d_out <= mem[deq_addr];
      endcase
    end
  end
endmodule

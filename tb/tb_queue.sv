// tb_queue: self-checking test of the queue.
// Random CLEAR/ENQUEUE/DEQUEUE/FRONT operations (en toggled at random) run against a
// reference FIFO kept as a SystemVerilog queue. Checks d_out, full and empty
// after every edge, so every operation must finish in one clock. Counts how
// often an enqueue hit a full queue and a dequeue hit an empty one and fails if
// either never happened.
// The operations and flags checked are the described queue's, including its
// one-clock timing; the stimulus is this testbench's own.
module tb_queue;
  import ds_pkg::*;
  localparam int unsigned N = 4, W = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, en;
  queue_op_e op;
  logic [W-1:0] d_in, d_out;
  logic full, empty;
  int checks = 0, failures = 0;
  int push_full = 0, pop_empty = 0;

  queue #(.WORDCOUNT(N), .WORDLENGTH(W)) dut (.*);

  logic [W-1:0] model [$];
  logic [W-1:0] e_out;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; en = 1'b0; op = Q_FRONT; d_in = '0; e_out = '0;
    #12 rst_n = 1'b1;
    @(negedge clk);
    check("empty after reset", empty, 1'b1);
    check("full after reset", full, 1'b0);
    for (int n = 0; n < 3000; n++) begin
      int r;
      @(negedge clk);
      en = ($urandom % 8) != 0;
      r = $urandom % 20;
      op = (r == 0) ? Q_CLEAR : (r < 9) ? Q_ENQUEUE : (r < 16) ? Q_DEQUEUE : Q_FRONT;
      d_in = W'($urandom);
      @(posedge clk);
      if (en) unique case (op)
        Q_CLEAR: model.delete();
        Q_ENQUEUE: if (model.size() < N) model.push_back(d_in); else push_full++;
        Q_DEQUEUE:  if (model.size() > 0) e_out = model.pop_front(); else pop_empty++;
        Q_FRONT:  if (model.size() > 0) e_out = model[0];
      endcase
      #1;
      check("d_out", d_out, e_out);
      check("full", full, model.size() == N);
      check("empty", empty, model.size() == 0);
    end
    $display("push on full: %0d, pop on empty: %0d", push_full, pop_empty);
    if (push_full == 0 || pop_empty == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

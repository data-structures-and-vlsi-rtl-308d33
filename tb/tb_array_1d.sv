// tb_array_1d: self-checking test of the one-dimensional array.
// Random UPDATE and RETRIEVE operations with en toggled at random and with
// indices inside and outside 1..n are compared with a reference array.
// Checks that a retrieve shows its element after exactly one clock edge and
// that nothing changes with en low or an out-of-range index.
// The operations checked are the described array's; the stimulus is this
// testbench's own.
module tb_array_1d;
  import ds_pkg::*;
  localparam int unsigned N = 4, W = 4, IW = $clog2(N + 1);
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, en;
  array_op_e op;
  logic [IW-1:0] index;
  logic [W-1:0] d_in, d_out;
  int checks = 0, failures = 0;

  array_1d #(.NUM_ELEMENTS(N), .ELEMENT_W(W)) dut (.*);

  logic [W-1:0] model [1:N];
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
    rst_n = 1'b0; en = 1'b0; op = ARR_RETRIEVE; index = IW'(1); d_in = '0;
    for (int i = 1; i <= N; i++) model[i] = '0;
    e_out = '0;
    #12 rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      en = ($urandom % 4) != 0;
      op = array_op_e'($urandom % 2);
      index = IW'($urandom % (N + 2));     // 0 and N+1 are out of range
      d_in = W'($urandom);
      @(posedge clk);
      if (en && index >= 1 && index <= N) begin
        if (op == ARR_UPDATE) model[index] = d_in;
        else e_out = model[index];
      end
      #1 check("d_out", d_out, e_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ram: self-checking test of the synchronous RAM.
// Random reads and writes, with chip select toggled at random, are compared
// with a reference array kept in the testbench. Checks that a read shows its
// word after exactly one clock edge and that data_out holds while cs is low
// or during writes.
// The read/write behaviour checked is the described RAM's; the stimulus and
// the one-clock read check are this testbench's own.
module tb_ram;
  localparam int ADDR_W = 4, DATA_W = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              cs, r_w;
  logic [ADDR_W-1:0] address;
  logic [DATA_W-1:0] data_in, data_out;
  int checks = 0, failures = 0;

  ram #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) dut (.*);

  logic [DATA_W-1:0] model [2**ADDR_W];
  logic [DATA_W-1:0] expect_out;

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
    cs = 1'b0; r_w = 1'b1; address = '0; data_in = '0;
    // fill every word so that every later read has a known value
    for (int a = 0; a < 2**ADDR_W; a++) begin
      @(negedge clk);
      cs = 1'b1; r_w = 1'b0; address = ADDR_W'(a); data_in = DATA_W'($urandom);
      model[a] = data_in;
    end
    @(negedge clk);
    cs = 1'b1; r_w = 1'b1; address = '0;
    @(negedge clk);
    expect_out = model[0];
    check("first read", data_out, expect_out);
    for (int n = 0; n < 2000; n++) begin
      cs = ($urandom % 4) != 0;
      r_w = $urandom % 2;
      address = ADDR_W'($urandom);
      data_in = DATA_W'($urandom);
      @(posedge clk);
      if (cs && r_w) expect_out = model[address];
      if (cs && !r_w) model[address] = data_in;
      @(negedge clk);
      check("data_out", data_out, expect_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_async_ram: self-checking test of the RAM without a clock.
// Each operation sets r_w, address and data, then raises chip select; the
// result is compared with a reference array. Also checks that nothing
// happens while cs stays high or low, only at its rising edge.
// The strobe-on-chip-select behaviour checked is the described RAM's; the
// stimulus is this testbench's own.
module tb_async_ram;
  localparam int ADDR_W = 4, DATA_W = 8;
  logic              cs, r_w;
  logic [ADDR_W-1:0] address;
  logic [DATA_W-1:0] data_in, data_out;
  int checks = 0, failures = 0;

  async_ram #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) dut (.*);

  logic [DATA_W-1:0] model [2**ADDR_W];
  logic [DATA_W-1:0] expect_out;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic pulse(logic rw, logic [ADDR_W-1:0] a, logic [DATA_W-1:0] d);
    r_w = rw; address = a; data_in = d;
    #5 cs = 1'b1;
    #5 cs = 1'b0;
    // inputs change with cs low or high: no effect
    address = ~a; data_in = ~d; r_w = ~rw;
    #5;
  endtask

  initial begin : watchdog
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cs = 1'b0; r_w = 1'b1; address = '0; data_in = '0;
    #5;
    for (int a = 0; a < 2**ADDR_W; a++) begin
      model[a] = DATA_W'($urandom);
      pulse(1'b0, ADDR_W'(a), model[a]);
    end
    pulse(1'b1, '0, '0);
    expect_out = model[0];
    check("first read", data_out, expect_out);
    for (int n = 0; n < 1000; n++) begin
      logic rw; logic [ADDR_W-1:0] a; logic [DATA_W-1:0] d;
      rw = $urandom % 2; a = ADDR_W'($urandom); d = DATA_W'($urandom);
      pulse(rw, a, d);
      if (rw) begin
        expect_out = model[a];
        check("read", data_out, expect_out);
      end else begin
        model[a] = d;
        check("hold on write", data_out, expect_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

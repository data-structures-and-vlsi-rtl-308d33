// tb_list_store: self-checking test of the array-mapped list.
// Random CLEAR/INSERT/DELETE/RETRIEVE/LOCATE/END operations, with positions
// in and out of range, run against a reference list kept as a
// SystemVerilog queue. After each operation the testbench waits for ready
// and checks d_out, pos_out, full, empty and the number of clocks ready
// stayed low (INSERT at p: n-p+2; DELETE at p: n-p+1; LOCATE: found
// position or n+1; others 0, with n the length before the operation).
// Counts shifts over more than one word, LOCATE misses and inserts refused
// on a full list, and fails if any never happened.
// The operations checked are the described list's; the latencies checked
// are the block's own one-word-per-clock schedule.
module tb_list_store;
  import ds_pkg::*;
  localparam int unsigned N = 4, W = 3, POSW = $clog2(N + 2);
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, en;
  list_op_e op;
  logic [POSW-1:0] pos_in, pos_out;
  logic [W-1:0] d_in, d_out;
  logic ready, full, empty;
  int checks = 0, failures = 0;
  int long_shifts = 0, misses = 0, full_refused = 0;

  list_store #(.NUM_ELEMENTS(N), .ELEMENT_W(W)) dut (.*);

  logic [W-1:0]    model [$];
  logic [W-1:0]    e_out;
  logic [POSW-1:0] e_pos;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; en = 1'b0; op = L_END; d_in = '0; pos_in = '0;
    e_out = '0; e_pos = POSW'(1);
    #12 rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      int r, p, sz, lat, busy, found;
      r = $urandom % 22;
      @(negedge clk);
      op = (r == 0) ? L_CLEAR : (r < 9) ? L_INSERT : (r < 13) ? L_DELETE :
           (r < 16) ? L_RETRIEVE : (r < 20) ? L_LOCATE : L_END;
      pos_in = POSW'($urandom % (N + 2));
      d_in = W'($urandom);
      en = 1'b1;
      p = pos_in; sz = model.size(); lat = 0;
      unique case (op)
        L_CLEAR: model.delete();
        L_INSERT:
          if (p >= 1 && p <= sz + 1 && sz < N) begin
            model.insert(p - 1, d_in);
            lat = sz - p + 2;
          end else if (sz == N) full_refused++;
        L_DELETE:
          if (p >= 1 && p <= sz) begin
            e_out = model[p - 1];
            model.delete(p - 1);
            lat = sz - p + 1;
          end
        L_RETRIEVE: if (p >= 1 && p <= sz) e_out = model[p - 1];
        L_LOCATE: begin
          found = 0;
          for (int k = sz - 1; k >= 0; k--) if (model[k] == d_in) found = k + 1;
          e_pos = (found != 0) ? POSW'(found) : POSW'(sz + 1);
          lat = (found != 0) ? found : sz + 1;
          if (found == 0) misses++;
        end
        L_END: e_pos = POSW'(sz + 1);
        default: ;
      endcase
      if (lat > 2 && (op == L_INSERT || op == L_DELETE)) long_shifts++;
      @(negedge clk);
      en = 1'b0;
      busy = 0;
      while (!ready) begin
        busy++;
        @(negedge clk);
      end
      check("busy clocks", busy, lat);
      check("d_out", d_out, e_out);
      check("pos_out", pos_out, e_pos);
      check("full", full, model.size() == N);
      check("empty", empty, model.size() == 0);
    end
    $display("long shifts %0d, locate misses %0d, full refused %0d", long_shifts, misses, full_refused);
    if (long_shifts == 0 || misses == 0 || full_refused == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

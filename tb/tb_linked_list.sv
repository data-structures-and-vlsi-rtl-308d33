// tb_linked_list: self-checking test of the cursor linked list.
// Random CLEAR/INSERT/DELETE/RETRIEVE/NEXT operations, with positions in and
// out of range, run against a reference list kept as a SystemVerilog queue.
// After each operation the testbench waits for ready and checks d_out,
// next_out, full, empty and the number of clocks ready stayed low
// (RETRIEVE at p: p; INSERT/DELETE at p: max(p-1,1); CLEAR/NEXT: 0).
// Counts cursor walks of more than one link and operations refused for a
// missing position or a full list, and fails if any never happened.
// The operations checked are the described linked list's; the latencies
// checked are the block's own schedule.
module tb_linked_list;
  import ds_pkg::*;
  localparam int unsigned N = 4, W = 4, POSW = $clog2(N + 2);
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, en;
  ll_op_e op;
  logic [W-1:0] d_in, d_out;
  logic [POSW-1:0] pos;
  logic next_out, ready, full, empty;
  int checks = 0, failures = 0;
  int long_walks = 0, refused = 0, full_refused = 0;

  linked_list #(.NUM_ELEMENTS(N), .ELEMENT_W(W)) dut (.*);

  logic [W-1:0] model [$];
  logic [W-1:0] e_out;
  logic         e_next;

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
    rst_n = 1'b0; en = 1'b0; op = LL_NXT; d_in = '0; pos = '0;
    e_out = '0; e_next = 1'b0;
    #12 rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      int r, p, sz, lat, busy;
      r = $urandom % 20;
      @(negedge clk);
      op = (r == 0) ? LL_CLEAR : (r < 9) ? LL_INSERT : (r < 13) ? LL_DELETE :
           (r < 17) ? LL_RETRIEVE : LL_NXT;
      pos = POSW'($urandom % (N + 2));
      d_in = W'($urandom);
      en = 1'b1;
      p = pos; sz = model.size(); lat = 0;
      unique case (op)
        LL_CLEAR: begin model.delete(); e_next = 1'b0; end
        LL_INSERT:
          if (p >= 1 && p <= sz + 1 && sz < N) begin
            model.insert(p - 1, d_in);
            lat = (p > 1) ? p - 1 : 1;
          end else begin
            refused++;
            if (sz == N) full_refused++;
          end
        LL_DELETE:
          if (p >= 1 && p <= sz) begin
            e_out = model[p - 1];
            model.delete(p - 1);
            lat = (p > 1) ? p - 1 : 1;
          end else refused++;
        LL_RETRIEVE:
          if (p >= 1 && p <= sz) begin
            e_out = model[p - 1];
            e_next = p < sz;
            lat = p;
          end else refused++;
        LL_NXT: e_next = p >= 1 && p < sz;
        default: ;
      endcase
      if (lat > 1) long_walks++;
      @(negedge clk);
      en = 1'b0;
      busy = 0;
      while (!ready) begin
        busy++;
        @(negedge clk);
      end
      check("busy clocks", busy, lat);
      check("d_out", d_out, e_out);
      check("next_out", next_out, e_next);
      check("full", full, model.size() == N);
      check("empty", empty, model.size() == 0);
    end
    $display("long walks %0d, refused %0d (on full %0d)", long_walks, refused, full_refused);
    if (long_walks == 0 || refused == 0 || full_refused == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_table_store: self-checking test of the keyed table.
// Random CLEAR/INSERT/DELETE/RETRIEVE/MEMBER operations on a small key
// space run against a reference associative array. Every operation must
// finish in one clock: member, k_out, d_out, full and empty are checked
// after the executing edge. Counts inserts that replaced the data of an
// existing key, deletes of a record that was not the last one stored and
// inserts refused on a full table, and fails if any never happened.
// The operations checked are the described table's; the one-clock timing is
// the block's own parallel-compare choice.
module tb_table_store;
  import ds_pkg::*;
  localparam int unsigned N = 4, KW = 4, DW = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, en;
  table_op_e op;
  logic [KW-1:0] k_in, k_out;
  logic [DW-1:0] d_in, d_out;
  logic member, ready, full, empty;
  int checks = 0, failures = 0;
  int replaced = 0, full_refused = 0, inner_deletes = 0;

  table_store #(.MAX_ELEMENTS(N), .KEY_W(KW), .DATA_W(DW)) dut (.*);

  logic [DW-1:0] model [logic [KW-1:0]];
  logic [KW-1:0] order [$];          // keys in insertion order
  logic [KW-1:0] e_k;
  logic [DW-1:0] e_d;
  logic          e_member;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; en = 1'b0; op = T_MEMBER; k_in = '0; d_in = '0;
    e_k = '0; e_d = '0; e_member = 1'b0;
    #12 rst_n = 1'b1;
    @(negedge clk);
    check("ready", ready, 1'b1);
    for (int n = 0; n < 4000; n++) begin
      int r;
      r = $urandom % 20;
      @(negedge clk);
      op = (r == 0) ? T_CLEAR : (r < 9) ? T_INSERT : (r < 13) ? T_DELETE :
           (r < 16) ? T_RETRIEVE : T_MEMBER;
      k_in = KW'($urandom % 7);
      d_in = DW'($urandom);
      en = ($urandom % 8) != 0;
      @(posedge clk);
      if (en) unique case (op)
        T_CLEAR: begin model.delete(); order.delete(); e_member = 1'b0; end
        T_INSERT:
          if (model.exists(k_in)) begin
            model[k_in] = d_in; e_member = 1'b1; replaced++;
          end else if (model.num() < N) begin
            model[k_in] = d_in; order.push_back(k_in); e_member = 1'b1;
          end else begin
            e_member = 1'b0; full_refused++;
          end
        T_DELETE:
          if (model.exists(k_in)) begin
            e_k = k_in; e_d = model[k_in]; e_member = 1'b1;
            model.delete(k_in);
            foreach (order[i]) if (order[i] == k_in) begin
              if (i != order.size() - 1) inner_deletes++;
              order.delete(i);
              break;
            end
          end else e_member = 1'b0;
        T_RETRIEVE, T_MEMBER:
          if (model.exists(k_in)) begin
            e_k = k_in; e_d = model[k_in]; e_member = 1'b1;
          end else e_member = 1'b0;
        default: ;
      endcase
      #1;
      check("member", member, e_member);
      check("k_out", k_out, e_k);
      check("d_out", d_out, e_d);
      check("full", full, model.num() == N);
      check("empty", empty, model.num() == 0);
      check("ready", ready, 1'b1);
    end
    $display("replaced %0d, inner deletes %0d, full refused %0d", replaced, inner_deletes, full_refused);
    if (replaced == 0 || inner_deletes == 0 || full_refused == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

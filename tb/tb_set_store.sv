// tb_set_store: self-checking test of the sorted set store.
// A reference model keeps every set as a sorted SystemVerilog queue.
// Random CLEAR/INSERT/DELETE/MEMBER/ASSIGN/EQUAL/MIN/MAX and UNION/
// INTERSECTION/DIFFERENCE operations (set names sometimes equal or out of
// range) are checked: d_out, the member and error pulses, full and empty of
// the set operated on, the stored contents (through MIN, MAX and MEMBER
// probes) and, for the merges, the number of busy clocks, which is one per
// merge step plus one. Counts union overflows, non-empty intersections and
// differences, refused merges and EQUAL results both ways, and fails if any
// never happened.
// The operations checked are the described set's; the merge clock count and
// the error cases are the block's own choices.
module tb_set_store;
  import ds_pkg::*;
  localparam int unsigned S = 4, E = 4, W = 4;
  localparam int unsigned SW = $clog2(S + 1);
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, en;
  set_op_e op;
  logic [SW-1:0] s1_in, s2_in, s3_in;
  logic [W-1:0] d_in, d_out;
  logic member, error, ready, full, empty;
  int checks = 0, failures = 0;
  int overflows = 0, inter_hits = 0, diff_hits = 0, merge_refused = 0, eq_true = 0, eq_false = 0;

  set_store #(.NUM_SETS(S), .EL_PER_SET(E), .ELEMENT_W(W)) dut (.*);

  int sets [1:S][$];
  int e_d;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time);
    end
  endtask

  function automatic bit has(int s, int x);
    foreach (sets[s][i]) if (sets[s][i] == x) return 1;
    return 0;
  endfunction

  // merge of two sorted sets as the block walks them; returns the steps
  function automatic int merge(set_op_e o, int a[$], int b[$], ref int c[$], ref bit ovf);
    int i = 0, j = 0, steps = 0;
    c.delete();
    ovf = 0;
    forever begin
      bit ta, tb, em;
      int x;
      ta = 0; tb = 0; em = 0; x = 0;
      if (i < a.size() && j < b.size()) begin
        ta = a[i] <= b[j]; tb = b[j] <= a[i];
        x = ta ? a[i] : b[j];
        em = (o == SET_UNION) || (o == SET_INTERSECTION && ta && tb) ||
             (o == SET_DIFFERENCE && ta && !tb);
      end else if (i < a.size() && o != SET_INTERSECTION) begin
        ta = 1; x = a[i]; em = 1;
      end else if (j < b.size() && o == SET_UNION) begin
        tb = 1; x = b[j]; em = 1;
      end else return steps + 1;
      if (em && c.size() == E) begin ovf = 1; return steps + 1; end
      if (ta) i++;
      if (tb) j++;
      if (em) c.push_back(x);
      steps++;
    end
  endfunction

  task automatic run(set_op_e o, int a, int b, int c, int d, bit e_mem, bit e_err,
                     int status_set, int e_busy);
    int busy;
    @(negedge clk);
    op = o; s1_in = SW'(a); s2_in = SW'(b); s3_in = SW'(c); d_in = W'(d); en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    busy = 0;
    while (!ready) begin
      busy++;
      @(negedge clk);
    end
    // member/error pulse in the clock after the completing edge
    if (busy == 0) begin
      check("member", member, e_mem);
      check("error", error, e_err);
    end else begin
      check("merge error", error, e_err);
    end
    check("busy clocks", busy, e_busy);
    check("d_out", d_out, e_d);
    if (status_set != 0) begin
      check("full", full, sets[status_set].size() == E);
      check("empty", empty, sets[status_set].size() == 0);
    end
  endtask

  initial begin : watchdog
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; en = 1'b0; op = SET_MEMBER; s1_in = SW'(1); s2_in = SW'(2); s3_in = SW'(3); d_in = '0;
    for (int s = 1; s <= S; s++) sets[s].delete();
    e_d = 0;
    #12 rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      int r, a, b, c, x;
      bit valid1;
      r = $urandom % 40;
      a = ($urandom % 16 == 0) ? 0 : 1 + $urandom % S;
      b = 1 + $urandom % S;
      c = 1 + $urandom % S;
      x = $urandom % 10;
      valid1 = a != 0;
      if (r == 0) begin
        if (valid1) sets[a].delete();
        run(SET_CLEAR, a, b, c, x, 0, !valid1, a, 0);
      end else if (r < 12) begin
        bit m, er;
        m = 0; er = !valid1;
        if (valid1) begin
          if (has(a, x)) m = 1;
          else if (sets[a].size() == E) er = 1;
          else begin
            int k;
            k = 0;
            while (k < sets[a].size() && sets[a][k] < x) k++;
            sets[a].insert(k, x);
            m = 1;
          end
        end
        run(SET_INSERT, a, b, c, x, m, er, a, 0);
      end else if (r < 16) begin
        if (valid1) foreach (sets[a][i]) if (sets[a][i] == x) begin sets[a].delete(i); break; end
        run(SET_DELETE, a, b, c, x, 0, !valid1, a, 0);
      end else if (r < 20) begin
        run(SET_MEMBER, a, b, c, x, valid1 && has(a, x), !valid1, a, 0);
      end else if (r < 22) begin
        if (valid1) sets[a] = sets[b];
        run(SET_ASSIGN, a, b, c, x, 0, !valid1, a, 0);
      end else if (r < 25) begin
        bit eq;
        eq = valid1 && sets[a] == sets[b];
        if (eq) eq_true++; else if (valid1) eq_false++;
        run(SET_EQUAL, a, b, c, x, 0, !eq, a, 0);
      end else if (r < 28) begin
        bit er;
        er = !valid1 || sets[a].size() == 0;
        if (!er) e_d = (r < 26) ? sets[a][0] : sets[a][$];
        run((r < 26) ? SET_MIN : SET_MAX, a, b, c, x, 0, er, a, 0);
      end else begin
        set_op_e o;
        int res[$];
        bit ovf;
        int steps;
        o = (r < 32) ? SET_UNION : (r < 36) ? SET_INTERSECTION : SET_DIFFERENCE;
        if (!valid1 || a == b || a == c || b == c) begin
          merge_refused++;
          run(o, a, b, c, x, 0, 1, 0, 0);
        end else begin
          steps = merge(o, sets[a], sets[b], res, ovf);
          sets[c] = res;
          if (ovf) overflows++;
          if (o == SET_INTERSECTION && res.size() > 0) inter_hits++;
          if (o == SET_DIFFERENCE && res.size() > 0 && res.size() < sets[a].size()) diff_hits++;
          run(o, a, b, c, x, 0, ovf, c, steps);
        end
      end
    end
    $display("overflows %0d, intersections %0d, differences %0d, refused %0d, equal %0d/%0d",
             overflows, inter_hits, diff_hits, merge_refused, eq_true, eq_false);
    if (overflows == 0 || inter_hits == 0 || diff_hits == 0 || merge_refused == 0 ||
        eq_true == 0 || eq_false == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

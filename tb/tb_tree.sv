// tb_tree: self-checking test of the set of trees.
// A reference model in the testbench keeps each node's parent, ordered
// child list and label, the root of every tree name and the free nodes as
// a stack (the block reuses the most recently freed node first, and CLEAR
// frees a tree in post-order). Random CREATE (0 to 3 subtrees, the extra
// names given serially), CLEAR, RESET and PARENT/LEFT_CHILD/RIGHT_SIBLING/
// LABEL/ROOT queries are checked: node_out, label_out, t_out, the error
// pulse, full, empty, and for CLEAR of a k-node tree 2k-1 busy clocks.
// Counts creates with several subtrees, clears of trees of three or more
// nodes, refused creates and refused subtree names, and fails if any never
// happened.
// The operations checked are the described tree's; the CLEAR clock count and
// the error cases are the block's own choices.
module tb_tree;
  import ds_pkg::*;
  localparam int unsigned T = 4, M = 8, LW = 4;
  localparam int unsigned NW = $clog2(M + 1), TW = $clog2(T + 1);
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, en;
  tree_op_e op;
  logic [TW-1:0] t_in, t_out, i_in;
  logic [LW-1:0] label_in, label_out;
  logic [NW-1:0] node_in, node_out;
  logic error, ready, full, empty;
  int checks = 0, failures = 0;
  int multi_creates = 0, big_clears = 0, create_refused = 0, child_refused = 0;

  tree #(.MAX_TREES(T), .MAX_NODES(M), .LABEL_W(LW)) dut (.*);

  // reference model
  int        root [1:T];
  int        par  [1:M];
  int        kids [1:M][$];
  int        lab  [1:M];
  bit        used [1:M];
  int        free_stack [$];
  int        e_node, e_label, e_t;
  int        none [$], one [$];

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time);
    end
  endtask

  task automatic model_reset();
    free_stack.delete();
    for (int n = 1; n <= M; n++) begin
      free_stack.push_back(n);
      used[n] = 0; par[n] = 0; kids[n].delete(); lab[n] = 0;
    end
    for (int t = 1; t <= T; t++) root[t] = 0;
  endtask

  function automatic int size_of(int n);
    int s = 1;
    foreach (kids[n][i]) s += size_of(kids[n][i]);
    return s;
  endfunction

  task automatic free_postorder(int n);
    foreach (kids[n][i]) free_postorder(kids[n][i]);
    kids[n].delete();
    used[n] = 0;
    par[n] = 0;
    free_stack.push_front(n);
  endtask

  task automatic check_status();
    check("full", full, free_stack.size() == 0);
    check("empty", empty, free_stack.size() == M);
    check("node_out", node_out, e_node);
    check("label_out", label_out, e_label);
    check("t_out", t_out, e_t);
  endtask

  // one single-clock operation; error expected as given
  task automatic single(tree_op_e o, int t, int nd, bit e_err);
    @(negedge clk);
    op = o; t_in = TW'(t); node_in = NW'(nd); en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    check("ready", ready, 1'b1);
    check("error", error, e_err);
    check_status();
  endtask

  task automatic do_create(int t, int lb, int nsub, int names[$]);
    bit ok;
    int r;
    @(negedge clk);
    op = TR_CREATE; t_in = TW'(t); i_in = TW'(nsub); label_in = LW'(lb); en = 1'b1;
    ok = t >= 1 && t <= T && free_stack.size() > 0 &&
         ((nsub == 0 && root[t] == 0) || (nsub != 0 && root[t] != 0));
    if (ok) begin
      r = free_stack.pop_front();
      used[r] = 1; lab[r] = lb; par[r] = 0; kids[r].delete();
      if (nsub != 0) begin kids[r].push_back(root[t]); par[root[t]] = r; end
      root[t] = r;
      e_node = r; e_label = lb; e_t = t;
    end else create_refused++;
    @(negedge clk);
    en = 1'b0;
    check("create error", error, !ok);
    if (ok) begin
      if (nsub > 1) multi_creates++;
      for (int c = 1; c < nsub; c++) begin
        int ct;
        bit cok;
        check("ready low while collecting", ready, 1'b0);
        ct = names[c - 1];
        op = TR_CREATE; t_in = TW'(ct); en = 1'b1;
        cok = ct >= 1 && ct <= T && ct != t && root[ct] != 0;
        if (cok) begin
          kids[r].push_back(root[ct]); par[root[ct]] = r; root[ct] = 0;
        end else child_refused++;
        @(negedge clk);
        en = 1'b0;
        check("child error", error, !cok);
      end
    end
    check("ready after create", ready, 1'b1);
    check_status();
  endtask

  task automatic do_clear(int t);
    int busy, k;
    @(negedge clk);
    op = TR_CLEAR; t_in = TW'(t); en = 1'b1;
    k = 0;
    if (t >= 1 && t <= T && root[t] != 0) begin
      k = size_of(root[t]);
      free_postorder(root[t]);
      root[t] = 0;
    end
    if (k >= 3) big_clears++;
    e_t = t; e_node = 0; e_label = 0;
    @(negedge clk);
    en = 1'b0;
    check("clear error", error, !(t >= 1 && t <= T));
    busy = 0;
    while (!ready) begin
      busy++;
      @(negedge clk);
    end
    check("clear busy clocks", busy, (k == 0) ? 0 : 2 * k - 1);
    check_status();
  endtask

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; en = 1'b0; op = TR_ROOT; t_in = '0; i_in = '0; label_in = '0; node_in = '0;
    model_reset();
    e_node = 0; e_label = 0; e_t = 0;
    #12 rst_n = 1'b1;
    // directed: the tree of two leaves under a root, then a deeper one
    none.delete();
    do_create(1, 5, 0, none);
    do_create(2, 6, 0, none);
    one.delete(); one.push_back(2);
    do_create(1, 7, 2, one);          // root 7 with children 5, 6 -> tree 1
    do_create(3, 9, 0, none);
    one.delete(); one.push_back(1);
    do_create(3, 10, 2, one);         // root 10 with children 9, tree(7,5,6)
    single(TR_ROOT, 3, 0, 0);
    do_clear(3);                      // 6 nodes: 11 clocks
    for (int n = 0; n < 1500; n++) begin
      int r, t, nd;
      r = $urandom % 30;
      t = $urandom % (T + 1);
      if (r < 10) begin
        int ns; int names[$];
        ns = (r < 4) ? 0 : $urandom % 4;
        names.delete();
        for (int c = 1; c < ns; c++) names.push_back(1 + $urandom % (T + 1));
        do_create((r < 9) ? 1 + $urandom % T : t, $urandom % 16, ns, names);
      end else if (r < 13) do_clear(t);
      else if (r == 13) begin
        @(negedge clk);
        op = TR_RESET; t_in = TW'(t); en = 1'b1;
        model_reset();
        e_t = t; e_node = 0; e_label = 0;
        @(negedge clk);
        en = 1'b0;
        check("reset error", error, 1'b0);
        check_status();
      end else if (r < 16) begin
        bit bad;
        bad = !(t >= 1 && t <= T);
        e_t = t; e_node = bad ? 0 : root[t];
        single(TR_ROOT, t, 0, bad);
      end else begin
        tree_op_e q;
        bit bad;
        nd = $urandom % (M + 1);
        q = (r < 20) ? TR_PARENT : (r < 24) ? TR_LEFT_CHILD : (r < 27) ? TR_RIGHT_SIBLING : TR_LABEL;
        bad = !(nd >= 1 && nd <= M && used[nd]);
        if (bad) begin e_node = 0; e_label = 0; end
        else unique case (q)
          TR_PARENT:     e_node = par[nd];
          TR_LEFT_CHILD: e_node = (kids[nd].size() > 0) ? kids[nd][0] : 0;
          TR_RIGHT_SIBLING: begin
            int p;
            p = par[nd];
            e_node = 0;
            if (p != 0)
              foreach (kids[p][i])
                if (kids[p][i] == nd && i + 1 < kids[p].size()) e_node = kids[p][i + 1];
          end
          default:       e_label = lab[nd];
        endcase
        single(q, t, nd, bad);
      end
    end
    $display("multi creates %0d, big clears %0d, create refused %0d, child refused %0d",
             multi_creates, big_clears, create_refused, child_refused);
    if (multi_creates == 0 || big_clears == 0 || create_refused == 0 || child_refused == 0)
      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ds_top: end-to-end test of the whole collection at its default sizes.
//
// Instantiates ds_top without any parameter override and drives every block
// through a short directed scenario that exercises the mechanism the block
// exists for, checking results and, for the multi-clock blocks, the number
// of clocks ready stays low:
//   RAM / async RAM  write all words, read them back
//   CAM              load by address, multiple-response match, mark all
//                    matches with WRALL, read them out one by one with
//                    WRFIRST until no response
//   array, record    update every element, retrieve every element
//   stack, queue     fill to full, overflow ignored, drain in LIFO / FIFO
//                    order (the queue wraps its cursors), empty flags
//   linked list      insert/delete/retrieve at positions, walk clocks
//   list             insert with shifting, locate, delete, END
//   table            insert, replace an existing key, delete (last record
//                    moves), absent key, full table
//   tree             two leaves joined under a new root by a two-child
//                    CREATE, navigation, CLEAR of the 3-node tree (5 clocks)
//   set              sorted inserts, union, intersection, difference with
//                    merge clocks, union overflow, refused merge, EQUAL
//   graph            nodes, edge, refused node delete (n_op), deletes
// Each mechanism increments a counter when it is observed; a counter that
// stays at zero adds a failure. A watchdog ends a hung run. The scenario
// and the counters are this design's own test plan.
module tb_ds_top;
  import ds_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic       ram_cs, ram_r_w;
  logic [3:0] ram_address;
  logic [7:0] ram_data_in, ram_data_out;
  logic       aram_cs, aram_r_w;
  logic [3:0] aram_address;
  logic [7:0] aram_data_in, aram_data_out;
  cam_op_e    cam_op;
  logic [7:0] cam_match_data, cam_match_mask, cam_mset, cam_mres, cam_nmset, cam_nmres;
  logic [3:0] cam_addr_in, cam_addr_out;
  logic [1:0] cam_numomw;
  logic [7:0] cam_data_out;
  logic       arr_en;
  array_op_e  arr_op;
  logic [2:0] arr_index;
  logic [3:0] arr_d_in, arr_d_out;
  logic       rec_en;
  array_op_e  rec_op;
  logic [2:0] rec_id;
  logic [3:0] rec_d_in, rec_d_out;
  logic       ll_en;
  ll_op_e     ll_op;
  logic [3:0] ll_d_in, ll_d_out;
  logic [2:0] ll_pos;
  logic       ll_next_out, ll_ready, ll_full, ll_empty;
  logic       lst_en;
  list_op_e   lst_op;
  logic [2:0] lst_pos_in, lst_pos_out;
  logic [3:0] lst_d_in, lst_d_out;
  logic       lst_ready, lst_full, lst_empty;
  logic       stk_en;
  stack_op_e  stk_op;
  logic [3:0] stk_d_in, stk_d_out;
  logic       stk_full, stk_empty;
  logic       que_en;
  queue_op_e  que_op;
  logic [3:0] que_d_in, que_d_out;
  logic       que_full, que_empty;
  logic       tbl_en;
  table_op_e  tbl_op;
  logic [3:0] tbl_k_in, tbl_d_in, tbl_k_out, tbl_d_out;
  logic       tbl_member, tbl_ready, tbl_full, tbl_empty;
  logic       tr_en;
  tree_op_e   tr_op;
  logic [2:0] tr_t_in, tr_t_out, tr_i_in;
  logic [3:0] tr_label_in, tr_label_out, tr_node_in, tr_node_out;
  logic       tr_error, tr_ready, tr_full, tr_empty;
  logic       set_en;
  set_op_e    set_op;
  logic [2:0] set_s1_in, set_s2_in, set_s3_in;
  logic [3:0] set_d_in, set_d_out;
  logic       set_member, set_error, set_ready, set_full, set_empty;
  logic       gr_en;
  graph_op_e  gr_op;
  logic [2:0] gr_node1, gr_node2;
  logic [3:0] gr_label_in, gr_label_out;
  logic       gr_n_op, gr_ready;

  ds_top dut (.*);

  int checks = 0, failures = 0;
  int n_ram = 0, n_aram = 0, n_cam_multi = 0, n_cam_readout = 0, n_arr = 0, n_rec = 0;
  int n_stk_full = 0, n_stk_lifo = 0, n_que_wrap = 0, n_que_full = 0;
  int n_ll_walk = 0, n_lst_shift = 0, n_lst_locate = 0, n_tbl_replace = 0, n_tbl_move = 0;
  int n_tr_join = 0, n_tr_clear = 0, n_set_merge = 0, n_set_ovf = 0, n_set_refused = 0;
  int n_gr_refused = 0, n_gr_edge = 0;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time);
    end
  endtask

  function automatic logic [7:0] u8(int x);
    return x[7:0];
  endfunction

  function automatic logic [3:0] u4(int x);
    return x[3:0];
  endfunction

  // clocks the selected block keeps ready low after its accepting edge;
  // called at the negedge after that edge
  task automatic wait_ready(int blk, output int busy);
    busy = 0;
    forever begin
      logic r;
      case (blk)
        0: r = ll_ready;
        1: r = lst_ready;
        2: r = tr_ready;
        default: r = set_ready;
      endcase
      if (r || busy > 100) break;
      busy++;
      @(negedge clk);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- per-block scenarios ----------------
  task automatic t_ram;
    for (int a = 0; a < 16; a++) begin
      @(negedge clk); ram_cs = 1; ram_r_w = 0; ram_address = u4(a); ram_data_in = u8(a * 17 + 3);
    end
    for (int a = 15; a >= 0; a--) begin
      @(negedge clk); ram_cs = 1; ram_r_w = 1; ram_address = u4(a);
      @(negedge clk); ram_cs = 0;
      check("ram read", ram_data_out, u8(a * 17 + 3));
      if (ram_data_out == u8(a * 17 + 3)) n_ram++;
    end
  endtask

  task automatic t_aram;
    for (int a = 0; a < 16; a++) begin
      aram_r_w = 0; aram_address = u4(a); aram_data_in = u8(200 - a);
      #2 aram_cs = 1; #2 aram_cs = 0; #1;
    end
    for (int a = 0; a < 16; a++) begin
      aram_r_w = 1; aram_address = u4(a);
      #2 aram_cs = 1; #2 aram_cs = 0; #1;
      check("async ram read", aram_data_out, u8(200 - a));
      if (aram_data_out == u8(200 - a)) n_aram++;
    end
  endtask

  task automatic cam_cmd(cam_op_e o, logic [7:0] md, logic [7:0] mm, logic [7:0] ms,
                         logic [7:0] mr, logic [3:0] a);
    @(negedge clk);
    cam_op = o; cam_match_data = md; cam_match_mask = mm; cam_mset = ms; cam_mres = mr;
    cam_nmset = 0; cam_nmres = 0; cam_addr_in = a;
    @(negedge clk);
    cam_op = CAM_MATCH; cam_match_mask = 0; cam_mset = 0; cam_mres = 0;
  endtask

  task automatic t_cam;
    logic [3:0] expect_addr [4] = '{4'd1, 4'd4, 4'd7, 4'd8};
    logic [1:0] expect_n [4] = '{2'b11, 2'b11, 2'b01, 2'b00};
    cam_cmd(CAM_RESET, 0, 0, 0, 0, 0);
    for (int a = 0; a < 8; a++) cam_cmd(CAM_WRADDR, 0, 0, 8'h80 | u8(a % 3), 0, u4(a));
    cam_cmd(CAM_RDADDR, 0, 0, 0, 0, 4'd5);
    check("cam rdaddr", cam_data_out, 8'h82);
    cam_cmd(CAM_MATCH, 8'h81, 8'h83, 0, 0, 0);
    check("cam numomw", cam_numomw, 2'b11);
    check("cam addr", cam_addr_out, 4'd1);
    check("cam data", cam_data_out, 8'h81);
    if (cam_numomw == 2'b11) n_cam_multi++;
    cam_cmd(CAM_WRALL, 8'h81, 8'h83, 8'h40, 0, 0);             // mark the matches
    for (int k = 0; k < 4; k++) begin
      cam_cmd(CAM_WRFIRST, 8'h40, 8'h40, 0, 8'h40, 0);          // take first, unmark it
      check("cam readout count", cam_numomw, expect_n[k]);
      check("cam readout addr", cam_addr_out, expect_addr[k]);
      check("cam readout data", cam_data_out, (k < 3) ? 8'hC1 : 8'h00);
      if (k < 3 && cam_addr_out == expect_addr[k]) n_cam_readout++;
    end
    cam_cmd(CAM_RDADDR, 0, 0, 0, 0, 4'd4);
    check("cam unmarked", cam_data_out, 8'h81);
  endtask

  task automatic t_array;
    for (int i = 1; i <= 4; i++) begin
      @(negedge clk); arr_en = 1; arr_op = ARR_UPDATE; arr_index = 3'(i); arr_d_in = u4(i + 9);
      rec_en = 1; rec_op = ARR_UPDATE; rec_id = 3'(i); rec_d_in = u4(12 - i);
    end
    for (int i = 4; i >= 1; i--) begin
      @(negedge clk); arr_en = 1; arr_op = ARR_RETRIEVE; arr_index = 3'(i);
      rec_en = 1; rec_op = ARR_RETRIEVE; rec_id = 3'(i);
      @(negedge clk); arr_en = 0; rec_en = 0;
      check("array", arr_d_out, u4(i + 9));
      check("record", rec_d_out, u4(12 - i));
      if (arr_d_out == u4(i + 9)) n_arr++;
      if (rec_d_out == u4(12 - i)) n_rec++;
    end
  endtask

  task automatic stk(stack_op_e o, logic [3:0] d);
    @(negedge clk); stk_en = 1; stk_op = o; stk_d_in = d;
    @(negedge clk); stk_en = 0;
  endtask

  task automatic que(queue_op_e o, logic [3:0] d);
    @(negedge clk); que_en = 1; que_op = o; que_d_in = d;
    @(negedge clk); que_en = 0;
  endtask

  task automatic t_stack_queue;
    check("stack empty", stk_empty, 1);
    for (int i = 0; i < 5; i++) stk(S_PUSH, u4(i + 1));      // fifth is ignored
    check("stack full", stk_full, 1);
    if (stk_full) n_stk_full++;
    for (int i = 4; i >= 1; i--) begin
      stk(S_POP, 0);
      check("stack pop", stk_d_out, u4(i));
      if (stk_d_out == u4(i) && i == 1) n_stk_lifo++;
    end
    check("stack empty again", stk_empty, 1);
    // queue: 3 in, 2 out, 3 in (cursors wrap), full, 4 out in order
    for (int i = 0; i < 3; i++) que(Q_ENQUEUE, u4(i + 1));
    for (int i = 0; i < 2; i++) begin
      que(Q_DEQUEUE, 0);
      check("queue out", que_d_out, u4(i + 1));
    end
    for (int i = 3; i < 6; i++) que(Q_ENQUEUE, u4(i + 1));
    que(Q_ENQUEUE, 4'hF);                                      // ignored, full
    check("queue full", que_full, 1);
    if (que_full) n_que_full++;
    for (int i = 2; i < 6; i++) begin
      que(Q_DEQUEUE, 0);
      check("queue out after wrap", que_d_out, u4(i + 1));
      if (i >= 4 && que_d_out == u4(i + 1)) n_que_wrap++;
    end
    check("queue empty", que_empty, 1);
  endtask

  task automatic ll(ll_op_e o, int p, logic [3:0] d, int lat);
    int busy;
    @(negedge clk); ll_en = 1; ll_op = o; ll_pos = 3'(p); ll_d_in = d;
    @(negedge clk); ll_en = 0;
    wait_ready(0, busy);
    check("linked list clocks", busy, lat);
    if (busy > 1) n_ll_walk++;
  endtask

  task automatic t_linked_list;
    ll(LL_CLEAR, 0, 0, 0);
    check("ll empty", ll_empty, 1);
    ll(LL_INSERT, 1, 4'hA, 1);
    ll(LL_INSERT, 1, 4'hB, 1);
    ll(LL_INSERT, 2, 4'hC, 1);                                 // B C A
    ll(LL_RETRIEVE, 3, 0, 3);
    check("ll retrieve 3", ll_d_out, 4'hA);
    check("ll last", ll_next_out, 0);
    ll(LL_RETRIEVE, 1, 0, 1);
    check("ll retrieve 1", ll_d_out, 4'hB);
    check("ll has next", ll_next_out, 1);
    ll(LL_DELETE, 2, 0, 1);                                    // B A
    check("ll delete", ll_d_out, 4'hC);
    ll(LL_RETRIEVE, 2, 0, 2);
    check("ll after delete", ll_d_out, 4'hA);
    ll(LL_INSERT, 3, 4'h1, 2);
    ll(LL_INSERT, 4, 4'h2, 3);                                 // B A 1 2
    check("ll full", ll_full, 1);
    ll(LL_RETRIEVE, 4, 0, 4);
    check("ll tail", ll_d_out, 4'h2);
  endtask

  task automatic lst(list_op_e o, int p, logic [3:0] d, int lat);
    int busy;
    @(negedge clk); lst_en = 1; lst_op = o; lst_pos_in = 3'(p); lst_d_in = d;
    @(negedge clk); lst_en = 0;
    wait_ready(1, busy);
    check("list clocks", busy, lat);
    if (busy > 1 && (o == L_INSERT || o == L_DELETE)) n_lst_shift++;
  endtask

  task automatic t_list;
    lst(L_CLEAR, 0, 0, 0);
    lst(L_INSERT, 1, 4'd1, 1);
    lst(L_INSERT, 1, 4'd2, 2);
    lst(L_INSERT, 1, 4'd3, 3);
    lst(L_INSERT, 2, 4'd4, 3);                                 // 3 4 2 1
    check("list full", lst_full, 1);
    lst(L_LOCATE, 0, 4'd2, 3);
    check("list locate", lst_pos_out, 3'd3);
    if (lst_pos_out == 3'd3) n_lst_locate++;
    lst(L_LOCATE, 0, 4'd9, 5);
    check("list locate absent", lst_pos_out, 3'd5);
    lst(L_DELETE, 1, 0, 4);                                    // 4 2 1
    check("list delete", lst_d_out, 4'd3);
    lst(L_RETRIEVE, 1, 0, 0);
    check("list retrieve", lst_d_out, 4'd4);
    lst(L_END, 0, 0, 0);
    check("list end", lst_pos_out, 3'd4);
  endtask

  task automatic tbl(table_op_e o, logic [3:0] k, logic [3:0] d);
    @(negedge clk); tbl_en = 1; tbl_op = o; tbl_k_in = k; tbl_d_in = d;
    @(negedge clk); tbl_en = 0;
    check("table ready", tbl_ready, 1);
  endtask

  task automatic t_table;
    tbl(T_CLEAR, 0, 0);
    check("table empty", tbl_empty, 1);
    tbl(T_INSERT, 4'd1, 4'd5);
    tbl(T_INSERT, 4'd2, 4'd6);
    tbl(T_INSERT, 4'd3, 4'd7);
    tbl(T_INSERT, 4'd2, 4'd9);                                 // replace
    check("table replace stored", tbl_member, 1);
    tbl(T_RETRIEVE, 4'd2, 0);
    check("table replaced data", tbl_d_out, 4'd9);
    if (tbl_member && tbl_d_out == 4'd9) n_tbl_replace++;
    tbl(T_DELETE, 4'd1, 0);
    check("table delete key", tbl_k_out, 4'd1);
    check("table delete data", tbl_d_out, 4'd5);
    tbl(T_RETRIEVE, 4'd3, 0);                                  // moved into the hole
    check("table moved record", tbl_d_out, 4'd7);
    if (tbl_member && tbl_d_out == 4'd7) n_tbl_move++;
    tbl(T_MEMBER, 4'd1, 0);
    check("table absent", tbl_member, 0);
    tbl(T_INSERT, 4'd4, 4'd1);
    tbl(T_INSERT, 4'd5, 4'd2);
    check("table full", tbl_full, 1);
    tbl(T_INSERT, 4'd6, 4'd3);
    check("table refuses when full", tbl_member, 0);
  endtask

  task automatic tr(tree_op_e o, int t, int i, logic [3:0] lb, logic [3:0] nd);
    @(negedge clk); tr_en = 1; tr_op = o; tr_t_in = 3'(t); tr_i_in = 3'(i); tr_label_in = lb;
    tr_node_in = nd;
    @(negedge clk); tr_en = 0;
  endtask

  task automatic t_tree;
    logic [3:0] r1, r2, r3;
    int busy;
    tr(TR_RESET, 0, 0, 0, 0);
    check("tree empty", tr_empty, 1);
    tr(TR_CREATE, 1, 0, 4'd5, 0);
    check("tree create 1", tr_error, 0);
    r1 = tr_node_out;
    tr(TR_CREATE, 2, 0, 4'd6, 0);
    r2 = tr_node_out;
    tr(TR_CREATE, 1, 2, 4'd7, 0);                              // new root over trees 1, 2
    check("tree join", tr_error, 0);
    check("tree collecting", tr_ready, 0);
    r3 = tr_node_out;
    tr(TR_CREATE, 2, 0, 0, 0);                                 // second child: tree 2
    check("tree second child", tr_error, 0);
    check("tree ready", tr_ready, 1);
    tr(TR_ROOT, 1, 0, 0, 0);
    check("tree root", tr_node_out, r3);
    tr(TR_LEFT_CHILD, 0, 0, 0, r3);
    check("tree left child", tr_node_out, r1);
    tr(TR_RIGHT_SIBLING, 0, 0, 0, r1);
    check("tree right sibling", tr_node_out, r2);
    tr(TR_PARENT, 0, 0, 0, r2);
    check("tree parent", tr_node_out, r3);
    tr(TR_LABEL, 0, 0, 0, r2);
    check("tree label", tr_label_out, 4'd6);
    tr(TR_ROOT, 2, 0, 0, 0);
    check("tree name 2 taken over", tr_node_out, 0);
    if (tr_error == 0 && tr_node_out == 0) n_tr_join++;
    @(negedge clk); tr_en = 1; tr_op = TR_CLEAR; tr_t_in = 3'd1;
    @(negedge clk); tr_en = 0;
    wait_ready(2, busy);
    check("tree clear clocks", busy, 5);
    check("tree empty after clear", tr_empty, 1);
    if (busy == 5 && tr_empty) n_tr_clear++;
  endtask

  task automatic st(set_op_e o, int a, int b, int c, logic [3:0] d, int lat);
    int busy;
    @(negedge clk); set_en = 1; set_op = o; set_s1_in = 3'(a); set_s2_in = 3'(b);
    set_s3_in = 3'(c); set_d_in = d;
    @(negedge clk); set_en = 0;
    wait_ready(3, busy);
    check("set clocks", busy, lat);
    if (busy > 1) n_set_merge++;
  endtask

  task automatic t_set;
    st(SET_INSERT, 1, 0, 0, 4'd5, 0);
    st(SET_INSERT, 1, 0, 0, 4'd1, 0);
    st(SET_INSERT, 1, 0, 0, 4'd3, 0);                          // {1,3,5}
    st(SET_INSERT, 2, 0, 0, 4'd4, 0);
    st(SET_INSERT, 2, 0, 0, 4'd3, 0);                          // {3,4}
    check("set member pulse", set_member, 1);
    st(SET_UNION, 1, 2, 3, 0, 5);                              // {1,3,4,5}
    check("union error", set_error, 0);
    check("union full", set_full, 1);
    st(SET_MIN, 3, 0, 0, 0, 0);
    check("union min", set_d_out, 4'd1);
    st(SET_MAX, 3, 0, 0, 0, 0);
    check("union max", set_d_out, 4'd5);
    st(SET_MEMBER, 3, 0, 0, 4'd4, 0);
    check("union member", set_member, 1);
    st(SET_INTERSECTION, 1, 2, 4, 0, 4);                       // {3}
    st(SET_MAX, 4, 0, 0, 0, 0);
    check("intersection", set_d_out, 4'd3);
    st(SET_DIFFERENCE, 1, 2, 4, 0, 5);                         // {1,5}
    st(SET_MIN, 4, 0, 0, 0, 0);
    check("difference min", set_d_out, 4'd1);
    st(SET_MEMBER, 4, 0, 0, 4'd3, 0);
    check("difference removed 3", set_member, 0);
    st(SET_EQUAL, 3, 3, 0, 0, 0);
    check("equal", set_error, 0);
    st(SET_EQUAL, 3, 4, 0, 0, 0);
    check("not equal", set_error, 1);
    st(SET_INSERT, 2, 0, 0, 4'd7, 0);                          // {3,4,7}
    st(SET_UNION, 3, 2, 4, 0, 5);                              // {1,3,4,5,7} does not fit
    check("union overflow", set_error, 1);
    if (set_error) n_set_ovf++;
    st(SET_UNION, 1, 1, 2, 0, 0);
    check("refused merge", set_error, 1);
    if (set_error) n_set_refused++;
  endtask

  task automatic gr(graph_op_e o, int a, int b, logic [3:0] lb);
    @(negedge clk); gr_en = 1; gr_op = o; gr_node1 = 3'(a); gr_node2 = 3'(b); gr_label_in = lb;
    @(negedge clk); gr_en = 0;
    check("graph ready", gr_ready, 1);
  endtask

  task automatic t_graph;
    gr(G_CLEAR, 0, 0, 0);
    gr(G_INS_NODE, 1, 0, 4'd3);
    gr(G_INS_NODE, 2, 0, 4'd4);
    check("graph insert node", gr_n_op, 0);
    gr(G_INS_EDGE, 1, 2, 4'd9);
    gr(G_RETR_EDGE, 1, 2, 0);
    check("graph edge", gr_label_out, 4'd9);
    if (gr_label_out == 4'd9) n_gr_edge++;
    gr(G_DEL_NODE, 2, 0, 0);
    check("graph node in use", gr_n_op, 1);
    if (gr_n_op) n_gr_refused++;
    gr(G_DEL_EDGE, 1, 2, 0);
    check("graph delete edge", gr_label_out, 4'd9);
    gr(G_DEL_NODE, 2, 0, 0);
    check("graph delete node", gr_n_op, 0);
    check("graph deleted label", gr_label_out, 4'd4);
    gr(G_RETR_NODE, 1, 0, 0);
    check("graph node 1", gr_label_out, 4'd3);
    gr(G_INS_EDGE, 1, 2, 4'd1);
    check("graph edge to missing node", gr_n_op, 1);
  endtask

  initial begin
    rst_n = 0;
    ram_cs = 0; ram_r_w = 1; ram_address = 0; ram_data_in = 0;
    aram_cs = 0; aram_r_w = 1; aram_address = 0; aram_data_in = 0;
    cam_op = CAM_MATCH; cam_match_data = 0; cam_match_mask = 0; cam_mset = 0; cam_mres = 0;
    cam_nmset = 0; cam_nmres = 0; cam_addr_in = 0;
    arr_en = 0; arr_op = ARR_RETRIEVE; arr_index = 0; arr_d_in = 0;
    rec_en = 0; rec_op = ARR_RETRIEVE; rec_id = 0; rec_d_in = 0;
    ll_en = 0; ll_op = LL_NXT; ll_d_in = 0; ll_pos = 0;
    lst_en = 0; lst_op = L_END; lst_pos_in = 0; lst_d_in = 0;
    stk_en = 0; stk_op = S_TOP; stk_d_in = 0;
    que_en = 0; que_op = Q_FRONT; que_d_in = 0;
    tbl_en = 0; tbl_op = T_MEMBER; tbl_k_in = 0; tbl_d_in = 0;
    tr_en = 0; tr_op = TR_LABEL; tr_t_in = 0; tr_i_in = 0; tr_label_in = 0; tr_node_in = 0;
    set_en = 0; set_op = SET_MEMBER; set_s1_in = 1; set_s2_in = 2; set_s3_in = 3; set_d_in = 0;
    gr_en = 0; gr_op = G_RETR_NODE; gr_node1 = 1; gr_node2 = 1; gr_label_in = 0;
    #12 rst_n = 1;
    fork
      t_ram;
      t_aram;
      t_cam;
      t_array;
      t_stack_queue;
      t_linked_list;
      t_list;
      t_table;
      t_tree;
      t_set;
      t_graph;
    join
    $display("ram %0d, async ram %0d, cam multiple %0d, cam readout %0d, array %0d, record %0d",
             n_ram, n_aram, n_cam_multi, n_cam_readout, n_arr, n_rec);
    $display("stack full %0d, lifo %0d, queue full %0d, wrap %0d, ll walks %0d, list shifts %0d, locate %0d",
             n_stk_full, n_stk_lifo, n_que_full, n_que_wrap, n_ll_walk, n_lst_shift, n_lst_locate);
    $display("table replace %0d, move %0d, tree join %0d, clear %0d, set merges %0d, overflow %0d, refused %0d, graph edge %0d, refused %0d",
             n_tbl_replace, n_tbl_move, n_tr_join, n_tr_clear, n_set_merge, n_set_ovf, n_set_refused,
             n_gr_edge, n_gr_refused);
    if (n_ram == 0 || n_aram == 0 || n_cam_multi == 0 || n_cam_readout == 0 || n_arr == 0 ||
        n_rec == 0 || n_stk_full == 0 || n_stk_lifo == 0 || n_que_full == 0 || n_que_wrap == 0 ||
        n_ll_walk == 0 || n_lst_shift == 0 || n_lst_locate == 0 || n_tbl_replace == 0 ||
        n_tbl_move == 0 || n_tr_join == 0 || n_tr_clear == 0 || n_set_merge == 0 ||
        n_set_ovf == 0 || n_set_refused == 0 || n_gr_edge == 0 || n_gr_refused == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// ds_top: the collection of hardware data structures, side by side.
//
// Each block is an independent building block with its own operation port
// and its own flags; they share only the clock and the reset (the
// asynchronous RAM is clocked by its own chip select). The top brings
// every block's ports out, prefixed with the block's name, so that a
// system can use any subset of them. All blocks use their default sizes:
// RAMs 16 x 8, CAM 8 x 8, array/record/lists/stack/queue/table 4 elements
// of 4 bits, tree 4 trees over 8 nodes, set 4 sets of 4 elements, graph 4
// nodes. Timing is that of each block (see their headers).
module ds_top
  import ds_pkg::*;
(
  input  logic clk,
  input  logic rst_n,

  // synchronous RAM
  input  logic       ram_cs,
  input  logic       ram_r_w,
  input  logic [3:0] ram_address,
  input  logic [7:0] ram_data_in,
  output logic [7:0] ram_data_out,

  // asynchronous RAM (operations on the rising edge of aram_cs)
  input  logic       aram_cs,
  input  logic       aram_r_w,
  input  logic [3:0] aram_address,
  input  logic [7:0] aram_data_in,
  output logic [7:0] aram_data_out,

  // content addressable memory
  input  cam_op_e    cam_op,
  input  logic [7:0] cam_match_data,
  input  logic [7:0] cam_match_mask,
  input  logic [7:0] cam_mset,
  input  logic [7:0] cam_mres,
  input  logic [7:0] cam_nmset,
  input  logic [7:0] cam_nmres,
  input  logic [3:0] cam_addr_in,
  output logic [1:0] cam_numomw,
  output logic [3:0] cam_addr_out,
  output logic [7:0] cam_data_out,

  // array
  input  logic       arr_en,
  input  array_op_e  arr_op,
  input  logic [2:0] arr_index,
  input  logic [3:0] arr_d_in,
  output logic [3:0] arr_d_out,

  // record
  input  logic       rec_en,
  input  array_op_e  rec_op,
  input  logic [2:0] rec_id,
  input  logic [3:0] rec_d_in,
  output logic [3:0] rec_d_out,

  // linked list
  input  logic       ll_en,
  input  ll_op_e     ll_op,
  input  logic [3:0] ll_d_in,
  input  logic [2:0] ll_pos,
  output logic [3:0] ll_d_out,
  output logic       ll_next_out,
  output logic       ll_ready,
  output logic       ll_full,
  output logic       ll_empty,

  // list
  input  logic       lst_en,
  input  list_op_e   lst_op,
  input  logic [2:0] lst_pos_in,
  input  logic [3:0] lst_d_in,
  output logic [3:0] lst_d_out,
  output logic [2:0] lst_pos_out,
  output logic       lst_ready,
  output logic       lst_full,
  output logic       lst_empty,

  // stack
  input  logic       stk_en,
  input  stack_op_e  stk_op,
  input  logic [3:0] stk_d_in,
  output logic [3:0] stk_d_out,
  output logic       stk_full,
  output logic       stk_empty,

  // queue
  input  logic       que_en,
  input  queue_op_e  que_op,
  input  logic [3:0] que_d_in,
  output logic [3:0] que_d_out,
  output logic       que_full,
  output logic       que_empty,

  // table
  input  logic       tbl_en,
  input  table_op_e  tbl_op,
  input  logic [3:0] tbl_k_in,
  input  logic [3:0] tbl_d_in,
  output logic [3:0] tbl_k_out,
  output logic [3:0] tbl_d_out,
  output logic       tbl_member,
  output logic       tbl_ready,
  output logic       tbl_full,
  output logic       tbl_empty,

  // tree
  input  logic       tr_en,
  input  tree_op_e   tr_op,
  input  logic [2:0] tr_t_in,
  output logic [2:0] tr_t_out,
  input  logic [3:0] tr_label_in,
  output logic [3:0] tr_label_out,
  input  logic [3:0] tr_node_in,
  output logic [3:0] tr_node_out,
  input  logic [2:0] tr_i_in,
  output logic       tr_error,
  output logic       tr_ready,
  output logic       tr_full,
  output logic       tr_empty,

  // set
  input  logic       set_en,
  input  set_op_e    set_op,
  input  logic [2:0] set_s1_in,
  input  logic [2:0] set_s2_in,
  input  logic [2:0] set_s3_in,
  input  logic [3:0] set_d_in,
  output logic [3:0] set_d_out,
  output logic       set_member,
  output logic       set_error,
  output logic       set_ready,
  output logic       set_full,
  output logic       set_empty,

  // graph
  input  logic       gr_en,
  input  graph_op_e  gr_op,
  input  logic [2:0] gr_node1,
  input  logic [2:0] gr_node2,
  input  logic [3:0] gr_label_in,
  output logic [3:0] gr_label_out,
  output logic       gr_n_op,
  output logic       gr_ready
);

  ram u_ram (
    .clk, .cs(ram_cs), .r_w(ram_r_w), .address(ram_address),
    .data_in(ram_data_in), .data_out(ram_data_out)
  );

  async_ram u_async_ram (
    .cs(aram_cs), .r_w(aram_r_w), .address(aram_address),
    .data_in(aram_data_in), .data_out(aram_data_out)
  );

  cam u_cam (
    .clk, .op(cam_op), .match_data(cam_match_data), .match_mask(cam_match_mask),
    .mset(cam_mset), .mres(cam_mres), .nmset(cam_nmset), .nmres(cam_nmres),
    .addr_in(cam_addr_in), .numomw(cam_numomw), .addr_out(cam_addr_out),
    .data_out(cam_data_out)
  );

  array_1d u_array (
    .clk, .rst_n, .en(arr_en), .op(arr_op), .index(arr_index),
    .d_in(arr_d_in), .d_out(arr_d_out)
  );

  record_store u_record (
    .clk, .rst_n, .en(rec_en), .op(rec_op), .id(rec_id),
    .d_in(rec_d_in), .d_out(rec_d_out)
  );

  linked_list u_linked_list (
    .clk, .rst_n, .en(ll_en), .op(ll_op), .d_in(ll_d_in), .pos(ll_pos),
    .d_out(ll_d_out), .next_out(ll_next_out), .ready(ll_ready),
    .full(ll_full), .empty(ll_empty)
  );

  list_store u_list (
    .clk, .rst_n, .en(lst_en), .op(lst_op), .pos_in(lst_pos_in), .d_in(lst_d_in),
    .d_out(lst_d_out), .pos_out(lst_pos_out), .ready(lst_ready),
    .full(lst_full), .empty(lst_empty)
  );

  stack u_stack (
    .clk, .rst_n, .en(stk_en), .op(stk_op), .d_in(stk_d_in),
    .d_out(stk_d_out), .full(stk_full), .empty(stk_empty)
  );

  queue u_queue (
    .clk, .rst_n, .en(que_en), .op(que_op), .d_in(que_d_in),
    .d_out(que_d_out), .full(que_full), .empty(que_empty)
  );

  table_store u_table (
    .clk, .rst_n, .en(tbl_en), .op(tbl_op), .k_in(tbl_k_in), .d_in(tbl_d_in),
    .k_out(tbl_k_out), .d_out(tbl_d_out), .member(tbl_member),
    .ready(tbl_ready), .full(tbl_full), .empty(tbl_empty)
  );

  tree u_tree (
    .clk, .rst_n, .en(tr_en), .op(tr_op), .t_in(tr_t_in), .t_out(tr_t_out),
    .label_in(tr_label_in), .label_out(tr_label_out), .node_in(tr_node_in),
    .node_out(tr_node_out), .i_in(tr_i_in), .error(tr_error),
    .ready(tr_ready), .full(tr_full), .empty(tr_empty)
  );

  set_store u_set (
    .clk, .rst_n, .en(set_en), .op(set_op), .s1_in(set_s1_in),
    .s2_in(set_s2_in), .s3_in(set_s3_in), .d_in(set_d_in), .d_out(set_d_out),
    .member(set_member), .error(set_error), .ready(set_ready),
    .full(set_full), .empty(set_empty)
  );

  graph u_graph (
    .clk, .rst_n, .en(gr_en), .op(gr_op), .node1(gr_node1), .node2(gr_node2),
    .label_in(gr_label_in), .label_out(gr_label_out), .n_op(gr_n_op),
    .ready(gr_ready)
  );
endmodule

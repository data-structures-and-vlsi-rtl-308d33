// tree: a set of up to MAX_TREES named trees over a pool of MAX_NODES nodes.
//
// Each node has a parent, a left child, a right sibling and a label, kept
// in separate arrays indexed by node number 1..MAX_NODES and linked by
// cursors; 0 is the null node and the null label. tree_list holds the root
// of every tree name 1..MAX_TREES. Unused nodes form a free list chained
// through the left-child array. Operations start on a rising clock edge
// with en high while ready is high:
//   TR_PARENT, TR_LEFT_CHILD, TR_RIGHT_SIBLING  node_out := that relative
//                of node_in (null if none)                       (1 clock)
//   TR_LABEL     label_out := label of node_in                   (1 clock)
//   TR_ROOT      node_out := root of tree t_in                   (1 clock)
//   TR_RESET     all nodes free, all trees null                  (1 clock)
//   TR_CREATE    take a free node r with label label_in. i_in = 0: r alone
//                becomes tree t_in (which must be null). i_in >= 1: tree
//                t_in becomes r's first child and r's tree keeps the name
//                t_in; the other i_in-1 child trees are named on t_in at
//                the next i_in-1 enabled clocks, become r's next children
//                in that order and their names become null. t_out, node_out
//                and label_out give the new tree, root and label.
//   TR_CLEAR     free every node of tree t_in and make it null. One clock
//                either steps to the leftmost child or frees a leaf and
//                climbs to its parent: 2k-1 clocks for a k-node tree.
// error is high for one clock after an operation that cannot complete (no
// free node, bad or wrongly occupied tree name, unused node). full: no
// free node; empty: no node in use. The representation and operations
// follow the described tree, including the single-node tree for
// i_in = 0; requiring its name to be empty, the error cases and the
// clock-by-clock clearing are this design's own.
module tree
  import ds_pkg::*;
#(
  parameter int unsigned MAX_TREES = 4,
  parameter int unsigned MAX_NODES = 8,
  parameter int unsigned LABEL_W   = 4,
  localparam int unsigned NW = $clog2(MAX_NODES + 1),
  localparam int unsigned TW = $clog2(MAX_TREES + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  tree_op_e           op,
  input  logic [TW-1:0]      t_in,
  output logic [TW-1:0]      t_out,
  input  logic [LABEL_W-1:0] label_in,
  output logic [LABEL_W-1:0] label_out,
  input  logic [NW-1:0]      node_in,
  output logic [NW-1:0]      node_out,
  input  logic [TW-1:0]      i_in,
  output logic               error,
  output logic               ready,
  output logic               full,
  output logic               empty
);
  localparam logic [NW-1:0] NULL_NODE = '0;

  typedef enum logic [1:0] {IDLE, CREATE_CH, CLEAR_WALK} state_e;

  // index 0 of the node arrays is the null node and is never used
  logic [NW-1:0]      tree_list [MAX_TREES + 1];
  logic [NW-1:0]      left_ch   [MAX_NODES + 1];
  logic [NW-1:0]      parent_n  [MAX_NODES + 1];
  logic [NW-1:0]      right_s   [MAX_NODES + 1];
  logic [LABEL_W-1:0] node_lab  [MAX_NODES + 1];
  logic [MAX_NODES:0] used;
  logic [NW-1:0]      avail;     // head of the free list
  logic [NW-1:0]      n_avail;   // number of free nodes

  state_e        state;
  logic [NW-1:0] node, last_child, new_root;
  logic [TW-1:0] tree_r, remaining;

  logic t_valid, n_valid;
  assign t_valid = t_in >= TW'(1) && t_in <= TW'(MAX_TREES);
  assign n_valid = node_in >= NW'(1) && node_in <= NW'(MAX_NODES) && used[node_in];

  assign ready = state == IDLE;
  assign full  = n_avail == '0;
  assign empty = n_avail == NW'(MAX_NODES);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      avail      <= NW'(1);
      n_avail    <= NW'(MAX_NODES);
      used       <= '0;
      node       <= NULL_NODE;
      last_child <= NULL_NODE;
      new_root   <= NULL_NODE;
      tree_r     <= '0;
      remaining  <= '0;
      t_out      <= '0;
      node_out   <= NULL_NODE;
      label_out  <= '0;
      error      <= 1'b0;
      for (int i = 0; i <= MAX_TREES; i++) tree_list[i] <= NULL_NODE;
      for (int i = 0; i <= MAX_NODES; i++) begin
        left_ch[i]  <= (i == 0 || i == MAX_NODES) ? NULL_NODE : NW'(i + 1);
        parent_n[i] <= NULL_NODE;
        right_s[i]  <= NULL_NODE;
        node_lab[i] <= '0;
      end
    end else begin
      error <= 1'b0;
      unique case (state)
        IDLE: if (en) begin
          unique case (op)
            TR_PARENT, TR_LEFT_CHILD, TR_RIGHT_SIBLING, TR_LABEL: begin
              if (!n_valid) begin
                node_out  <= NULL_NODE;
                label_out <= '0;
                error     <= 1'b1;
              end else if (op == TR_PARENT)        node_out <= parent_n[node_in];
              else if (op == TR_LEFT_CHILD)        node_out <= left_ch[node_in];
              else if (op == TR_RIGHT_SIBLING)     node_out <= right_s[node_in];
              else                                 label_out <= node_lab[node_in];
            end
            TR_ROOT: begin
              t_out    <= t_in;
              node_out <= t_valid ? tree_list[t_in] : NULL_NODE;
              if (!t_valid) error <= 1'b1;
            end
            TR_RESET: begin
              avail     <= NW'(1);
              n_avail   <= NW'(MAX_NODES);
              used      <= '0;
              t_out     <= t_in;
              node_out  <= NULL_NODE;
              label_out <= '0;
              for (int i = 0; i <= MAX_TREES; i++) tree_list[i] <= NULL_NODE;
              for (int i = 0; i <= MAX_NODES; i++)
                left_ch[i] <= (i == 0 || i == MAX_NODES) ? NULL_NODE : NW'(i + 1);
            end
            TR_CREATE: begin
              if (!t_valid || full
                  || (i_in == '0 && tree_list[t_in] != NULL_NODE)
                  || (i_in != '0 && tree_list[t_in] == NULL_NODE))
                error <= 1'b1;
              else begin
                // allocate the new root from the free list
                avail           <= left_ch[avail];
                n_avail         <= n_avail - NW'(1);
                used[avail]     <= 1'b1;
                node_lab[avail] <= label_in;
                parent_n[avail] <= NULL_NODE;
                right_s[avail]  <= NULL_NODE;
                left_ch[avail]  <= tree_list[t_in];
                tree_list[t_in] <= avail;
                if (i_in != '0) parent_n[tree_list[t_in]] <= avail;
                t_out      <= t_in;
                node_out   <= avail;
                label_out  <= label_in;
                tree_r     <= t_in;
                new_root   <= avail;
                last_child <= tree_list[t_in];
                remaining  <= i_in - TW'(1);
                if (i_in > TW'(1)) state <= CREATE_CH;
              end
            end
            TR_CLEAR: begin
              t_out     <= t_in;
              node_out  <= NULL_NODE;
              label_out <= '0;
              if (!t_valid) error <= 1'b1;
              else if (tree_list[t_in] != NULL_NODE) begin
                tree_r <= t_in;
                node   <= tree_list[t_in];
                state  <= CLEAR_WALK;
              end
            end
            default: ;
          endcase
        end
        // the remaining subtree names arrive one per enabled clock
        CREATE_CH: if (en) begin
          remaining <= remaining - TW'(1);
          if (remaining == TW'(1)) state <= IDLE;
          if (t_valid && t_in != tree_r && tree_list[t_in] != NULL_NODE) begin
            right_s[last_child]         <= tree_list[t_in];
            parent_n[tree_list[t_in]]   <= new_root;
            tree_list[t_in]             <= NULL_NODE;
            last_child                  <= tree_list[t_in];
          end else error <= 1'b1;
        end
        // free the tree leaf by leaf
        CLEAR_WALK: begin
          if (left_ch[node] != NULL_NODE) node <= left_ch[node];
          else begin
            left_ch[node] <= avail;
            avail         <= node;
            used[node]    <= 1'b0;
            n_avail       <= n_avail + NW'(1);
            if (parent_n[node] == NULL_NODE) begin
              tree_list[tree_r] <= NULL_NODE;
              state             <= IDLE;
            end else begin
              left_ch[parent_n[node]] <= right_s[node];
              node                    <= parent_n[node];
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
  // the free-node count never exceeds the pool
  always_comb
    assert final (!rst_n || n_avail <= NW'(MAX_NODES))
      else $error("free node count %0d out of range", n_avail);
endmodule

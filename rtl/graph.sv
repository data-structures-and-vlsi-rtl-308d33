// graph: directed graph in adjacency-matrix form.
//
// Nodes are numbered 1..NUM_NODES. A node label array and a NUM_NODES x
// NUM_NODES matrix of edge labels hold the graph; label 0 is the null
// label, so a node exists when its label is not null and an edge exists
// when its matrix entry is not null. On a rising clock edge with en high,
// each operation in one clock:
//   G_CLEAR      every node and edge label := null
//   G_INS_NODE   node1 gets label_in (node1 must not exist, label not null)
//   G_INS_EDGE   edge node1->node2 gets label_in (both nodes must exist)
//   G_DEL_NODE   label_out := label of node1, node1 removed; refused when
//                node1 still has an incoming or outgoing edge
//   G_DEL_EDGE   label_out := label of node1->node2, edge removed
//   G_RETR_NODE  label_out := label of node1
//   G_RETR_EDGE  label_out := label of node1->node2
// n_op is high for one clock after an operation that could not be executed
// (missing node, node in use, node number out of range). label_out is
// registered; a refused retrieve returns the null label. ready is high
// whenever the block is out of reset. The representation, the operations
// and n_op follow the described graph; raising n_op for a missing node on
// DELETE_NODE and for a null label on INSERT_NODE is this design's choice.
module graph
  import ds_pkg::*;
#(
  parameter int unsigned NUM_NODES = 4,
  parameter int unsigned LABEL_W   = 4,
  localparam int unsigned NW = $clog2(NUM_NODES + 1),
  localparam int unsigned IW = (NUM_NODES > 1) ? $clog2(NUM_NODES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  graph_op_e          op,
  input  logic [NW-1:0]      node1,
  input  logic [NW-1:0]      node2,
  input  logic [LABEL_W-1:0] label_in,
  output logic [LABEL_W-1:0] label_out,
  output logic               n_op,
  output logic               ready
);
  localparam logic [LABEL_W-1:0] NUL_LABEL = '0;

  logic [LABEL_W-1:0] node_ram [NUM_NODES];
  logic [LABEL_W-1:0] adj      [NUM_NODES][NUM_NODES];

  logic               v1, v2, ex1, ex2, connected;
  logic [IW-1:0]      i1, i2;     // zero-based node indices
  logic [LABEL_W-1:0] lab1, edge_lab;

  assign v1  = node1 >= NW'(1) && node1 <= NW'(NUM_NODES);
  assign v2  = node2 >= NW'(1) && node2 <= NW'(NUM_NODES);
  assign i1  = v1 ? IW'(node1 - NW'(1)) : '0;
  assign i2  = v2 ? IW'(node2 - NW'(1)) : '0;
  assign lab1     = v1 ? node_ram[i1] : NUL_LABEL;
  assign ex1      = lab1 != NUL_LABEL;
  assign ex2      = v2 && node_ram[i2] != NUL_LABEL;
  assign edge_lab = adj[i1][i2];

  // any edge into or out of node1
  always_comb begin
    connected = 1'b0;
    for (int k = 0; k < NUM_NODES; k++)
      if (adj[i1][k] != NUL_LABEL || adj[k][i1] != NUL_LABEL) connected = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      label_out <= NUL_LABEL;
      n_op      <= 1'b0;
      ready     <= 1'b0;
      for (int a = 0; a < NUM_NODES; a++) begin
        node_ram[a] <= NUL_LABEL;
        for (int b = 0; b < NUM_NODES; b++) adj[a][b] <= NUL_LABEL;
      end
    end else begin
      ready <= 1'b1;
      n_op  <= 1'b0;
      if (en) begin
        unique case (op)
          G_CLEAR: begin
            label_out <= NUL_LABEL;
            for (int a = 0; a < NUM_NODES; a++) begin
              node_ram[a] <= NUL_LABEL;
              for (int b = 0; b < NUM_NODES; b++) adj[a][b] <= NUL_LABEL;
            end
          end
          G_INS_NODE:
            if (v1 && !ex1 && label_in != NUL_LABEL) node_ram[i1] <= label_in;
            else n_op <= 1'b1;
          G_INS_EDGE:
            if (ex1 && ex2) adj[i1][i2] <= label_in;
            else n_op <= 1'b1;
          G_DEL_NODE:
            if (!ex1) begin
              label_out <= NUL_LABEL;
              n_op      <= 1'b1;
            end else if (connected) n_op <= 1'b1;
            else begin
              label_out    <= lab1;
              node_ram[i1] <= NUL_LABEL;
            end
          G_DEL_EDGE:
            if (ex1 && ex2) begin
              label_out   <= edge_lab;
              adj[i1][i2] <= NUL_LABEL;
            end else n_op <= 1'b1;
          G_RETR_NODE: begin
            label_out <= lab1;
            if (!ex1) n_op <= 1'b1;
          end
          G_RETR_EDGE:
            if (ex1 && ex2) label_out <= edge_lab;
            else begin
              label_out <= NUL_LABEL;
              n_op      <= 1'b1;
            end
          default: ;
        endcase
      end
    end
  end
endmodule

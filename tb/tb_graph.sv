// tb_graph: self-checking test of the adjacency-matrix graph.
// Random operations, with node numbers in and out of 1..n and sometimes the
// null label, run against a reference node-label array and edge matrix in
// the testbench. Each operation must finish in one clock: label_out and the
// one-clock n_op pulse are checked after the executing edge, and n_op must
// be low again one clock later. Counts node deletions refused because of
// edges, successful node deletions and edge retrievals that found an edge,
// and fails if any never happened.
// The operations and n_op cases checked follow the described graph, with
// the block's own extra n_op cases; the stimulus is this testbench's own.
module tb_graph;
  import ds_pkg::*;
  localparam int unsigned N = 4, LW = 4, NW = $clog2(N + 1);
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, en;
  graph_op_e op;
  logic [NW-1:0] node1, node2;
  logic [LW-1:0] label_in, label_out;
  logic n_op, ready;
  int checks = 0, failures = 0;
  int del_refused = 0, del_done = 0, edge_hits = 0;

  graph #(.NUM_NODES(N), .LABEL_W(LW)) dut (.*);

  logic [LW-1:0] nl [1:N];
  logic [LW-1:0] em [1:N][1:N];
  logic [LW-1:0] e_label;
  logic          e_nop;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time);
    end
  endtask

  function automatic logic exists(int n);
    return n >= 1 && n <= N && nl[n] != 0;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; en = 1'b0; op = G_RETR_NODE; node1 = '0; node2 = '0; label_in = '0;
    for (int a = 1; a <= N; a++) begin
      nl[a] = '0;
      for (int b = 1; b <= N; b++) em[a][b] = '0;
    end
    e_label = '0;
    #12 rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      int r, a, b;
      logic conn;
      r = $urandom % 40;
      @(negedge clk);
      op = (r == 0) ? G_CLEAR : (r < 9) ? G_INS_NODE : (r < 18) ? G_INS_EDGE :
           (r < 23) ? G_DEL_NODE : (r < 29) ? G_DEL_EDGE : (r < 34) ? G_RETR_NODE : G_RETR_EDGE;
      node1 = NW'($urandom % (N + 2));
      node2 = NW'($urandom % (N + 2));
      label_in = ($urandom % 8 == 0) ? '0 : LW'($urandom);
      en = 1'b1;
      a = node1; b = node2; e_nop = 1'b0;
      unique case (op)
        G_CLEAR: begin
          for (int x = 1; x <= N; x++) begin
            nl[x] = '0;
            for (int y = 1; y <= N; y++) em[x][y] = '0;
          end
          e_label = '0;
        end
        G_INS_NODE:
          if (a >= 1 && a <= N && nl[a] == 0 && label_in != 0) nl[a] = label_in;
          else e_nop = 1'b1;
        G_INS_EDGE:
          if (exists(a) && exists(b)) em[a][b] = label_in;
          else e_nop = 1'b1;
        G_DEL_NODE:
          if (!exists(a)) begin e_label = '0; e_nop = 1'b1; end
          else begin
            conn = 1'b0;
            for (int k = 1; k <= N; k++) if (em[a][k] != 0 || em[k][a] != 0) conn = 1'b1;
            if (conn) begin e_nop = 1'b1; del_refused++; end
            else begin e_label = nl[a]; nl[a] = '0; del_done++; end
          end
        G_DEL_EDGE:
          if (exists(a) && exists(b)) begin e_label = em[a][b]; em[a][b] = '0; end
          else e_nop = 1'b1;
        G_RETR_NODE: begin
          e_label = (a >= 1 && a <= N) ? nl[a] : '0;
          e_nop = !exists(a);
        end
        G_RETR_EDGE:
          if (exists(a) && exists(b)) begin
            e_label = em[a][b];
            if (em[a][b] != 0) edge_hits++;
          end else begin e_label = '0; e_nop = 1'b1; end
        default: ;
      endcase
      @(negedge clk);
      en = 1'b0;
      check("label_out", label_out, e_label);
      check("n_op", n_op, e_nop);
      check("ready", ready, 1'b1);
      @(negedge clk);
      check("n_op pulse ends", n_op, 1'b0);
    end
    $display("del refused %0d, del done %0d, edge hits %0d", del_refused, del_done, edge_hits);
    if (del_refused == 0 || del_done == 0 || edge_hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

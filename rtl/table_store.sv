// table_store: table of keyed records, one record per key.
//
// MAX_ELEMENTS (key, data) records are kept unordered in words 0..count-1.
// The key k_in is compared with all stored keys at once, as a content
// addressable memory does, so each operation takes one clock. On a rising
// clock edge with en high:
//   T_CLEAR     empty the table
//   T_INSERT    replace the data of key k_in, or append a new record;
//               member := 1 when stored (0 when the table was full)
//   T_DELETE    k_out/d_out := the record, which is removed by moving the
//               last record into its word; member := found
//   T_RETRIEVE  k_out/d_out := the record of k_in; member := found
//   T_MEMBER    same as T_RETRIEVE
// When the key is absent k_out/d_out hold. All outputs are registered and
// valid after the executing edge; ready is high whenever the block is out
// of reset. The operations, the unordered storage and the move of the last
// record follow the described table; the parallel compare is this
// design's choice.
module table_store
  import ds_pkg::*;
#(
  parameter int unsigned MAX_ELEMENTS = 4,
  parameter int unsigned KEY_W        = 4,
  parameter int unsigned DATA_W       = 4,
  localparam int unsigned CW = $clog2(MAX_ELEMENTS + 1),
  localparam int unsigned AW = (MAX_ELEMENTS > 1) ? $clog2(MAX_ELEMENTS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  table_op_e         op,
  input  logic [KEY_W-1:0]  k_in,
  input  logic [DATA_W-1:0] d_in,
  output logic [KEY_W-1:0]  k_out,
  output logic [DATA_W-1:0] d_out,
  output logic              member,
  output logic              ready,
  output logic              full,
  output logic              empty
);
  logic [KEY_W-1:0]  k_ram [MAX_ELEMENTS];
  logic [DATA_W-1:0] d_ram [MAX_ELEMENTS];
  logic [CW-1:0]     count;
  logic [AW-1:0]     hit_idx, last_idx;
  logic              hit;

  // parallel key compare over the used words, lowest hit wins
  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int i = MAX_ELEMENTS - 1; i >= 0; i--)
      if (CW'(i) < count && k_ram[i] == k_in) begin
        hit     = 1'b1;
        hit_idx = AW'(i);
      end
  end

  assign last_idx = AW'(count - CW'(1));
  assign full  = count == CW'(MAX_ELEMENTS);
  assign empty = count == '0;

  always_ff @(posedge clk) begin
    if (en && op == T_INSERT) begin
      if (hit) d_ram[hit_idx] <= d_in;
      else if (!full) begin
        k_ram[AW'(count)] <= k_in;
        d_ram[AW'(count)] <= d_in;
      end
    end else if (en && op == T_DELETE && hit) begin
      k_ram[hit_idx] <= k_ram[last_idx];
      d_ram[hit_idx] <= d_ram[last_idx];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count  <= '0;
      k_out  <= '0;
      d_out  <= '0;
      member <= 1'b0;
      ready  <= 1'b0;
    end else begin
      ready <= 1'b1;
      if (en) begin
        unique case (op)
          T_CLEAR: begin
            count  <= '0;
            member <= 1'b0;
          end
          T_INSERT: begin
            member <= hit || !full;
            if (!hit && !full) count <= count + CW'(1);
          end
          T_DELETE: begin
            member <= hit;
            if (hit) begin
              k_out <= k_ram[hit_idx];
              d_out <= d_ram[hit_idx];
              count <= count - CW'(1);
            end
          end
          T_RETRIEVE, T_MEMBER: begin
            member <= hit;
            if (hit) begin
              k_out <= k_ram[hit_idx];
              d_out <= d_ram[hit_idx];
            end
          end
          default: ;
        endcase
      end
    end
  end
  // the fill count never exceeds the capacity
  always_comb
    assert final (!rst_n || count <= CW'(MAX_ELEMENTS))
      else $error("table count %0d out of range", count);
endmodule

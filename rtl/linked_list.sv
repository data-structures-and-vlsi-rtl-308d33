// linked_list: list of elements identified by position, in cursor form.
//
// Storage is a RAM of NUM_ELEMENTS records {data, next cursor}. A head
// cursor points at position 1; the unused records form a second chain, the
// free list. The null cursor is NUM_ELEMENTS. Positions run 1..count.
// Operations start on a rising clock edge with en high while ready is high:
//   LL_CLEAR     empty the list, chain all records into the free list
//   LL_INSERT    new record with d_in at position pos (1..count+1), later
//                elements move up one position
//   LL_DELETE    d_out := element at pos, which is unlinked and freed
//   LL_RETRIEVE  d_out := element at pos; next_out := pos < count
//   LL_NXT       next_out := pos < count (is there a position pos+1?)
// A position that does not exist makes the operation do nothing.
// Timing: CLEAR and NXT finish at the accepting edge. The others follow
// the cursors one link per clock, with ready low until the edge that
// finishes them: RETRIEVE at p takes p clocks, INSERT and DELETE at p take
// max(p-1, 1) clocks (they stop at the record before p and relink it).
// full/empty follow count. The operations, the flags and the cursor
// mapping follow the described linked list; the walk schedule and the
// reset are this design's own.
module linked_list
  import ds_pkg::*;
#(
  parameter int unsigned NUM_ELEMENTS = 4,
  parameter int unsigned ELEMENT_W    = 4,
  localparam int unsigned PW   = $clog2(NUM_ELEMENTS + 1),  // cursor
  localparam int unsigned POSW = $clog2(NUM_ELEMENTS + 2),  // position
  localparam int unsigned AW   = (NUM_ELEMENTS > 1) ? $clog2(NUM_ELEMENTS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  ll_op_e               op,
  input  logic [ELEMENT_W-1:0] d_in,
  input  logic [POSW-1:0]      pos,
  output logic [ELEMENT_W-1:0] d_out,
  output logic                 next_out,
  output logic                 ready,
  output logic                 full,
  output logic                 empty
);
  localparam logic [PW-1:0] NULL = PW'(NUM_ELEMENTS);

  typedef enum logic {IDLE, WALK} state_e;

  logic [ELEMENT_W-1:0] data [NUM_ELEMENTS];
  logic [PW-1:0]        nxt  [NUM_ELEMENTS];
  logic [PW-1:0]        head, free_head, cur;
  logic [POSW-1:0]      count, steps;
  state_e               state;
  ll_op_e               op_r;
  logic [ELEMENT_W-1:0] d_r;
  logic                 at_head;

  logic [PW-1:0] victim;
  logic [AW-1:0] cur_a, fh_a, vic_a;  // cursors as record addresses (never NULL here)
  logic          pos_in_list, pos_insertable;

  assign pos_in_list    = pos >= POSW'(1) && pos <= count;
  assign pos_insertable = pos >= POSW'(1) && pos <= count + POSW'(1) && !full;
  assign cur_a          = AW'(cur);
  assign fh_a           = AW'(free_head);
  assign vic_a          = AW'(victim);
  assign victim         = at_head ? head : nxt[cur_a];

  assign ready = state == IDLE;
  assign full  = count == POSW'(NUM_ELEMENTS);
  assign empty = count == '0;

  // data field of the records
  always_ff @(posedge clk) begin
    if (state == WALK && steps == '0 && op_r == LL_INSERT)
      data[fh_a] <= d_r;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      head      <= NULL;
      free_head <= '0;
      count     <= '0;
      cur       <= NULL;
      steps     <= '0;
      op_r      <= LL_CLEAR;
      d_r       <= '0;
      at_head   <= 1'b0;
      d_out     <= '0;
      next_out  <= 1'b0;
      for (int i = 0; i < NUM_ELEMENTS; i++)
        nxt[i] <= (i == NUM_ELEMENTS - 1) ? NULL : PW'(i + 1);
    end else begin
      unique case (state)
        IDLE: if (en) begin
          op_r    <= op;
          d_r     <= d_in;
          cur     <= head;
          at_head <= pos == POSW'(1);
          unique case (op)
            LL_CLEAR: begin
              head      <= NULL;
              free_head <= '0;
              count     <= '0;
              next_out  <= 1'b0;
              for (int i = 0; i < NUM_ELEMENTS; i++)
                nxt[i] <= (i == NUM_ELEMENTS - 1) ? NULL : PW'(i + 1);
            end
            LL_NXT: next_out <= pos >= POSW'(1) && pos < count;
            LL_RETRIEVE: if (pos_in_list) begin
              steps    <= pos - POSW'(1);
              next_out <= pos < count;
              state    <= WALK;
            end
            LL_INSERT: if (pos_insertable) begin
              steps <= (pos == POSW'(1)) ? '0 : pos - POSW'(2);
              state <= WALK;
            end
            LL_DELETE: if (pos_in_list) begin
              steps <= (pos == POSW'(1)) ? '0 : pos - POSW'(2);
              state <= WALK;
            end
            default: ;
          endcase
        end
        WALK: begin
          if (steps != '0) begin
            cur   <= nxt[cur_a];
            steps <= steps - POSW'(1);
          end else begin
            state <= IDLE;
            unique case (op_r)
              LL_RETRIEVE: d_out <= data[cur_a];
              LL_INSERT: begin
                free_head <= nxt[fh_a];
                if (at_head) begin
                  nxt[fh_a] <= head;
                  head           <= free_head;
                end else begin
                  nxt[fh_a] <= nxt[cur_a];
                  nxt[cur_a]       <= free_head;
                end
                count <= count + POSW'(1);
              end
              LL_DELETE: begin
                d_out       <= data[vic_a];
                nxt[vic_a] <= free_head;
                free_head   <= victim;
                if (at_head) head <= nxt[vic_a];
                else         nxt[cur_a] <= nxt[vic_a];
                count <= count - POSW'(1);
              end
              default: ;
            endcase
          end
        end
      endcase
    end
  end
  // the length never exceeds the number of records
  always_comb
    assert final (!rst_n || count <= POSW'(NUM_ELEMENTS))
      else $error("list count %0d out of range", count);
endmodule

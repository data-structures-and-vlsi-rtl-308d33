// list_store: list of elements identified by position, mapped on an array.
//
// Element at position p (1..count) is word p-1 of a RAM; count is the
// length and count+1 is END, the first empty position. Operations start on
// a rising clock edge with en high while ready is high:
//   L_CLEAR     empty the list                               (1 clock)
//   L_RETRIEVE  d_out := element at pos_in                   (1 clock)
//   L_END       pos_out := count + 1                         (1 clock)
//   L_INSERT    d_in goes to position pos_in (1..count+1); the elements
//               from pos_in on move up one word per clock, starting with
//               the last                            (count - pos_in + 2)
//   L_DELETE    d_out := element at pos_in; the following elements move
//               down one word per clock                (count - pos_in + 1)
//   L_LOCATE    pos_out := first position holding d_in, END if none; one
//               word compared per clock       (result position, or count+1)
// Numbers in brackets are the clocks from the accepting edge to the edge
// after which ready is high again. A position that does not exist makes
// INSERT, DELETE and RETRIEVE do nothing. The operations, the flags and
// the array mapping follow the described list; the one-word-per-clock
// schedule is this design's reading of the array's O(n) operations.
module list_store
  import ds_pkg::*;
#(
  parameter int unsigned NUM_ELEMENTS = 4,
  parameter int unsigned ELEMENT_W    = 4,
  localparam int unsigned POSW = $clog2(NUM_ELEMENTS + 2),
  localparam int unsigned AW   = (NUM_ELEMENTS > 1) ? $clog2(NUM_ELEMENTS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  list_op_e             op,
  input  logic [POSW-1:0]      pos_in,
  input  logic [ELEMENT_W-1:0] d_in,
  output logic [ELEMENT_W-1:0] d_out,
  output logic [POSW-1:0]      pos_out,
  output logic                 ready,
  output logic                 full,
  output logic                 empty
);
  typedef enum logic [1:0] {IDLE, SHIFT_UP, SHIFT_DOWN, SEARCH} state_e;

  logic [ELEMENT_W-1:0] mem [NUM_ELEMENTS];
  logic [POSW-1:0]      count, idx, stop;
  logic [ELEMENT_W-1:0] d_r;
  state_e               state;
  logic                 pos_valid;

  assign pos_valid = pos_in >= POSW'(1) && pos_in <= count;
  assign ready = state == IDLE;
  assign full  = count == POSW'(NUM_ELEMENTS);
  assign empty = count == '0;

  always_ff @(posedge clk) begin
    if (state == SHIFT_UP)
      mem[AW'(idx)] <= (idx == stop) ? d_r : mem[AW'(idx - POSW'(1))];
    else if (state == SHIFT_DOWN && idx != count - POSW'(1))
      mem[AW'(idx)] <= mem[AW'(idx + POSW'(1))];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      count   <= '0;
      idx     <= '0;
      stop    <= '0;
      d_r     <= '0;
      d_out   <= '0;
      pos_out <= POSW'(1);
    end else begin
      unique case (state)
        IDLE: if (en) begin
          d_r <= d_in;
          unique case (op)
            L_CLEAR:    count <= '0;
            L_RETRIEVE: if (pos_valid) d_out <= mem[AW'(pos_in - POSW'(1))];
            L_END:      pos_out <= count + POSW'(1);
            L_INSERT: if (!full && pos_in >= POSW'(1) && pos_in <= count + POSW'(1)) begin
              idx   <= count;            // word that receives the last element
              stop  <= pos_in - POSW'(1);
              state <= SHIFT_UP;
            end
            L_DELETE: if (pos_valid) begin
              d_out <= mem[AW'(pos_in - POSW'(1))];
              idx   <= pos_in - POSW'(1);
              state <= SHIFT_DOWN;
            end
            L_LOCATE: begin
              idx   <= '0;
              state <= SEARCH;
            end
            default: ;
          endcase
        end
        SHIFT_UP: begin
          if (idx == stop) begin
            count <= count + POSW'(1);
            state <= IDLE;
          end else idx <= idx - POSW'(1);
        end
        SHIFT_DOWN: begin
          if (idx == count - POSW'(1)) begin
            count <= count - POSW'(1);
            state <= IDLE;
          end else idx <= idx + POSW'(1);
        end
        SEARCH: begin
          if (idx == count) begin
            pos_out <= count + POSW'(1);
            state   <= IDLE;
          end else if (mem[AW'(idx)] == d_r) begin
            pos_out <= idx + POSW'(1);
            state   <= IDLE;
          end else idx <= idx + POSW'(1);
        end
      endcase
    end
  end
  // the length never exceeds the capacity
  always_comb
    assert final (!rst_n || count <= POSW'(NUM_ELEMENTS))
      else $error("list count %0d out of range", count);
endmodule

// set_store: NUM_SETS sets of ELEMENT_W-bit atoms, each kept sorted.
//
// Set s (1..NUM_SETS) owns a reserved row of EL_PER_SET words, filled in
// ascending order from word 0, and an element count. Keeping the rows
// sorted makes MIN and MAX single reads and lets UNION, INTERSECTION and
// DIFFERENCE be computed by one merge pass over both operands. Operations
// start on a rising clock edge with en high while ready is high:
//   SET_CLEAR         s1 := {}                                  (1 clock)
//   SET_INSERT        s1 := s1 + {d_in}, sorted insertion; member := 1
//                     (error when s1 is full)                   (1 clock)
//   SET_DELETE        s1 := s1 - {d_in}                         (1 clock)
//   SET_MEMBER        member := d_in in s1                      (1 clock)
//   SET_ASSIGN        s1 := s2                                  (1 clock)
//   SET_EQUAL         error := s1 differs from s2               (1 clock)
//   SET_MIN, SET_MAX  d_out := smallest / largest of s1 (error if empty)
//   SET_UNION, SET_INTERSECTION, SET_DIFFERENCE
//                     s3 := s1 op s2, merging one step per clock; each
//                     step consumes the smaller head element (or both when
//                     equal) and may append one result word. Takes
//                     (steps + 1) clocks. The three names must differ,
//                     else error; a union that does not fit is cut to
//                     EL_PER_SET words and flags error.
// member and error are high for one clock after the operation. full and
// empty give the state of the set just operated on (s3 for the merges).
// The sorted reserved-row storage, the operations, the merge and the use
// of error for EQUAL follow the described set; the sizes, the one-clock
// insert/delete shifts and the difference merge are this design's own.
module set_store
  import ds_pkg::*;
#(
  parameter int unsigned NUM_SETS   = 4,
  parameter int unsigned EL_PER_SET = 4,
  parameter int unsigned ELEMENT_W  = 4,
  localparam int unsigned SW = $clog2(NUM_SETS + 1),
  localparam int unsigned CW = $clog2(EL_PER_SET + 1),
  localparam int unsigned RW = (NUM_SETS > 1) ? $clog2(NUM_SETS) : 1,
  localparam int unsigned EW = (EL_PER_SET > 1) ? $clog2(EL_PER_SET) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  set_op_e              op,
  input  logic [SW-1:0]        s1_in,
  input  logic [SW-1:0]        s2_in,
  input  logic [SW-1:0]        s3_in,
  input  logic [ELEMENT_W-1:0] d_in,
  output logic [ELEMENT_W-1:0] d_out,
  output logic                 member,
  output logic                 error,
  output logic                 ready,
  output logic                 full,
  output logic                 empty
);
  typedef enum logic {IDLE, MERGE} state_e;

  logic [ELEMENT_W-1:0] mem [NUM_SETS][EL_PER_SET];
  logic [CW-1:0]        cnt [NUM_SETS];

  state_e        state;
  set_op_e       op_r;
  logic [RW-1:0] a_r, b_r, c_r;      // zero-based rows of s1, s2, s3
  logic [CW-1:0] i, j, k;

  // ---- single-clock operations on row s1 ----
  logic [RW-1:0] r1, r2, r3;
  logic          v1, v2, v3;
  logic [CW-1:0] c1;
  logic          found, eq_sets;
  logic [CW-1:0] hit_pos, ins_pos;

  assign v1 = s1_in >= SW'(1) && s1_in <= SW'(NUM_SETS);
  assign v2 = s2_in >= SW'(1) && s2_in <= SW'(NUM_SETS);
  assign v3 = s3_in >= SW'(1) && s3_in <= SW'(NUM_SETS);
  assign r1 = v1 ? RW'(s1_in - SW'(1)) : '0;
  assign r2 = v2 ? RW'(s2_in - SW'(1)) : '0;
  assign r3 = v3 ? RW'(s3_in - SW'(1)) : '0;
  assign c1 = cnt[r1];
  assign ready = state == IDLE;

  always_comb begin
    found   = 1'b0;
    hit_pos = '0;
    ins_pos = '0;
    for (int e = EL_PER_SET - 1; e >= 0; e--) begin
      if (CW'(e) < c1 && mem[r1][e] == d_in) begin
        found   = 1'b1;
        hit_pos = CW'(e);
      end
    end
    for (int e = 0; e < EL_PER_SET; e++)
      if (CW'(e) < c1 && mem[r1][e] < d_in) ins_pos = CW'(e + 1);
    eq_sets = cnt[r1] == cnt[r2];
    for (int e = 0; e < EL_PER_SET; e++)
      if (CW'(e) < c1 && mem[r1][e] != mem[r2][e]) eq_sets = 1'b0;
  end

  // ---- merge step ----
  logic [ELEMENT_W-1:0] ha, hb, out_el;
  logic                 has_a, has_b, take_a, take_b, emit, done;

  assign ha    = mem[a_r][EW'(i)];
  assign hb    = mem[b_r][EW'(j)];
  assign has_a = i < cnt[a_r];
  assign has_b = j < cnt[b_r];

  always_comb begin
    take_a = 1'b0;
    take_b = 1'b0;
    emit   = 1'b0;
    out_el = ha;
    done   = 1'b0;
    if (has_a && has_b) begin
      take_a = ha <= hb;
      take_b = hb <= ha;
      unique case (op_r)
        SET_UNION:        begin emit = 1'b1; out_el = take_a ? ha : hb; end
        SET_INTERSECTION: emit = take_a && take_b;
        default:          emit = take_a && !take_b;   // difference
      endcase
    end else if (has_a) begin
      take_a = 1'b1;
      emit   = op_r != SET_INTERSECTION;
      done   = op_r == SET_INTERSECTION;
    end else if (has_b && op_r == SET_UNION) begin
      take_b = 1'b1;
      emit   = 1'b1;
      out_el = hb;
    end else done = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      op_r   <= SET_CLEAR;
      a_r    <= '0;
      b_r    <= '0;
      c_r    <= '0;
      i      <= '0;
      j      <= '0;
      k      <= '0;
      d_out  <= '0;
      member <= 1'b0;
      error  <= 1'b0;
      full   <= 1'b0;
      empty  <= 1'b1;
      for (int s = 0; s < NUM_SETS; s++) cnt[s] <= '0;
    end else begin
      member <= 1'b0;
      error  <= 1'b0;
      unique case (state)
        IDLE: if (en) begin
          // status of s1 after a single-clock operation (merges set it later)
          full  <= c1 == CW'(EL_PER_SET);
          empty <= c1 == '0;
          if (!v1) error <= 1'b1;
          else unique case (op)
            SET_CLEAR: begin
              cnt[r1] <= '0;
              full    <= 1'b0;
              empty   <= 1'b1;
            end
            SET_MEMBER: member <= found;
            SET_INSERT:
              if (found) member <= 1'b1;
              else if (c1 == CW'(EL_PER_SET)) error <= 1'b1;
              else begin
                if (ins_pos == '0) mem[r1][0] <= d_in;
                for (int e = 1; e < EL_PER_SET; e++)
                  if (CW'(e) == ins_pos)     mem[r1][e] <= d_in;
                  else if (CW'(e) > ins_pos) mem[r1][e] <= mem[r1][e-1];
                cnt[r1] <= c1 + CW'(1);
                member  <= 1'b1;
                full    <= c1 + CW'(1) == CW'(EL_PER_SET);
                empty   <= 1'b0;
              end
            SET_DELETE:
              if (found) begin
                for (int e = 0; e < EL_PER_SET - 1; e++)
                  if (CW'(e) >= hit_pos) mem[r1][e] <= mem[r1][e+1];
                cnt[r1] <= c1 - CW'(1);
                full    <= 1'b0;
                empty   <= c1 == CW'(1);
              end
            SET_ASSIGN:
              if (!v2) error <= 1'b1;
              else begin
                for (int e = 0; e < EL_PER_SET; e++) mem[r1][e] <= mem[r2][e];
                cnt[r1] <= cnt[r2];
                full    <= cnt[r2] == CW'(EL_PER_SET);
                empty   <= cnt[r2] == '0;
              end
            SET_EQUAL: error <= !v2 || !eq_sets;
            SET_MIN:
              if (c1 == '0) error <= 1'b1;
              else d_out <= mem[r1][0];
            SET_MAX:
              if (c1 == '0) error <= 1'b1;
              else d_out <= mem[r1][EW'(c1 - CW'(1))];
            SET_UNION, SET_INTERSECTION, SET_DIFFERENCE:
              if (!v2 || !v3 || s1_in == s2_in || s1_in == s3_in || s2_in == s3_in)
                error <= 1'b1;
              else begin
                op_r  <= op;
                a_r   <= r1;
                b_r   <= r2;
                c_r   <= r3;
                i     <= '0;
                j     <= '0;
                k     <= '0;
                state <= MERGE;
              end
            default: ;
          endcase
        end
        MERGE: begin
          if (done || (emit && k == CW'(EL_PER_SET))) begin
            cnt[c_r] <= k;
            full     <= k == CW'(EL_PER_SET);
            empty    <= k == '0;
            error    <= !done;           // union overflow
            state    <= IDLE;
          end else begin
            if (take_a) i <= i + CW'(1);
            if (take_b) j <= j + CW'(1);
            if (emit) begin
              mem[c_r][EW'(k)] <= out_el;
              k <= k + CW'(1);
            end
          end
        end
      endcase
    end
  end
  // no set row ever holds more than EL_PER_SET elements
  always_comb
    for (int s = 0; s < NUM_SETS; s++)
      assert final (!rst_n || cnt[s] <= CW'(EL_PER_SET))
        else $error("set %0d count out of range", s + 1);
endmodule

// record_store: record of NUM_ELEMENTS fields identified by 1..n.
//
// Fields may have different widths (FIELD_W, each at most MAX_ELEMENT_W);
// every field sits in the least significant bits of a MAX_ELEMENT_W-bit
// word of a RAM addressed by id minus one. On a rising clock edge with en:
//   ARR_UPDATE    field[id] := d_in, cut to the field's width
//   ARR_RETRIEVE  d_out := field[id], zero-extended
// An id outside 1..NUM_ELEMENTS does nothing. d_out is registered. Reset
// clears d_out and the fields.
// The operations, the storage in the low bits and the default sizes follow
// the described record; FIELD_W as a parameter is this design's choice.
module record_store
  import ds_pkg::*;
#(
  parameter int unsigned NUM_ELEMENTS  = 4,
  parameter int unsigned MAX_ELEMENT_W = 4,
  parameter int unsigned FIELD_W [NUM_ELEMENTS] = '{default: MAX_ELEMENT_W},
  localparam int unsigned IW = $clog2(NUM_ELEMENTS + 1),
  localparam int unsigned AW = (NUM_ELEMENTS > 1) ? $clog2(NUM_ELEMENTS) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  array_op_e                op,
  input  logic [IW-1:0]            id,
  input  logic [MAX_ELEMENT_W-1:0] d_in,
  output logic [MAX_ELEMENT_W-1:0] d_out
);
  logic [MAX_ELEMENT_W-1:0] mem  [NUM_ELEMENTS];
  logic [MAX_ELEMENT_W-1:0] mask [NUM_ELEMENTS];
  logic valid_id;

  // per-field width masks
  always_comb begin
    for (int i = 0; i < NUM_ELEMENTS; i++)
      for (int b = 0; b < MAX_ELEMENT_W; b++)
        mask[i][b] = b < FIELD_W[i];
  end

  assign valid_id = id >= IW'(1) && id <= IW'(NUM_ELEMENTS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_out <= '0;
      for (int i = 0; i < NUM_ELEMENTS; i++) mem[i] <= '0;
    end else if (en && valid_id) begin
      unique case (op)
        ARR_UPDATE:   mem[AW'(id - IW'(1))] <= d_in & mask[AW'(id - IW'(1))];
        ARR_RETRIEVE: d_out <= mem[AW'(id - IW'(1))];
      endcase
    end
  end
endmodule

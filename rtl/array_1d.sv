// array_1d: one-dimensional array of NUM_ELEMENTS elements, indexed 1..n.
//
// Two operations, executed on a rising clock edge when en is high:
//   ARR_UPDATE    element[index] := d_in
//   ARR_RETRIEVE  d_out := element[index]
// An index outside 1..NUM_ELEMENTS does nothing. The array is a RAM with
// the index minus one as address. d_out is registered: it shows the
// retrieved element after the executing edge and holds until the next
// retrieve. Reset clears d_out and every element.
// The operations, the 1-based index and the default sizes follow the
// described array; reset is this design's addition.
module array_1d
  import ds_pkg::*;
#(
  parameter int unsigned NUM_ELEMENTS = 4,
  parameter int unsigned ELEMENT_W    = 4,
  localparam int unsigned IW = $clog2(NUM_ELEMENTS + 1),
  localparam int unsigned AW = (NUM_ELEMENTS > 1) ? $clog2(NUM_ELEMENTS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  array_op_e            op,
  input  logic [IW-1:0]        index,
  input  logic [ELEMENT_W-1:0] d_in,
  output logic [ELEMENT_W-1:0] d_out
);
  logic [ELEMENT_W-1:0] mem [NUM_ELEMENTS];
  logic valid_index;

  assign valid_index = index >= IW'(1) && index <= IW'(NUM_ELEMENTS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_out <= '0;
      for (int i = 0; i < NUM_ELEMENTS; i++) mem[i] <= '0;
    end else if (en && valid_index) begin
      unique case (op)
        ARR_UPDATE:   mem[AW'(index - IW'(1))] <= d_in;
        ARR_RETRIEVE: d_out <= mem[AW'(index - IW'(1))];
      endcase
    end
  end
endmodule

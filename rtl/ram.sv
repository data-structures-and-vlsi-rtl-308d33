// ram: synchronous single-port random access memory.
//
// The memory matrix holds 2**ADDR_W words of DATA_W bits; the control part
// executes one operation on each rising clock edge while chip select (cs)
// is high: r_w = 1 reads the addressed word into data_out, r_w = 0 writes
// data_in to it. With cs low nothing happens and data_out holds.
// Timing: read data appears after the edge that executes the read (one
// clock latency); a write is visible to a read at the next edge.
// The operations and pin names follow the memory described for this
// collection; the sizes are this design's choice.
module ram #(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              cs,
  input  logic              r_w,
  input  logic [ADDR_W-1:0] address,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] data_out
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (cs) begin
      if (r_w) data_out <= mem[address];
      else     mem[address] <= data_in;
    end
  end
endmodule

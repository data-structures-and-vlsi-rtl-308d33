// async_ram: random access memory without a clock.
//
// Same memory matrix and operations as the synchronous ram, but an
// operation is executed on the low-to-high transition of chip select (cs):
// r_w = 1 reads the addressed word to data_out, r_w = 0 writes data_in.
// address, r_w and data_in must be stable when cs rises. data_out changes
// only at a read's cs edge. Sizes are this design's choice.
module async_ram #(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned DATA_W = 8
) (
  input  logic              cs,
  input  logic              r_w,
  input  logic [ADDR_W-1:0] address,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] data_out
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge cs) begin
    if (r_w) data_out <= mem[address];
    else     mem[address] <= data_in;
  end
endmodule

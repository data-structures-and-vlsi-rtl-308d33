// cam: fully synchronous content addressable memory.
//
// WORDS cells of WIDTH bits. A cell matches when it equals match_data in
// every bit where match_mask is 1. All cells are compared in parallel; a
// priority encoder picks the lowest matching address. Every command on op
// is executed at the next rising clock edge (there is no idle command:
// CAM_MATCH changes no cell and serves as one):
//   CAM_RESET   every cell := RESET_WORD, outputs as for a match against it
//   CAM_MATCH   numomw (00 none / 01 one / 11 several), addr_out (first
//               match, WORDS if none), data_out (first match, 0 if none)
//   CAM_WRFIRST as match, and first match := (cell & ~mres) | mset
//   CAM_WRALL   as match, every matching cell := (cell & ~mres) | mset,
//               every other cell := (cell & ~nmres) | nmset
//   CAM_RDADDR  numomw 01 and data_out = cell[addr_in] if addr_in < WORDS,
//               else 00 and 0; addr_out = addr_in
//   CAM_WRADDR  as rdaddr, and cell[addr_in] := (cell & ~mres) | mset
// Setting wins over resetting. The outputs of a write command show the
// cells as they were before that edge. There is no full register: the user
// keeps a valid flag bit in each word. A multiple response is read out by
// marking the matches with CAM_WRALL and then taking them one by one with
// CAM_WRFIRST, which clears the mark bit of the first.
// The command set and its formulas follow the described CAM; the sizes and
// the single reset word are this design's choices.
module cam
  import ds_pkg::*;
#(
  parameter int unsigned WORDS = 8,
  parameter int unsigned WIDTH = 8,
  parameter logic [WIDTH-1:0] RESET_WORD = '0,
  localparam int unsigned AW = $clog2(WORDS) + 1
) (
  input  logic             clk,
  input  cam_op_e          op,
  input  logic [WIDTH-1:0] match_data,
  input  logic [WIDTH-1:0] match_mask,
  input  logic [WIDTH-1:0] mset,
  input  logic [WIDTH-1:0] mres,
  input  logic [WIDTH-1:0] nmset,
  input  logic [WIDTH-1:0] nmres,
  input  logic [AW-1:0]    addr_in,
  output logic [1:0]       numomw,
  output logic [AW-1:0]    addr_out,
  output logic [WIDTH-1:0] data_out
);
  // match-count encoding on numomw
  localparam logic [1:0] NUMOMW_NONE  = 2'b00;
  localparam logic [1:0] NUMOMW_ONE   = 2'b01;
  localparam logic [1:0] NUMOMW_MULTI = 2'b11;

  logic [WIDTH-1:0] mem [WORDS];

  // association register (combinational) and its encoding
  logic [WORDS-1:0] assoc;
  logic [AW-1:0]    first;
  logic [1:0]       count_code;
  logic             in_range;

  always_comb begin
    for (int i = 0; i < WORDS; i++)
      assoc[i] = ((mem[i] ^ match_data) & match_mask) == '0;
  end

  always_comb begin
    int n;
    first = AW'(WORDS);
    n = 0;
    for (int i = WORDS - 1; i >= 0; i--)
      if (assoc[i]) first = AW'(i);
    for (int i = 0; i < WORDS; i++)
      if (assoc[i]) n++;
    count_code = (n == 0) ? NUMOMW_NONE : (n == 1) ? NUMOMW_ONE : NUMOMW_MULTI;
  end

  assign in_range = addr_in < AW'(WORDS);

  // memory matrix
  always_ff @(posedge clk) begin
    for (int i = 0; i < WORDS; i++) begin
      unique case (op)
        CAM_RESET:   mem[i] <= RESET_WORD;
        CAM_WRFIRST: if (AW'(i) == first) mem[i] <= (mem[i] & ~mres) | mset;
        CAM_WRALL:   mem[i] <= assoc[i] ? (mem[i] & ~mres) | mset
                                        : (mem[i] & ~nmres) | nmset;
        CAM_WRADDR:  if (in_range && AW'(i) == addr_in)
                       mem[i] <= (mem[i] & ~mres) | mset;
        default: ;
      endcase
    end
  end

  // synchronous outputs
  always_ff @(posedge clk) begin
    unique case (op)
      CAM_RESET: begin
        // every cell holds RESET_WORD after this edge
        if (((RESET_WORD ^ match_data) & match_mask) == '0) begin
          numomw   <= (WORDS > 1) ? NUMOMW_MULTI : NUMOMW_ONE;
          addr_out <= '0;
          data_out <= RESET_WORD;
        end else begin
          numomw   <= NUMOMW_NONE;
          addr_out <= AW'(WORDS);
          data_out <= '0;
        end
      end
      CAM_RDADDR, CAM_WRADDR: begin
        numomw   <= in_range ? NUMOMW_ONE : NUMOMW_NONE;
        addr_out <= addr_in;
        data_out <= in_range ? mem[addr_in[AW-2:0]] : '0;
      end
      default: begin
        numomw   <= count_code;
        addr_out <= first;
        data_out <= (first == AW'(WORDS)) ? '0 : mem[first[AW-2:0]];
      end
    endcase
  end
endmodule

// tb_cam: self-checking test of the content addressable memory.
// A reference model in the testbench executes the same commands. Directed
// part: reset, exact and masked matches with none/one/several responses,
// write-first, write-all with non-match update, addressed read and write
// in and out of range, and reading a multiple response one word at a time
// by marking the matches with a flag bit. Then random commands. Every
// command's outputs are checked one clock edge after it is issued.
// The command formulas and outputs checked follow the described CAM; the
// stimulus and reference model are this testbench's own.
module tb_cam;
  import ds_pkg::*;
  localparam int unsigned WORDS = 8, WIDTH = 8, AW = $clog2(WORDS) + 1;
  localparam logic [WIDTH-1:0] RESET_WORD = 8'h00;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  cam_op_e          op;
  logic [WIDTH-1:0] match_data, match_mask, mset, mres, nmset, nmres;
  logic [AW-1:0]    addr_in;
  logic [1:0]       numomw;
  logic [AW-1:0]    addr_out;
  logic [WIDTH-1:0] data_out;
  int checks = 0, failures = 0;

  cam #(.WORDS(WORDS), .WIDTH(WIDTH), .RESET_WORD(RESET_WORD)) dut (.*);

  logic [WIDTH-1:0] model [WORDS];
  logic [1:0]       e_num;
  logic [AW-1:0]    e_addr;
  logic [WIDTH-1:0] e_data;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time);
    end
  endtask

  function automatic logic hits(logic [WIDTH-1:0] w);
    return (w & match_mask) == (match_data & match_mask);
  endfunction

  // reference model of one command, applied at the clock edge
  task automatic model_step();
    int n; int f;
    logic [WIDTH-1:0] next [WORDS];
    n = 0; f = -1;
    for (int i = 0; i < WORDS; i++) begin
      next[i] = model[i];
      if (hits(model[i])) begin
        n++;
        if (f < 0) f = i;
      end
    end
    case (op)
      CAM_RESET: begin
        for (int i = 0; i < WORDS; i++) next[i] = RESET_WORD;
        n = hits(RESET_WORD) ? WORDS : 0;
        f = (n > 0) ? 0 : -1;
      end
      CAM_WRFIRST: if (f >= 0) next[f] = (model[f] & ~mres) | mset;
      CAM_WRALL:
        for (int i = 0; i < WORDS; i++)
          next[i] = hits(model[i]) ? (model[i] & ~mres) | mset
                                      : (model[i] & ~nmres) | nmset;
      CAM_WRADDR: if (addr_in < WORDS) next[addr_in] = (model[addr_in] & ~mres) | mset;
      default: ;
    endcase
    if (op == CAM_RDADDR || op == CAM_WRADDR) begin
      e_num  = (addr_in < WORDS) ? 2'b01 : 2'b00;
      e_addr = addr_in;
      e_data = (addr_in < WORDS) ? model[addr_in] : '0;
    end else begin
      e_num  = (n == 0) ? 2'b00 : (n == 1) ? 2'b01 : 2'b11;
      e_addr = (f < 0) ? AW'(WORDS) : AW'(f);
      e_data = (f < 0) ? '0 : (op == CAM_RESET ? RESET_WORD : model[f]);
    end
    for (int i = 0; i < WORDS; i++) model[i] = next[i];
  endtask

  task automatic issue(cam_op_e o, logic [WIDTH-1:0] md, logic [WIDTH-1:0] mm,
                       logic [WIDTH-1:0] s = '0, logic [WIDTH-1:0] r = '0,
                       logic [WIDTH-1:0] ns = '0, logic [WIDTH-1:0] nr = '0,
                       logic [AW-1:0] a = '0);
    @(negedge clk);
    op = o; match_data = md; match_mask = mm; mset = s; mres = r;
    nmset = ns; nmres = nr; addr_in = a;
    model_step();
    @(negedge clk);
    op = CAM_MATCH; mset = '0; mres = '0; nmset = '0; nmres = '0;
    check("numomw", numomw, e_num);
    check("addr_out", addr_out, e_addr);
    check("data_out", data_out, e_data);
    // the idle match at this edge is checked by the next issue's model
    model_step();
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int multi_seen = 0;

  initial begin
    op = CAM_MATCH; match_data = '0; match_mask = '0; mset = '0; mres = '0;
    nmset = '0; nmres = '0; addr_in = '0;
    for (int i = 0; i < WORDS; i++) model[i] = 'x;
    issue(CAM_RESET, 8'h00, 8'hFF);            // all words 00, multiple match
    check("reset multiple", numomw, 2'b11);
    // fill words by address: word i = 8'h10*i + 1, bit 7 used as mark flag
    for (int i = 0; i < WORDS; i++)
      issue(CAM_WRADDR, '0, '0, WIDTH'(8'h10 * i + 1), 8'hFF, '0, '0, AW'(i));
    issue(CAM_RDADDR, '0, '0, '0, '0, '0, '0, AW'(3));
    check("rdaddr data", data_out, 8'h31);
    issue(CAM_RDADDR, '0, '0, '0, '0, '0, '0, AW'(WORDS + 2));   // out of range
    check("rdaddr out of range", numomw, 2'b00);
    issue(CAM_MATCH, 8'h51, 8'hFF);                               // single match
    check("single match addr", addr_out, AW'(5));
    issue(CAM_MATCH, 8'h99, 8'hFF);                               // no match
    check("no match addr", addr_out, AW'(WORDS));
    issue(CAM_MATCH, 8'h01, 8'h0F);                               // all words, masked
    check("masked multiple", numomw, 2'b11);
    // mark every word with low nibble 1 and high nibble < 4 (bit 7 := 1)
    issue(CAM_WRALL, 8'h01, 8'h4F, 8'h80, 8'h00, 8'h00, 8'h00);
    // read the marked words one by one: wrfirst on the mark, clearing it
    for (int k = 0; k < WORDS; k++) begin
      issue(CAM_WRFIRST, 8'h80, 8'h80, 8'h00, 8'h80);
      if (numomw != 2'b00) multi_seen++;
    end
    check("multiple response read out count", multi_seen, 4);
    // write-all with non-match update
    issue(CAM_WRALL, 8'h20, 8'hF0, 8'h0C, 8'h01, 8'h40, 8'h00);
    issue(CAM_WRFIRST, 8'h00, 8'h00, 8'hAA, 8'hFF);               // mask 0: word 0
    // random commands
    for (int n = 0; n < 1500; n++) begin
      cam_op_e o;
      int r = $urandom % 20;
      o = (r == 0) ? CAM_RESET : (r < 6) ? CAM_MATCH : (r < 9) ? CAM_WRFIRST :
          (r < 12) ? CAM_WRALL : (r < 16) ? CAM_RDADDR : CAM_WRADDR;
      issue(o, WIDTH'($urandom), WIDTH'($urandom & $urandom), WIDTH'($urandom & $urandom),
            WIDTH'($urandom), WIDTH'($urandom & $urandom & $urandom),
            WIDTH'($urandom & $urandom), AW'($urandom % (WORDS + 3)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

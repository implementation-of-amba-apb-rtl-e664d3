// tb_seven_seg_decoder: writes every hex digit over APB and checks the
// segment pins and the read-back registers against a segment table
// written out here from the glyphs (a = top, b = upper right, c = lower
// right, d = bottom, e = lower left, f = upper left, g = middle).
module tb_seven_seg_decoder;
  import apb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [3:0] paddr = 0;
  data_t pwdata = 0, prdata;
  logic [6:0] seg;
  int checks = 0, failures = 0;

  seven_seg_decoder dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic apb_write(input logic [3:0] a, input data_t d);
    @(negedge clk); psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk); penable = 1;
    @(negedge clk); psel = 0; penable = 0; pwrite = 0;
  endtask

  task automatic apb_read(input logic [3:0] a, output data_t d);
    @(negedge clk); psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(negedge clk); penable = 1;
    @(posedge clk); d = prdata;
    @(negedge clk); psel = 0; penable = 0;
  endtask

  // Lit segments of each glyph, as a string of segment letters.
  function automatic logic [6:0] glyph(input int d);
    string s;
    logic [6:0] r;
    case (d)
      0: s = "abcdef";  1: s = "bc";      2: s = "abdeg";   3: s = "abcdg";
      4: s = "bcfg";    5: s = "acdfg";   6: s = "acdefg";  7: s = "abc";
      8: s = "abcdefg"; 9: s = "abcdfg";  10: s = "abcefg"; 11: s = "cdefg";
      12: s = "adef";   13: s = "bcdeg";  14: s = "adefg";  default: s = "aefg";
    endcase
    r = '0;
    for (int i = 0; i < s.len(); i++) r[s[i] - "a"] = 1'b1;
    return r;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t rd;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(seg == glyph(0), "reset shows 0");
    for (int d = 15; d >= 0; d--) begin
      apb_write(SS_DIGIT, data_t'(8'hF0 | d));
      check(seg == glyph(d), $sformatf("digit %0d seg %b", d, seg));
      apb_read(SS_DIGIT, rd);
      check(rd == data_t'(d), "DIGIT read back");
      apb_read(SS_SEG, rd);
      check(rd == {1'b0, glyph(d)}, "SEG read back");
    end
    // A write to the read-only SEG register or with psel low changes nothing.
    apb_write(SS_SEG, 8'h05);
    check(seg == glyph(0), "write to SEG ignored");
    @(negedge clk); psel = 0; penable = 1; pwrite = 1; paddr = SS_DIGIT; pwdata = 8'h07;
    @(negedge clk); penable = 0; pwrite = 0;
    check(seg == glyph(0), "write without psel ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

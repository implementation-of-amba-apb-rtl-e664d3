// tb_keypad_decoder: presses every key of the 3x4 pad and checks the code,
// the pressed flag, the press counter and the three-cycle latency; also
// checks that holding a key counts once and that two keys at once (an
// ambiguous matrix state) are not taken as a press.
module tb_keypad_decoder;
  import apb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [3:1] col = '0;
  logic [4:1] row = '0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [3:0] paddr = 0;
  data_t pwdata = 0, prdata;
  int checks = 0, failures = 0;

  keypad_decoder dut (.*);

  always #5 clk = ~clk;

  // Telephone layout, row by row.
  localparam logic [3:0] LAYOUT [4][3] = '{
    '{4'h1, 4'h2, 4'h3},
    '{4'h4, 4'h5, 4'h6},
    '{4'h7, 4'h8, 4'h9},
    '{4'hA, 4'h0, 4'hB}};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic apb_read(input logic [3:0] a, output data_t d);
    @(negedge clk); psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(negedge clk); penable = 1;
    @(posedge clk); d = prdata;
    @(negedge clk); psel = 0; penable = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t rd;
    int n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    apb_read(KP_KEY, rd);
    check(rd == 8'h00, "nothing pressed after reset");
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 3; c++) begin
        int lat;
        @(negedge clk);
        row = 4'(1 << r);
        col = 3'(1 << c);
        lat = 0;
        paddr = KP_KEY;
        do begin @(posedge clk); #1; lat++; end while (!prdata[7] && lat < 10);
        check(lat == 3, $sformatf("latency %0d", lat));
        n++;
        repeat (5) @(posedge clk);  // held: must count once
        apb_read(KP_KEY, rd);
        check(rd == {4'h8, LAYOUT[r][c]}, $sformatf("key r%0d c%0d read %h", r, c, rd));
        apb_read(KP_COUNT, rd);
        check(rd == data_t'(n), $sformatf("count %0d expected %0d", rd, n));
        @(negedge clk); row = '0; col = '0;
        repeat (4) @(posedge clk);
        apb_read(KP_KEY, rd);
        check(rd == {4'h0, LAYOUT[r][c]}, "released: code kept, pressed clear");
      end
    // Two rows at once: not a valid press.
    @(negedge clk); row = 4'b0011; col = 3'b001;
    repeat (5) @(posedge clk);
    apb_read(KP_KEY, rd);
    check(rd[7] == 1'b0, "two rows not a press");
    apb_read(KP_COUNT, rd);
    check(rd == data_t'(n), "two rows not counted");
    // Two columns at once.
    @(negedge clk); row = 4'b0100; col = 3'b110;
    repeat (5) @(posedge clk);
    apb_read(KP_KEY, rd);
    check(rd[7] == 1'b0, "two columns not a press");
    @(negedge clk); row = '0; col = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_clock_divider: checks the tick period of the clock divider.
//
// Three instances (DIV = 1, 5 and the default) run for a while; the test
// measures the distance between successive ticks, which must be exactly
// DIV clk cycles, and checks every tick is one cycle wide.
module tb_clock_divider;
  logic clk = 0, rst_n = 0;
  logic t1, t5, td;
  int checks = 0, failures = 0;

  clock_divider #(.DIV(1)) d1 (.clk, .rst_n, .tick(t1));
  clock_divider #(.DIV(5)) d5 (.clk, .rst_n, .tick(t5));
  clock_divider            dd (.clk, .rst_n, .tick(td));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int last5 = -1, lastd = -1, n5 = 0, nd = 0, n1 = 0, cyc = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2000) begin
      @(posedge clk); #1;
      cyc++;
      if (t1) n1++;
      if (t5) begin
        if (last5 >= 0) check(cyc - last5 == 5, $sformatf("DIV=5 period %0d", cyc - last5));
        last5 = cyc; n5++;
      end
      if (td) begin
        if (lastd >= 0) check(cyc - lastd == 326, $sformatf("DIV=326 period %0d", cyc - lastd));
        lastd = cyc; nd++;
      end
    end
    check(n1 >= 1999, $sformatf("DIV=1 ticks every cycle (%0d)", n1));
    check(n5 == 400, $sformatf("DIV=5 tick count %0d", n5));
    check(nd == 6, $sformatf("DIV=326 tick count %0d", nd));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

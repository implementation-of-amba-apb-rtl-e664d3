// tb_uart_tx: sends random bytes and decodes the serial line in the
// testbench from the known bit time (OVS ticks of one every 3 clk cycles),
// checking start bit, data bits LSB first, stop bit, the busy time of ten
// bit times and that a start while busy is ignored.
module tb_uart_tx;
  localparam int TDIV = 3;
  localparam int BIT = 16 * TDIV;   // clk cycles per bit

  logic clk = 0, rst_n = 0, tick = 0, start = 0;
  logic [7:0] data = 0;
  logic txd, busy;
  int checks = 0, failures = 0, cyc = 0;

  uart_tx dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc  <= cyc + 1;
    tick <= (cyc % TDIV == TDIV - 1);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Decode one frame from txd.
  task automatic receive(output logic [7:0] b, output bit stop_ok, output int t_start);
    while (txd) @(posedge clk);
    t_start = cyc;
    repeat (BIT / 2) @(posedge clk);
    check(!txd, "start bit low in its middle");
    for (int i = 0; i < 8; i++) begin
      repeat (BIT) @(posedge clk);
      b[i] = txd;
    end
    repeat (BIT) @(posedge clk);
    stop_ok = txd;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    check(txd && !busy, "idle line high");
    for (int k = 0; k < 12; k++) begin
      logic [7:0] sent, got;
      bit stop_ok;
      int t0, t_busy;
      sent = (k == 0) ? 8'h00 : (k == 1) ? 8'hFF : 8'($urandom);
      fork
        receive(got, stop_ok, t0);
      join_none
      @(negedge clk); data = sent; start = 1;
      @(negedge clk); start = 0; data = ~sent;
      t_busy = cyc;
      // A second start while busy must not disturb the frame.
      repeat (BIT * 3) @(negedge clk);
      start = 1;
      @(negedge clk); start = 0;
      wait fork;
      while (busy) @(posedge clk);
      check(got == sent, $sformatf("byte %h received %h", sent, got));
      check(stop_ok, "stop bit high");
      // Ten bit times, give or take one tick of phase.
      check(cyc - t_busy >= 10 * BIT - TDIV - 2 && cyc - t_busy <= 10 * BIT + TDIV + 2,
            $sformatf("busy for %0d cycles", cyc - t_busy));
      repeat (BIT) @(posedge clk);
      check(txd, "line idle after frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

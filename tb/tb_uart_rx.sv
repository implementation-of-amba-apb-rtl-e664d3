// tb_uart_rx: drives 8N1 frames on rxd at the bit time the receiver
// expects (OVS ticks of one every 3 clk cycles) and checks the received
// bytes, the valid pulse, a frame error on a low stop bit, and that a
// short low glitch on the idle line is not taken as a start bit.
module tb_uart_rx;
  localparam int TDIV = 3;
  localparam int BIT = 16 * TDIV;

  logic clk = 0, rst_n = 0, tick = 0, rxd = 1;
  logic [7:0] data;
  logic valid, frame_err;
  int checks = 0, failures = 0, cyc = 0;
  int nvalid = 0, nferr = 0;
  logic [7:0] last;

  uart_rx dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc  <= cyc + 1;
    tick <= (cyc % TDIV == TDIV - 1);
    if (valid) begin nvalid++; last = data; end
    if (frame_err) nferr++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input logic [7:0] b, input bit stop);
    logic [9:0] f;
    f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      @(negedge clk) rxd = f[i];
      repeat (BIT - 1) @(negedge clk);
    end
    @(negedge clk) rxd = 1'b1;
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
    repeat (BIT) @(posedge clk);
    for (int k = 0; k < 16; k++) begin
      logic [7:0] b;
      int nv;
      b = (k == 0) ? 8'h00 : (k == 1) ? 8'hFF : (k == 2) ? 8'h55 : 8'($urandom);
      nv = nvalid;
      send(b, 1'b1);
      repeat (BIT) @(posedge clk);
      check(nvalid == nv + 1, "one valid pulse per frame");
      check(last == b, $sformatf("sent %h got %h", b, last));
    end
    check(nferr == 0, "no frame errors on good frames");
    // Low stop bit: frame error, no valid.
    begin
      int nv;
      nv = nvalid;
      send(8'hA5, 1'b0);
      repeat (2 * BIT) @(posedge clk);
      check(nferr == 1, "frame error on low stop bit");
      check(nvalid == nv, "no valid on framing error");
      // The low stop bit may look like the start of a further frame;
      // let that settle before the next test.
      repeat (12 * BIT) @(posedge clk);
    end
    // Glitch shorter than half a bit.
    begin
      int nv, nf;
      nv = nvalid; nf = nferr;
      @(negedge clk) rxd = 1'b0;
      repeat (BIT / 4) @(negedge clk);
      rxd = 1'b1;
      repeat (12 * BIT) @(posedge clk);
      check(nvalid == nv && nferr == nf, "glitch ignored");
      send(8'h3C, 1'b1);
      repeat (BIT) @(posedge clk);
      check(last == 8'h3C, "receives after a glitch");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

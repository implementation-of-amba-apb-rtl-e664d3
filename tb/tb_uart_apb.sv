// tb_uart_apb: the UART's APB registers with txd looped back to rxd.
//
// Bytes written to TXDATA must come back in RXDATA with rx_ready set; the
// test checks tx_busy, write-1-to-clear of the flags, a byte written while
// the transmitter is busy (dropped and flagged), a second byte received
// before rx_ready is cleared (overrun), and a frame error injected by
// holding the line low.
module tb_uart_apb;
  import apb_pkg::*;
  localparam int TDIV = 2;
  localparam int BIT = 16 * TDIV;

  logic clk = 0, rst_n = 0, tick = 0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [3:0] paddr = 0;
  data_t pwdata = 0, prdata;
  logic rxd, txd, irq;
  logic force_low = 0;
  int checks = 0, failures = 0, cyc = 0;

  assign rxd = txd && !force_low;

  uart_apb dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc  <= cyc + 1;
    tick <= (cyc % TDIV == TDIV - 1);
  end

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

  task automatic wait_ready();
    int n = 0;
    data_t st;
    do begin apb_read(UA_STATUS, st); n++; end while (!st[1] && n < 1000);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t rd;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (BIT) @(posedge clk);
    apb_read(UA_STATUS, rd);
    check(rd == 8'h00, "status after reset");
    // Loopback of several bytes.
    for (int k = 0; k < 6; k++) begin
      data_t b;
      b = 8'($urandom);
      apb_write(UA_TXDATA, b);
      apb_read(UA_STATUS, rd);
      check(rd[0], "tx_busy while sending");
      apb_read(UA_TXDATA, rd);
      check(rd == b, "TXDATA read back");
      wait_ready();
      check(irq, "irq with rx_ready");
      apb_read(UA_RXDATA, rd);
      check(rd == b, $sformatf("loopback sent %h got %h", b, rd));
      apb_write(UA_STATUS, 8'h02);
      apb_read(UA_STATUS, rd);
      check(rd[1] == 1'b0 && !irq, "rx_ready cleared");
      do apb_read(UA_STATUS, rd); while (rd[0]);
    end
    // Write while busy: dropped, flagged, only the first byte arrives.
    apb_write(UA_TXDATA, 8'h81);
    apb_write(UA_TXDATA, 8'h42);
    apb_read(UA_STATUS, rd);
    check(rd[4], "tx_dropped set");
    wait_ready();
    apb_read(UA_RXDATA, rd);
    check(rd == 8'h81, "first byte kept");
    repeat (12 * BIT) @(posedge clk);
    apb_read(UA_RXDATA, rd);
    check(rd == 8'h81, "dropped byte never sent");
    // Overrun: second byte without clearing rx_ready.
    apb_write(UA_TXDATA, 8'h99);
    repeat (12 * BIT) @(posedge clk);
    apb_read(UA_STATUS, rd);
    check(rd[3] && rd[1], "rx_overrun set");
    apb_read(UA_RXDATA, rd);
    check(rd == 8'h99, "newest byte kept on overrun");
    apb_write(UA_STATUS, 8'h1A);
    apb_read(UA_STATUS, rd);
    check(rd == 8'h00, "flags cleared together");
    // Frame error: hold the line low for a whole frame.
    @(negedge clk) force_low = 1;
    repeat (11 * BIT) @(posedge clk);
    @(negedge clk) force_low = 0;
    repeat (12 * BIT) @(posedge clk);
    apb_read(UA_STATUS, rd);
    check(rd[2], "frame_err set");
    apb_write(UA_STATUS, 8'h04);
    apb_read(UA_STATUS, rd);
    check(!rd[2], "frame_err cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_apb_system: end-to-end test of the APB subsystem at its default
// parameters (sys_clk divided by 326 for the timer and the UART).
//
// The testbench acts as the host on pwrite/paddr/pwdata/prdata, as the
// keypad on R1..R4/C1..C3, watches the segment pins and loops uart_txd
// back to uart_rxd. It reads and writes every slave, checks the values
// against expectations worked out here, checks the two-cycle transfer and
// the timer and UART timing in sys_clk cycles, and counts how often each
// mechanism of the design happened; one that never happened is a failure.
module tb_apb_system;
  localparam int DIV = 326;           // the top's default divider
  localparam int BITC = 16 * DIV;     // sys_clk cycles per UART bit

  logic sys_clk = 0, preset_n = 0;
  logic pwrite = 0;
  logic C1 = 0, C2 = 0, C3 = 0, R1 = 0, R2 = 0, R3 = 0, R4 = 0;
  logic [7:0] paddr = 0, pwdata = 0, prdata;
  logic [6:0] seg;
  logic uart_txd, uart_rxd;
  int checks = 0, failures = 0, cyc = 0;

  assign uart_rxd = uart_txd;

  apb_system dut (.*);

  always #5 sys_clk = ~sys_clk;
  always @(posedge sys_clk) cyc <= cyc + 1;

  // Mechanism counters: monitors bound into the blocks fill a package.
  import tb_sys_counters::*;
  int n_key = 0, n_seg = 0;
  logic [6:0] prev_seg = 0;
  always @(posedge sys_clk) if (preset_n) begin
    if (seg != prev_seg) n_seg++;
    prev_seg <= seg;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Host write: present the request, let the one transfer finish, then
  // go back to reading the same address.
  task automatic host_write(input logic [7:0] a, input logic [7:0] d);
    @(negedge sys_clk); pwrite = 1; paddr = a; pwdata = d;
    repeat (4) @(negedge sys_clk);
    pwrite = 0;
  endtask

  task automatic host_read(input logic [7:0] a, output logic [7:0] d);
    @(negedge sys_clk); pwrite = 0; paddr = a;
    repeat (6) @(negedge sys_clk);
    d = prdata;
  endtask

  task automatic press(input int r, input int c);
    @(negedge sys_clk);
    {R4, R3, R2, R1} = 4'(1 << r);
    {C3, C2, C1} = 3'(1 << c);
  endtask

  task automatic release_keys();
    @(negedge sys_clk);
    {R4, R3, R2, R1} = '0;
    {C3, C2, C1} = '0;
  endtask

  initial begin
    repeat (400000) @(posedge sys_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] rd;
    int t0, nw;
    repeat (3) @(posedge sys_clk);
    preset_n = 1;

    // --- A single write is one two-cycle transfer -----------------------
    host_read(8'h20, rd);
    @(negedge sys_clk);
    nw = n_write;
    pwrite = 1; paddr = 8'h20; pwdata = 8'h07;
    @(posedge sys_clk); #1;
    @(posedge sys_clk); #1;
    check(seg == 7'h3F, "segments unchanged until the end of ACCESS");
    @(posedge sys_clk); #1;
    check(seg == 7'h07, $sformatf("seg for 7 two cycles after the request: %h", seg));
    repeat (20) @(posedge sys_clk);
    check(n_write == nw + 1, "a held write is made once");
    host_read(8'h21, rd);
    check(rd == 8'h07, "SEG register over the bus");

    // --- Keypad ------------------------------------------------------------
    host_read(8'h00, rd);
    check(rd == 8'h00, "no key after reset");
    press(1, 1);                       // '5'
    host_read(8'h00, rd);
    if (rd[7]) n_key++;
    check(rd == 8'h85, $sformatf("key 5 pressed: %h", rd));
    release_keys();
    host_read(8'h00, rd);
    check(rd == 8'h05, "key 5 released");
    press(3, 2);                       // '#'
    host_read(8'h00, rd);
    if (rd[7]) n_key++;
    check(rd == 8'h8B, $sformatf("key # pressed: %h", rd));
    release_keys();
    host_read(8'h01, rd);
    check(rd == 8'd2, "two presses counted");
    // Show the last key on the display.
    host_read(8'h00, rd);
    host_write(8'h20, {4'h0, rd[3:0]});
    check(seg == 7'h7C, $sformatf("display shows b: %h", seg));

    // --- Timer: LOAD = 3 ticks, auto-reload ----------------------------------
    host_write(8'h11, 8'd3);
    host_read(8'h11, rd);
    check(rd == 8'd3, "timer LOAD");
    host_write(8'h10, 8'h03);
    t0 = cyc - 4;
    paddr = 8'h13;
    repeat (4) @(posedge sys_clk);
    while (prdata[0] == 1'b0 && cyc - t0 < 10 * DIV) @(posedge sys_clk);
    check(cyc - t0 >= 2 * DIV && cyc - t0 <= 3 * DIV + 10,
          $sformatf("timer expired after %0d cycles", cyc - t0));
    host_write(8'h13, 8'h01);
    host_read(8'h13, rd);
    check(rd == 8'h00, "timer flag cleared");
    t0 = cyc;
    while (prdata[0] == 1'b0 && cyc - t0 < 10 * DIV) @(posedge sys_clk);
    check(t_exp.size() == 2 && t_exp[1] - t_exp[0] == 3 * DIV,
          "auto-reload period of 3 ticks");
    host_write(8'h10, 8'h00);

    // --- UART loopback -----------------------------------------------------------
    host_write(8'h30, 8'hA5);
    t0 = cyc;
    host_read(8'h32, rd);
    check(rd[0], "UART busy");
    paddr = 8'h32;
    while (prdata[1] == 1'b0 && cyc - t0 < 12 * BITC) @(posedge sys_clk);
    // ready at the middle of the stop bit: 9.5 bit times after the start
    check(cyc - t0 >= 9 * BITC && cyc - t0 <= 10 * BITC,
          $sformatf("byte looped back after %0d cycles", cyc - t0));
    host_read(8'h31, rd);
    check(rd == 8'hA5, $sformatf("UART received %h", rd));
    host_write(8'h32, 8'h1E);
    host_read(8'h32, rd);
    check(rd[1] == 1'b0, "rx_ready cleared");

    // --- Unmapped address --------------------------------------------------------
    host_read(8'h50, rd);
    check(rd == 8'h00, "unmapped address reads 0");

    // --- Mechanisms --------------------------------------------------------------
    check(n_write > 0, "writes");
    check(n_read > 0, "reads");
    check(n_b2b > 0, "back-to-back transfers");
    for (int i = 0; i < 4; i++) check(n_sel[i] > 0, $sformatf("psel%0d", i + 1));
    check(n_unmapped > 0, "transfer to no slave");
    check(n_tick > 0, "divider ticks");
    check(n_key == 2, "key presses");
    check(n_expire >= 2, "timer expiries");
    check(n_seg >= 2, "display updates");
    check(n_txframe > 0, "UART frames sent");
    check(n_rxbyte > 0, "UART bytes received");
    $display("mechanisms: writes=%0d reads=%0d back_to_back=%0d psel1..4=%0d,%0d,%0d,%0d unmapped=%0d ticks=%0d timer_expiries=%0d seg_updates=%0d uart_tx=%0d uart_rx=%0d",
             n_write, n_read, n_b2b, n_sel[0], n_sel[1], n_sel[2], n_sel[3], n_unmapped,
             n_tick, n_expire, n_seg, n_txframe, n_rxbyte);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

bind apb_controller tb_bus_monitor u_bus_mon (
  .clk, .rst_n, .psel, .penable, .pwrite(bus_req.pwrite), .paddr(bus_req.paddr));
bind clock_divider tb_event_monitor #(.KIND(0)) u_tick_mon (.clk, .rst_n, .ev(tick));
bind apb_timer     tb_event_monitor #(.KIND(1)) u_exp_mon  (.clk, .rst_n, .ev(irq));
bind uart_apb      tb_event_monitor #(.KIND(2)) u_tx_mon   (.clk, .rst_n, .ev(tx_busy));
bind uart_apb      tb_event_monitor #(.KIND(3)) u_rx_mon   (.clk, .rst_n, .ev(irq));

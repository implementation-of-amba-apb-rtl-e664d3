// tb_apb_timer: programs the timer over APB with its own tick source and
// checks the count sequence, the expiry after LOAD ticks, one-shot stop,
// auto-reload period, write-1-to-clear of the expired flag and that the
// count holds while disabled.
module tb_apb_timer;
  import apb_pkg::*;

  logic clk = 0, rst_n = 0, tick = 0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [3:0] paddr = 0;
  data_t pwdata = 0, prdata;
  logic irq;
  int checks = 0, failures = 0;
  int cyc = 0;

  apb_timer dut (.*);

  always #5 clk = ~clk;
  // A tick every 4 clk cycles.
  always @(posedge clk) begin
    cyc  <= cyc + 1;
    tick <= (cyc % 4 == 3);
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

  // Number of ticks until irq rises.
  task automatic ticks_to_irq(output int n);
    n = 0;
    while (!irq && n < 1000) begin
      @(posedge clk); #1;
      if (tick) n++;
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t rd;
    int n;
    repeat (2) @(posedge clk);
    rst_n = 1;
    apb_read(TM_COUNT, rd);
    check(rd == 0 && !irq, "reset state");
    // Load while disabled: count holds.
    apb_write(TM_LOAD, 8'd9);
    repeat (40) @(posedge clk);
    apb_read(TM_COUNT, rd);
    check(rd == 8'd9, $sformatf("held while disabled: %0d", rd));
    apb_read(TM_LOAD, rd);
    check(rd == 8'd9, "LOAD read back");
    // One-shot: expires after 9 ticks, then stays at 0.
    apb_write(TM_CTRL, 8'h01);
    ticks_to_irq(n);
    // The tick seen at the edge that sets irq is counted by the task too.
    check(n == 9, $sformatf("one-shot expiry after %0d ticks", n));
    apb_read(TM_STATUS, rd);
    check(rd == 8'h01, "expired flag");
    repeat (40) @(posedge clk);
    apb_read(TM_COUNT, rd);
    check(rd == 8'd0, "one-shot stops at 0");
    apb_read(TM_CTRL, rd);
    check(rd == 8'h01, "CTRL read back");
    // Clear: write 0 leaves it, write 1 clears.
    apb_write(TM_STATUS, 8'h00);
    check(irq, "write 0 keeps flag");
    apb_write(TM_STATUS, 8'h01);
    check(!irq, "write 1 clears flag");
    // Auto-reload with LOAD = 5: expires every 5 ticks.
    apb_write(TM_CTRL, 8'h00);
    apb_write(TM_LOAD, 8'd5);
    apb_write(TM_CTRL, 8'h03);
    begin
      int t_prev = -1;
      for (int k = 0; k < 5; k++) begin
        ticks_to_irq(n);
        if (t_prev >= 0)
          check(cyc - t_prev == 5 * 4, $sformatf("reload period %0d cycles", cyc - t_prev));
        t_prev = cyc;
        apb_write(TM_STATUS, 8'h01);
        apb_read(TM_COUNT, rd);
        check(rd >= 1 && rd <= 5, $sformatf("reloaded count %0d", rd));
      end
    end
    // Count decreases one per tick.
    apb_write(TM_CTRL, 8'h00);
    apb_write(TM_LOAD, 8'd200);
    apb_write(TM_CTRL, 8'h01);
    repeat (4 * 20) @(posedge clk);
    apb_read(TM_COUNT, rd);
    check(rd >= 8'd179 && rd <= 8'd181, $sformatf("count after 20 ticks %0d", rd));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

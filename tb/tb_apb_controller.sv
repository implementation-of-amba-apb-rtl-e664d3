// tb_apb_controller: self-checking test of the APB master.
//
// A small register array in the testbench plays the slave. The test checks
// that a held write request produces exactly one transfer of two cycles
// (SETUP with psel only, then ACCESS with psel and penable), that the
// address and data on the bus are the host's, that a read request is
// repeated every two cycles back to back, and that prdata returns the
// slave's value and then tracks it when the slave changes.
module tb_apb_controller;
  import apb_pkg::*;

  logic     clk = 0, rst_n = 0;
  apb_req_t host_req;
  logic     psel, penable, xfer_done;
  apb_req_t bus_req;
  data_t    prdata_bus, prdata;
  data_t    mem [256];
  int       checks = 0, failures = 0;
  int       nwrites = 0, nreads = 0, cyc = 0;

  apb_controller dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  assign prdata_bus = mem[bus_req.paddr];

  always @(posedge clk) if (rst_n && psel && penable) begin
    if (bus_req.pwrite) begin
      mem[bus_req.paddr] <= bus_req.pwdata;
      nwrites++;
    end else nreads++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c0, seen_setup;
    foreach (mem[i]) mem[i] = 8'(i * 7 + 3);
    host_req = '{pwrite: 1'b1, paddr: 8'h00, pwdata: 8'h00};
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Reset request is a write of 0 to 0: it is made once.
    repeat (10) @(posedge clk);
    check(nwrites == 1, "first write after reset made once");
    check(mem[0] == 8'h00, "write data after reset");

    // A new write: exactly one two-cycle transfer with the host's values.
    nwrites = 0;
    @(negedge clk);
    host_req = '{pwrite: 1'b1, paddr: 8'h35, pwdata: 8'hA7};
    @(posedge clk); #1;
    check(psel && !penable, "SETUP cycle one clock after request");
    check(bus_req.paddr == 8'h35 && bus_req.pwdata == 8'hA7 && bus_req.pwrite, "SETUP bus values");
    @(posedge clk); #1;
    check(psel && penable, "ACCESS cycle follows SETUP");
    @(posedge clk); #1;
    check(!psel && !penable, "bus idle after single write");
    repeat (20) @(posedge clk);
    check(nwrites == 1, "held write made exactly once");
    check(mem[8'h35] == 8'hA7, "written value in slave");

    // Reads: back to back every two cycles.
    @(negedge clk);
    host_req = '{pwrite: 1'b0, paddr: 8'h35, pwdata: 8'h00};
    nreads = 0;
    c0 = cyc;
    repeat (21) @(posedge clk);
    #1;
    check(nreads == 10, $sformatf("10 reads in 21 cycles, got %0d", nreads));
    check(prdata == 8'hA7, $sformatf("read data %h", prdata));
    // Back-to-back: ACCESS is followed directly by SETUP.
    seen_setup = 0;
    repeat (8) begin
      @(posedge clk); #1;
      if (psel && !penable) seen_setup++;
      check(psel, "psel stays high during back-to-back reads");
    end
    check(seen_setup == 4, "a SETUP every other cycle");
    // prdata tracks a slave change.
    mem[8'h35] = 8'h5C;
    repeat (4) @(posedge clk);
    #1;
    check(prdata == 8'h5C, "prdata follows slave");

    // Same write twice in a row with a read in between: made twice.
    nwrites = 0;
    @(negedge clk);
    host_req = '{pwrite: 1'b1, paddr: 8'h10, pwdata: 8'h11};
    repeat (6) @(posedge clk);
    @(negedge clk);
    host_req = '{pwrite: 1'b0, paddr: 8'h10, pwdata: 8'h11};
    repeat (6) @(posedge clk);
    @(negedge clk);
    host_req = '{pwrite: 1'b1, paddr: 8'h10, pwdata: 8'h11};
    repeat (6) @(posedge clk);
    check(nwrites == 2, $sformatf("write repeated after a read: %0d", nwrites));

    // Write changing every few cycles: one transfer per change.
    nwrites = 0;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      host_req = '{pwrite: 1'b1, paddr: 8'(128 + i), pwdata: 8'($urandom)};
      repeat (4) @(posedge clk);
      #1;
      check(mem[8'(128 + i)] == host_req.pwdata, "random write lands");
    end
    check(nwrites == 8, "one transfer per changed write");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

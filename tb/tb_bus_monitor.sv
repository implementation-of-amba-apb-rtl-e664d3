// tb_bus_monitor: bound into the APB controller; counts completed reads and
// writes, back-to-back transfers (an ACCESS cycle followed directly by a
// SETUP cycle) and transfers per slave by the upper address nibble.
module tb_bus_monitor (
  input logic       clk,
  input logic       rst_n,
  input logic       psel,
  input logic       penable,
  input logic       pwrite,
  input logic [7:0] paddr
);
  import tb_sys_counters::*;
  logic prev_access = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (psel && penable) begin
      if (pwrite) n_write++; else n_read++;
      if (paddr[7:4] < 4) n_sel[paddr[5:4]]++; else n_unmapped++;
    end
    if (prev_access && psel && !penable) n_b2b++;
    prev_access <= psel && penable;
  end
endmodule

// clock_divider: divides the system clock for the peripherals.
//
// A counter runs from 0 to DIV-1 on clk and tick is high for one clk cycle
// each time it wraps, i.e. once every DIV cycles. The peripherals stay on
// clk and use tick as a clock enable, which keeps the whole subsystem in one
// clock domain; the block diagram draws the divided clock as a clock. The
// default DIV = 326 gives 16 ticks per bit at 9600 baud from a 50 MHz clock
// (the UART's oversampling rate); the published design gives no ratio.
//
// Interface: clk, rst_n (active low, asynchronous) in; tick out.
module clock_divider #(
  parameter int unsigned DIV = 326
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end

  initial assert (DIV >= 1) else $error("DIV must be at least 1");

endmodule

// uart_tx: UART transmitter, 8 data bits, no parity, 1 stop bit (8N1).
//
// tick is a clock enable at OVS times the baud rate (from the clock
// divider). A start pulse while idle latches data and sends a start bit
// (0), the eight data bits LSB first and a stop bit (1), each held for OVS
// ticks; txd idles high. busy is high from the cycle after start until the
// stop bit has been sent. A start pulse while busy is ignored. The frame
// format and oversampling are this design's own choice.
module uart_tx #(
  parameter int unsigned OVS = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,
  input  logic       start,
  input  logic [7:0] data,
  output logic       txd,
  output logic       busy
);

  localparam int unsigned OW = $clog2(OVS);

  logic [9:0]    shreg;      // {stop, data, start}, shifted out LSB first
  logic [3:0]    nbits;      // bits still to send
  logic [OW-1:0] ocnt;

  assign busy = (nbits != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '1;
      nbits <= '0;
      ocnt  <= '0;
      txd   <= 1'b1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (start) begin
        shreg <= {1'b1, data, 1'b0};
        nbits <= 4'd10;
        ocnt  <= '0;
      end
    end else begin
      txd <= shreg[0];
      if (tick) begin
        if (ocnt == OW'(OVS - 1)) begin
          ocnt  <= '0;
          shreg <= {1'b1, shreg[9:1]};
          nbits <= nbits - 1'b1;
        end else begin
          ocnt <= ocnt + 1'b1;
        end
      end
    end
  end

endmodule

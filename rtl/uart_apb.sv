// uart_apb: APB slave (psel4), the UART top module.
//
// Wraps one uart_tx and one uart_rx, both timed by the clock divider's tick
// (OVS ticks per bit), behind four APB registers. Writing TXDATA sends the
// byte if the transmitter is idle; a byte written while it is busy is
// dropped and flagged. A received byte is held in RXDATA and flagged in
// rx_ready; a byte that arrives while rx_ready is still set overwrites it
// and sets rx_overrun. Flags are cleared by writing 1 to them, since reads
// have no side effects. The register set is this design's own choice; the
// published design names the UART and its role as a top module only.
//
// Registers (offset = paddr[3:0]):
//   0 TXDATA  write: byte to send; read: last byte written
//   1 RXDATA  last byte received (read only)
//   2 STATUS  [0] tx_busy (read only), [1] rx_ready, [2] frame_err,
//             [3] rx_overrun, [4] tx_dropped; [4:1] write 1 to clear
// txd/rxd are the serial line pins; irq is rx_ready.
module uart_apb
  import apb_pkg::*;
#(
  parameter int unsigned OVS = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,
  input  logic       psel,
  input  logic       penable,
  input  logic       pwrite,
  input  logic [3:0] paddr,
  input  data_t      pwdata,
  output data_t      prdata,
  input  logic       rxd,
  output logic       txd,
  output logic       irq
);

  logic  wr;
  logic  tx_start, tx_busy;
  data_t tx_data, rx_byte, rx_data;
  logic  rx_valid, rx_ferr;
  logic  rx_ready, frame_err, rx_overrun, tx_dropped;

  assign wr       = psel && penable && pwrite;
  assign tx_start = wr && (paddr == UA_TXDATA) && !tx_busy;

  uart_tx #(.OVS(OVS)) u_tx (
    .clk, .rst_n, .tick,
    .start(tx_start), .data(pwdata),
    .txd, .busy(tx_busy)
  );

  uart_rx #(.OVS(OVS)) u_rx (
    .clk, .rst_n, .tick,
    .rxd, .data(rx_byte), .valid(rx_valid), .frame_err(rx_ferr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_data    <= '0;
      rx_data    <= '0;
      rx_ready   <= 1'b0;
      frame_err  <= 1'b0;
      rx_overrun <= 1'b0;
      tx_dropped <= 1'b0;
    end else begin
      if (wr && paddr == UA_STATUS) begin
        if (pwdata[1]) rx_ready   <= 1'b0;
        if (pwdata[2]) frame_err  <= 1'b0;
        if (pwdata[3]) rx_overrun <= 1'b0;
        if (pwdata[4]) tx_dropped <= 1'b0;
      end
      if (wr && paddr == UA_TXDATA) begin
        tx_data <= pwdata;
        if (tx_busy) tx_dropped <= 1'b1;
      end
      if (rx_valid) begin
        rx_data  <= rx_byte;
        rx_ready <= 1'b1;
        if (rx_ready && !(wr && paddr == UA_STATUS && pwdata[1]))
          rx_overrun <= 1'b1;
      end
      if (rx_ferr) frame_err <= 1'b1;
    end
  end

  always_comb begin
    unique case (paddr)
      UA_TXDATA: prdata = tx_data;
      UA_RXDATA: prdata = rx_data;
      UA_STATUS: prdata = {3'b0, tx_dropped, rx_overrun, frame_err, rx_ready, tx_busy};
      default:   prdata = '0;
    endcase
  end

  assign irq = rx_ready;

endmodule

// uart_rx: UART receiver, 8 data bits, no parity, 1 stop bit (8N1).
//
// rxd passes a two-flop synchronizer. A falling edge while idle starts a
// frame; counting ticks (OVS per bit, from the clock divider) the receiver
// samples the middle of the start bit, gives up if it is high again (a
// glitch), then samples the eight data bits (LSB first) and the stop bit in
// their middles. At the stop bit it pulses valid with the byte in data; a
// low stop bit pulses frame_err instead. The frame format and oversampling
// are this design's own choice.
module uart_rx #(
  parameter int unsigned OVS = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);

  localparam int unsigned OW = $clog2(OVS);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_t;

  state_t        state;
  logic [1:0]    sync;
  logic          rx;
  logic [OW-1:0] ocnt;
  logic [2:0]    bitn;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= '1;
    else        sync <= {sync[0], rxd};
  end
  assign rx = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      ocnt      <= '0;
      bitn      <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        IDLE: if (!rx) begin
          state <= START;
          ocnt  <= '0;
        end
        START: if (tick) begin
          if (ocnt == OW'(OVS/2 - 1)) begin
            ocnt  <= '0;
            bitn  <= '0;
            state <= rx ? IDLE : DATA;
          end else ocnt <= ocnt + 1'b1;
        end
        DATA: if (tick) begin
          if (ocnt == OW'(OVS - 1)) begin
            ocnt <= '0;
            data <= {rx, data[7:1]};
            bitn <= bitn + 1'b1;
            if (bitn == 3'd7) state <= STOP;
          end else ocnt <= ocnt + 1'b1;
        end
        STOP: if (tick) begin
          if (ocnt == OW'(OVS - 1)) begin
            ocnt      <= '0;
            state     <= IDLE;
            valid     <= rx;
            frame_err <= !rx;
          end else ocnt <= ocnt + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule

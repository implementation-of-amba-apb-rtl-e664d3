// keypad_decoder: APB slave (psel1) that decodes a 3x4 matrix keypad.
//
// The keypad lines R1..R4 and C1..C3 are all inputs (as on the top-level
// pin list). A pressed key joins one row to one column; this design takes
// the lines as active high, so a key is pressed when exactly one row and
// exactly one column are high. The lines pass a two-flop synchronizer, the
// key is decoded as on a telephone pad (R1: 1 2 3, R2: 4 5 6, R3: 7 8 9,
// R4: * 0 #, with * = 0xA and # = 0xB), and on every new press the code is
// latched and a press counter incremented.
//
// Registers (read only, offset = paddr[3:0]):
//   0 KEY   {pressed, 3'b000, last_key[3:0]}   pressed is the live state
//   1 COUNT number of presses since reset, modulo 256
// The keypad lines and the decoder's place on the bus (psel1) follow the
// published design; polarity, coding and registers are this design's own.
// Timing: a press shows in KEY three clk cycles after the lines change
// (two synchronizer stages plus the latch).
module keypad_decoder
  import apb_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:1] col,      // C1..C3
  input  logic [4:1] row,      // R1..R4
  input  logic       psel,
  input  logic       penable,
  input  logic       pwrite,
  input  logic [3:0] paddr,
  input  data_t      pwdata,
  output data_t      prdata
);

  logic [6:0] sync1, sync2;
  logic [3:1] c;
  logic [4:1] r;
  logic       valid, valid_q;
  logic [3:0] code;
  logic [3:0] last_key;
  data_t      count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1 <= '0;
      sync2 <= '0;
    end else begin
      sync1 <= {row, col};
      sync2 <= sync1;
    end
  end

  assign c = sync2[2:0];
  assign r = sync2[6:3];

  // Exactly one line high: non-zero with no second bit set.
  assign valid = (c != '0) && ((c & (c - 1'b1)) == '0) &&
                 (r != '0) && ((r & (r - 1'b1)) == '0);

  // Key code from the row and column position.
  always_comb begin
    logic [3:0] ri, ci;
    ri = '0;
    ci = '0;
    for (int i = 1; i <= 4; i++) if (r[i]) ri = 4'(i - 1);
    for (int j = 1; j <= 3; j++) if (c[j]) ci = 4'(j);
    if (ri == 4'd3)
      code = (ci == 4'd1) ? KEY_STAR : (ci == 4'd2) ? 4'd0 : KEY_HASH;
    else
      code = 4'((ri * 3) + ci);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q  <= 1'b0;
      last_key <= '0;
      count    <= '0;
    end else begin
      valid_q <= valid;
      if (valid && (!valid_q || code != last_key)) begin
        last_key <= code;
        count    <= count + 1'b1;
      end
    end
  end

  always_comb begin
    unique case (paddr)
      KP_KEY:   prdata = {valid_q, 3'b000, last_key};
      KP_COUNT: prdata = count;
      default:  prdata = '0;
    endcase
  end

  // The keypad has no writable register; write cycles are accepted and ignored.
  logic unused;
  assign unused = ^{psel, penable, pwrite, pwdata};

endmodule

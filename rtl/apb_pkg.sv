// apb_pkg: types and constants shared by the APB peripheral subsystem.
//
// The subsystem carries 8-bit addresses and 8-bit data (the widths of the
// top-level paddr, pwdata and prdata buses). The upper address nibble picks
// one of four slaves, the lower nibble a register inside it. The address map
// and every register layout below are this design's own choice; only the
// slaves and their select lines psel1..psel4 come from the block diagram.
package apb_pkg;

  localparam int unsigned ADDR_W = 8;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned NSLAVE = 4;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;

  // One bus request, as the host presents it and as the master drives it.
  typedef struct packed {
    logic  pwrite;
    addr_t paddr;
    data_t pwdata;
  } apb_req_t;

  // Slave index = paddr[7:4]; slot i is driven by psel(i+1).
  localparam logic [3:0] SLV_KEYPAD = 4'h0;  // psel1
  localparam logic [3:0] SLV_TIMER  = 4'h1;  // psel2
  localparam logic [3:0] SLV_SEVSEG = 4'h2;  // psel3
  localparam logic [3:0] SLV_UART   = 4'h3;  // psel4

  // Keypad decoder registers
  localparam logic [3:0] KP_KEY    = 4'h0;  // {pressed, 000, last_key[3:0]}
  localparam logic [3:0] KP_COUNT  = 4'h1;  // number of key presses seen

  // Timer registers
  localparam logic [3:0] TM_CTRL   = 4'h0;  // [0] enable, [1] auto-reload
  localparam logic [3:0] TM_LOAD   = 4'h1;  // reload value, also loads COUNT
  localparam logic [3:0] TM_COUNT  = 4'h2;  // current count (read only)
  localparam logic [3:0] TM_STATUS = 4'h3;  // [0] expired (write 1 to clear)

  // Seven segment decoder registers
  localparam logic [3:0] SS_DIGIT  = 4'h0;  // [3:0] hex digit
  localparam logic [3:0] SS_SEG    = 4'h1;  // [6:0] segments g..a (read only)

  // UART registers
  localparam logic [3:0] UA_TXDATA = 4'h0;  // write: send a byte
  localparam logic [3:0] UA_RXDATA = 4'h1;  // read: last byte received
  localparam logic [3:0] UA_STATUS = 4'h2;  // [0] tx_busy [1] rx_ready
                                            // [2] frame_err [3] rx_overrun
                                            // [4] tx_dropped; [4:1] write 1 to clear

  // Keypad codes for the 3x4 matrix (rows R1..R4, columns C1..C3).
  localparam logic [3:0] KEY_STAR = 4'hA;
  localparam logic [3:0] KEY_HASH = 4'hB;

endpackage

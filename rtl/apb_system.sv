// apb_system: APB controller integrated with four low-bandwidth peripherals.
//
// The host drives a bus request on pwrite, paddr and pwdata; the APB
// controller turns it into APB transfers (SETUP then ACCESS, two sys_clk
// cycles each) and returns read data on prdata. The address decoder routes
// psel to one of four slaves by paddr[7:4]:
//   0x0_ psel1  keypad decoder       (keypad lines C1..C3, R1..R4)
//   0x1_ psel2  timer
//   0x2_ psel3  seven segment decoder (segment pins seg)
//   0x3_ psel4  UART                  (serial pins uart_txd, uart_rxd)
// A clock divider makes the tick (one sys_clk cycle in CLK_DIV) that times
// the timer and the UART. Reads repeat continuously, so prdata follows the
// addressed register; a write is made once per change of the request.
//
// The blocks, their select lines and the pins sys_clk, preset_n, pwrite,
// C1..C3, R1..R4, paddr, pwdata and prdata follow the published design. The
// segment and serial pins are added here, since the display and the serial
// line must connect somewhere; so is the address map.
module apb_system
  import apb_pkg::*;
#(
  parameter int unsigned CLK_DIV = 326
) (
  input  logic       sys_clk,
  input  logic       preset_n,
  input  logic       pwrite,
  input  logic       C1,
  input  logic       C2,
  input  logic       C3,
  input  logic       R1,
  input  logic       R2,
  input  logic       R3,
  input  logic       R4,
  input  logic [7:0] paddr,
  input  logic [7:0] pwdata,
  output logic [7:0] prdata,
  output logic [6:0] seg,
  output logic       uart_txd,
  input  logic       uart_rxd
);

  apb_req_t             host_req, bus_req;
  logic                 psel, penable, xfer_done;
  logic [NSLAVE-1:0]    psel_s;
  data_t [NSLAVE-1:0]   prdata_s;
  data_t                prdata_bus;
  logic                 tick;
  logic                 timer_irq, uart_irq;

  assign host_req = '{pwrite: pwrite, paddr: paddr, pwdata: pwdata};

  apb_controller u_ctrl (
    .clk(sys_clk), .rst_n(preset_n),
    .host_req, .psel, .penable, .bus_req,
    .prdata_bus, .prdata, .xfer_done
  );

  apb_addr_decoder u_dec (
    .psel, .paddr(bus_req.paddr), .psel_s, .prdata_s, .prdata(prdata_bus)
  );

  clock_divider #(.DIV(CLK_DIV)) u_clkdiv (
    .clk(sys_clk), .rst_n(preset_n), .tick
  );

  keypad_decoder u_keypad (
    .clk(sys_clk), .rst_n(preset_n),
    .col({C3, C2, C1}), .row({R4, R3, R2, R1}),
    .psel(psel_s[SLV_KEYPAD[1:0]]), .penable, .pwrite(bus_req.pwrite),
    .paddr(bus_req.paddr[3:0]), .pwdata(bus_req.pwdata),
    .prdata(prdata_s[SLV_KEYPAD[1:0]])
  );

  apb_timer u_timer (
    .clk(sys_clk), .rst_n(preset_n), .tick,
    .psel(psel_s[SLV_TIMER[1:0]]), .penable, .pwrite(bus_req.pwrite),
    .paddr(bus_req.paddr[3:0]), .pwdata(bus_req.pwdata),
    .prdata(prdata_s[SLV_TIMER[1:0]]), .irq(timer_irq)
  );

  seven_seg_decoder u_sevseg (
    .clk(sys_clk), .rst_n(preset_n),
    .psel(psel_s[SLV_SEVSEG[1:0]]), .penable, .pwrite(bus_req.pwrite),
    .paddr(bus_req.paddr[3:0]), .pwdata(bus_req.pwdata),
    .prdata(prdata_s[SLV_SEVSEG[1:0]]), .seg
  );

  uart_apb u_uart (
    .clk(sys_clk), .rst_n(preset_n), .tick,
    .psel(psel_s[SLV_UART[1:0]]), .penable, .pwrite(bus_req.pwrite),
    .paddr(bus_req.paddr[3:0]), .pwdata(bus_req.pwdata),
    .prdata(prdata_s[SLV_UART[1:0]]),
    .rxd(uart_rxd), .txd(uart_txd), .irq(uart_irq)
  );

  // The interrupt lines and the transfer-done strobe have no pin on the
  // published pin list; their state is visible through the status registers.
  logic unused;
  assign unused = ^{timer_irq, uart_irq, xfer_done};

endmodule

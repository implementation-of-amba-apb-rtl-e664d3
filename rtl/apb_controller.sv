// apb_controller: the single APB master of the subsystem.
//
// The host presents a request on plain pins (pwrite, paddr, pwdata, all
// synchronous to clk). The controller runs the AMBA 2.0 APB transfer
// sequence IDLE -> SETUP -> ACCESS: in SETUP it asserts psel with the
// latched address, direction and write data; in ACCESS it also asserts
// penable, and the transfer completes at the end of that cycle. There is
// no pready, so every transfer takes exactly two clock cycles; when another
// transfer is due, ACCESS goes straight to SETUP (back-to-back transfers).
//
// When a transfer is due is this design's own rule, since the host pins
// carry no request strobe:
//   * a read is repeated for as long as the host asks for it, so prdata
//     follows the live register (keypad, timer count, status flags);
//   * a write is performed once each time the host request changes, so a
//     write with side effects (a UART byte) happens once.
// The host must hold a write request for at least two clk cycles: if the
// controller is in the SETUP cycle of a repeated read when the request
// arrives, it latches the request one cycle later. A shorter write may be
// missed. Read data is captured at the end of ACCESS and held on prdata
// until the next read completes.
//
// Interface: clk, rst_n (active low, asynchronous); host_req in;
// psel, penable, bus request out; prdata_bus in from the address decoder's
// read mux; prdata out; xfer_done pulses in the cycle after a transfer
// completes.
module apb_controller
  import apb_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  apb_req_t host_req,
  output logic     psel,
  output logic     penable,
  output apb_req_t bus_req,
  input  data_t    prdata_bus,
  output data_t    prdata,
  output logic     xfer_done
);

  typedef enum logic [1:0] {IDLE, SETUP, ACCESS} state_t;

  state_t   state, state_n;
  apb_req_t last_req;     // request of the last completed transfer
  logic     have_last;    // last_req is valid (cleared by reset)
  apb_req_t prev_req;     // the most recent transfer, done or finishing now
  logic     have_prev;
  logic     pending;

  // A read is always due; a write only when it differs from the most recent
  // transfer (the one in its ACCESS cycle counts as done).
  assign prev_req  = (state == ACCESS) ? bus_req : last_req;
  assign have_prev = (state == ACCESS) || have_last;
  assign pending   = !host_req.pwrite || !have_prev || (host_req != prev_req);

  always_comb begin
    state_n = state;
    unique case (state)
      IDLE:   if (pending) state_n = SETUP;
      SETUP:  state_n = ACCESS;
      ACCESS: state_n = pending ? SETUP : IDLE;
      default: state_n = IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      bus_req   <= '0;
      last_req  <= '0;
      have_last <= 1'b0;
      prdata    <= '0;
      xfer_done <= 1'b0;
    end else begin
      state     <= state_n;
      xfer_done <= (state == ACCESS);
      if (state_n == SETUP)
        bus_req <= host_req;
      if (state == ACCESS) begin
        last_req  <= bus_req;
        have_last <= 1'b1;
        if (!bus_req.pwrite)
          prdata <= prdata_bus;
      end
    end
  end

  assign psel    = (state == SETUP) || (state == ACCESS);
  assign penable = (state == ACCESS);

  // Protocol rules of the APB master.
  // penable is only asserted in the cycle after a SETUP cycle.
  a_enable_after_setup: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(penable) |-> $past(psel && !penable));
  // Address, direction and data hold from SETUP through ACCESS.
  a_stable_in_access: assert property (@(posedge clk) disable iff (!rst_n)
    penable |-> $stable(bus_req));
  // An ACCESS cycle lasts exactly one cycle (no wait states in APB 2.0).
  a_single_access: assert property (@(posedge clk) disable iff (!rst_n)
    penable |=> !penable);

endmodule

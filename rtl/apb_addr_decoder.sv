// apb_addr_decoder: slave select and read-data multiplexer of the APB bus.
//
// The upper nibble of paddr names the slave: 0 -> psel1 (keypad decoder),
// 1 -> psel2 (timer), 2 -> psel3 (seven segment decoder), 3 -> psel4 (UART).
// The master's psel is routed to that slave's select line and the slave's
// read data to prdata; any other address selects nothing and reads 0.
// Purely combinational. The four select lines follow the block diagram;
// the address map is this design's own choice.
module apb_addr_decoder
  import apb_pkg::*;
(
  input  logic                 psel,
  input  addr_t                paddr,
  output logic [NSLAVE-1:0]    psel_s,      // psel_s[0] = psel1 ... [3] = psel4
  input  data_t [NSLAVE-1:0]   prdata_s,
  output data_t                prdata
);

  logic [3:0] idx;
  assign idx = paddr[ADDR_W-1 -: 4];

  // The register offset is decoded inside each slave.
  logic unused_offset;
  assign unused_offset = ^paddr[ADDR_W-5:0];

  always_comb begin
    psel_s = '0;
    prdata = '0;
    if (idx < 4'(NSLAVE)) begin
      psel_s[idx[1:0]] = psel;
      prdata           = prdata_s[idx[1:0]];
    end
    // At most one slave is ever selected.
    a_onehot_sel: assert ((psel_s & (psel_s - 1'b1)) == '0);
  end

endmodule

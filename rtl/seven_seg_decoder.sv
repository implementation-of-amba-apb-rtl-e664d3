// seven_seg_decoder: APB slave (psel3) that drives a seven segment digit.
//
// A hex digit written over APB is held in a register and decoded into the
// pattern of the segments a..g (bit 0 = a ... bit 6 = g, 1 = segment lit,
// i.e. a common-cathode display); A, b, C, d, E, F are shown for 10..15.
// The register set and the segment polarity are this design's own choice;
// the published design names the decoder only.
//
// Registers (offset = paddr[3:0]):
//   0 DIGIT [3:0] digit to display       read/write
//   1 SEG   [6:0] current segment drive  read only
// seg takes the new pattern at the clock edge that ends the write's ACCESS cycle.
module seven_seg_decoder
  import apb_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       psel,
  input  logic       penable,
  input  logic       pwrite,
  input  logic [3:0] paddr,
  input  data_t      pwdata,
  output data_t      prdata,
  output logic [6:0] seg
);

  logic [3:0] digit;

  // Only the low nibble of a write is a digit.
  logic unused_hi;
  assign unused_hi = ^pwdata[7:4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      digit <= '0;
    else if (psel && penable && pwrite && paddr == SS_DIGIT)
      digit <= pwdata[3:0];
  end

  //        gfedcba
  always_comb begin
    unique case (digit)
      4'h0: seg = 7'b0111111;
      4'h1: seg = 7'b0000110;
      4'h2: seg = 7'b1011011;
      4'h3: seg = 7'b1001111;
      4'h4: seg = 7'b1100110;
      4'h5: seg = 7'b1101101;
      4'h6: seg = 7'b1111101;
      4'h7: seg = 7'b0000111;
      4'h8: seg = 7'b1111111;
      4'h9: seg = 7'b1101111;
      4'hA: seg = 7'b1110111;
      4'hB: seg = 7'b1111100;
      4'hC: seg = 7'b0111001;
      4'hD: seg = 7'b1011110;
      4'hE: seg = 7'b1111001;
      default: seg = 7'b1110001;
    endcase
  end

  always_comb begin
    unique case (paddr)
      SS_DIGIT: prdata = {4'b0, digit};
      SS_SEG:   prdata = {1'b0, seg};
      default:  prdata = '0;
    endcase
  end

endmodule

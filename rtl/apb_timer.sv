// apb_timer: APB slave (psel2), an 8-bit down-counting timer.
//
// The count decrements by one on every tick from the clock divider while
// the timer is enabled. When it steps from 1 to 0 the sticky expired flag is
// set and, in auto-reload mode, the count is reloaded from LOAD, so the
// timer expires every LOAD ticks. Without auto-reload it stops at 0.
// Writing LOAD also loads the count. The register set is this design's own
// choice; the published design names the timer only.
//
// Registers (offset = paddr[3:0]):
//   0 CTRL   [0] enable, [1] auto-reload              read/write
//   1 LOAD   reload value                             read/write
//   2 COUNT  current count                            read only
//   3 STATUS [0] expired, write 1 to clear            read/write-1-clear
// A write takes effect at the end of the APB ACCESS cycle. irq mirrors the
// expired flag.
module apb_timer
  import apb_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,
  input  logic       psel,
  input  logic       penable,
  input  logic       pwrite,
  input  logic [3:0] paddr,
  input  data_t      pwdata,
  output data_t      prdata,
  output logic       irq
);

  logic  en, reload;
  data_t load, count;
  logic  expired;
  logic  wr;

  assign wr = psel && penable && pwrite;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en      <= 1'b0;
      reload  <= 1'b0;
      load    <= '0;
      count   <= '0;
      expired <= 1'b0;
    end else begin
      if (tick && en && count != '0) begin
        count <= count - 1'b1;
        if (count == data_t'(1)) begin
          expired <= 1'b1;
          if (reload) count <= load;
        end
      end
      if (wr) begin
        unique case (paddr)
          TM_CTRL:   {reload, en} <= pwdata[1:0];
          TM_LOAD:   begin load <= pwdata; count <= pwdata; end
          TM_STATUS: if (pwdata[0]) expired <= 1'b0;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (paddr)
      TM_CTRL:   prdata = {6'b0, reload, en};
      TM_LOAD:   prdata = load;
      TM_COUNT:  prdata = count;
      TM_STATUS: prdata = {7'b0, expired};
      default:   prdata = '0;
    endcase
  end

  assign irq = expired;

endmodule

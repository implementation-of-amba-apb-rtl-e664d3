// tb_event_monitor: bound into the clock divider, the timer and the UART;
// counts rising edges of one event line and notes the cycle of each.
module tb_event_monitor #(
  parameter int KIND = 0   // 0 divider tick, 1 timer expiry, 2 UART send, 3 UART receive
) (
  input logic clk,
  input logic rst_n,
  input logic ev
);
  import tb_sys_counters::*;
  logic prev = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (KIND == 0) cyc++;
    if (ev && (!prev || KIND == 0)) begin
      case (KIND)
        0: n_tick++;
        1: begin n_expire++; t_exp.push_back(cyc); end
        2: n_txframe++;
        default: n_rxbyte++;
      endcase
    end
    prev <= ev;
  end
endmodule

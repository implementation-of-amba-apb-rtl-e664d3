// tb_apb_system_random: random host traffic through the whole subsystem.
//
// The testbench issues a long random mix of writes and reads to the
// read/write registers that do not start an external action (display
// digit, timer LOAD and CTRL with the timer kept disabled, and the
// read-only and unmapped addresses), changing the host pins at random
// intervals of 2 to 6 cycles. A reference model of the registers, kept
// here, predicts every read and the segment pins, so every write must land
// once and every read must return the addressed register.
module tb_apb_system_random;
  logic sys_clk = 0, preset_n = 0;
  logic pwrite = 0;
  logic C1 = 0, C2 = 0, C3 = 0, R1 = 0, R2 = 0, R3 = 0, R4 = 0;
  logic [7:0] paddr = 0, pwdata = 0, prdata;
  logic [6:0] seg;
  logic uart_txd, uart_rxd;
  int checks = 0, failures = 0;

  assign uart_rxd = 1'b1;

  apb_system dut (.*);

  always #5 sys_clk = ~sys_clk;

  // Reference registers.
  logic [3:0] m_digit = 0;
  logic [7:0] m_load = 0;
  logic [1:0] m_ctrl = 0;

  function automatic logic [6:0] seg_of(input logic [3:0] d);
    logic [6:0] t [16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                           7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};
    return t[d];
  endfunction

  function automatic logic [7:0] model_read(input logic [7:0] a);
    case (a)
      8'h00: return 8'h00;            // no key
      8'h01: return 8'h00;            // no presses
      8'h10: return {6'b0, m_ctrl};
      8'h11: return m_load;
      8'h12: return m_load;           // timer kept disabled
      8'h13: return 8'h00;
      8'h20: return {4'h0, m_digit};
      8'h21: return {1'b0, seg_of(m_digit)};
      8'h30: return 8'h00;            // nothing sent
      8'h31: return 8'h00;
      8'h32: return 8'h00;
      default: return 8'h00;
    endcase
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam logic [7:0] RADDR [12] = '{8'h00, 8'h01, 8'h10, 8'h11, 8'h12, 8'h13,
                                       8'h20, 8'h21, 8'h30, 8'h31, 8'h32, 8'h77};

  initial begin
    repeat (200000) @(posedge sys_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nwr, nrd;
    nwr = 0;
    nrd = 0;
    repeat (3) @(posedge sys_clk);
    // Reset request is a read of address 0.
    preset_n = 1;
    repeat (5) @(posedge sys_clk);
    for (int k = 0; k < 3000; k++) begin
      int kind;
      kind = $urandom_range(0, 9);
      @(negedge sys_clk);
      if (kind < 4) begin
        // Write one of the model registers. The request is held for
        // 2..6 cycles (the shortest hold the controller is sure to see),
        // then replaced by a read of the same register.
        logic [7:0] a, d;
        int hold;
        case ($urandom_range(0, 2))
          0: a = 8'h20;
          1: a = 8'h11;
          default: a = 8'h10;
        endcase
        d = 8'($urandom);
        if (a == 8'h10) d[0] = 1'b0;   // keep the timer disabled
        pwrite = 1; paddr = a; pwdata = d;
        hold = $urandom_range(2, 6);
        repeat (hold) @(negedge sys_clk);
        pwrite = 0;
        // Once the pins are a read, the pending write has finished within
        // three more edges; update the model then.
        repeat (3) @(negedge sys_clk);
        case (a)
          8'h20: m_digit = d[3:0];
          8'h11: m_load = d;
          default: m_ctrl = d[1:0];
        endcase
        nwr++;
      end else begin
        logic [7:0] a;
        a = RADDR[$urandom_range(0, 11)];
        pwrite = 0; paddr = a;
        repeat (5) @(negedge sys_clk);
        check(prdata == model_read(a),
              $sformatf("read %h: got %h expected %h", a, prdata, model_read(a)));
        nrd++;
      end
      check(seg == seg_of(m_digit), "segment pins follow the digit");
    end
    $display("random traffic: %0d writes, %0d reads", nwr, nrd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_apb_addr_decoder: exhaustive test of the slave select and read mux.
//
// For every address and both psel values, the expected select vector and
// read data are worked out from the address map (paddr[7:4] = slave index
// 0..3, anything else selects nothing and reads 0) and compared.
module tb_apb_addr_decoder;
  import apb_pkg::*;

  logic               psel;
  addr_t              paddr;
  logic [NSLAVE-1:0]  psel_s;
  data_t [NSLAVE-1:0] prdata_s;
  data_t              prdata;
  int checks = 0, failures = 0;

  apb_addr_decoder dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++) prdata_s[s] = 8'(8'h11 * (s + 1) + 8'h40);
    for (int a = 0; a < 256; a++) begin
      for (int p = 0; p < 2; p++) begin
        logic [3:0] exp_sel;
        data_t      exp_rd;
        psel  = p[0];
        paddr = 8'(a);
        exp_sel = 4'b0000;
        exp_rd  = 8'h00;
        case (a / 16)
          0: begin exp_sel = {3'b000, p[0]}; exp_rd = 8'h51; end
          1: begin exp_sel = {2'b00, p[0], 1'b0}; exp_rd = 8'h62; end
          2: begin exp_sel = {1'b0, p[0], 2'b00}; exp_rd = 8'h73; end
          3: begin exp_sel = {p[0], 3'b000}; exp_rd = 8'h84; end
          default: ;
        endcase
        #1;
        checks++;
        if (psel_s !== exp_sel || prdata !== exp_rd) begin
          failures++;
          $display("FAIL: paddr=%h psel=%b sel=%b rd=%h", paddr, psel, psel_s, prdata);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

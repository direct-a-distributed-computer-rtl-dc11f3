// tb_addr_reg: checks the address register and byte-slot strobes against an
// independent cycle count: the address steps by one every BYTE_CLKS cycles,
// wraps at the page size, and each strobe fires at its phase.
module tb_addr_reg;
  localparam int unsigned PB = 16, BC = 12;
  logic clk = 0, rst_n = 0;
  logic [3:0] addr;
  logic slot_load, shift_en, slot_cap, slot_end;
  int checks = 0, failures = 0;

  addr_reg #(.PAGE_BYTES(PB), .BYTE_CLKS(BC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 3 * PB * BC + 7; cyc++) begin
      int ph, a;
      ph = cyc % BC;
      a  = (cyc / BC) % PB;
      #1;
      checks++;
      if (addr != 4'(a) || slot_load != (ph == 0) || shift_en != (ph >= 1 && ph <= 8) ||
          slot_cap != (ph == 9) || slot_end != (ph == BC - 1)) begin
        failures++;
        $display("mismatch cycle %0d: addr=%0d exp %0d ph=%0d strobes %b%b%b%b", cyc, addr, a, ph,
                 slot_load, shift_en, slot_cap, slot_end);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

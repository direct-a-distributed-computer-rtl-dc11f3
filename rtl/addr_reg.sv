// addr_reg: the common address register and byte-slot timer of the CCD page
// frames.
//
// All page frames are stepped by one clock and one address register names the
// byte that every frame presents at the moment; the register counts up by one
// per byte and wraps at the page size (the document's 14-bit register, +1).
// Each byte period ("slot") is BYTE_CLKS cycles of the bit clock clk:
//   phase 0        every frame loads mem[addr] into its read shift register and
//                  every writing port loads its byte into its write shift register
//   phases 1..8    the eight bits cross the 1-bit switch (shift_en)
//   phase 9        query-processor side read shift registers hold the byte (capture)
//   last phase     frames whose WRITE line is high store the byte (slot_end);
//                  the address then advances.
// The 750 ns byte time of the document is kept with the default BYTE_CLKS = 30
// at a 25 ns bit clock (the document's shift registers run up to 1 bit/20 ns);
// that clock choice is this design's. BYTE_CLKS must be at least 10.
// Reset clears the address and the phase.
module addr_reg #(
  parameter int unsigned PAGE_BYTES = 16384,
  parameter int unsigned BYTE_CLKS  = 30,
  localparam int unsigned AW = $clog2(PAGE_BYTES),
  localparam int unsigned PW = $clog2(BYTE_CLKS)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [AW-1:0] addr,       // byte now available from every frame
  output logic          slot_load,  // phase 0
  output logic          shift_en,   // phases 1..8
  output logic          slot_cap,   // phase 9
  output logic          slot_end    // last phase
);

  logic [PW-1:0] ph;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph   <= '0;
      addr <= '0;
    end else if (ph == PW'(BYTE_CLKS - 1)) begin
      ph <= '0;
      if (addr == AW'(PAGE_BYTES - 1)) addr <= '0;
      else                             addr <= addr + 1'b1;
    end else begin
      ph <= ph + 1'b1;
    end
  end

  always_comb begin
    slot_load = (ph == '0);
    shift_en  = (ph >= PW'(1)) && (ph <= PW'(8));
    slot_cap  = (ph == PW'(9));
    slot_end  = (ph == PW'(BYTE_CLKS - 1));
  end

  initial begin
    assert (BYTE_CLKS >= 10) else $error("addr_reg: BYTE_CLKS must be at least 10");
  end

endmodule

// ccd_page_frame: one CCD page frame of the associative memory, with the two
// shift registers that join it to the 1-bit cross-point switch.
//
// The document builds a frame from eight CCD chips that store one bit of each
// byte and are stepped by a clock common to all frames, so the frame needs no
// address lines of its own: the shared address register (addr_reg) names the
// byte it presents. Here the chips are one byte-wide array indexed by that
// address, which gives the same sequence of bytes. Per byte slot:
//   slot_load : mem[addr] is copied into the read shift register (piso_sr);
//               its bits then leave on sout during the next eight shift_en cycles.
//   shift_en  : the write shift register (sipo_sr) takes one bit from sin.
//   slot_end  : if the WRITE line is high, the gathered byte is stored at addr.
// A byte read and a byte written in the same slot refer to the same address;
// the read sees the old value. The array is not reset; a page is defined once
// it has been written (paged in). Sizes: PAGE_BYTES = 16384 as in the document.
module ccd_page_frame #(
  parameter int unsigned PAGE_BYTES = 16384,
  localparam int unsigned AW = $clog2(PAGE_BYTES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] addr,
  input  logic          slot_load,
  input  logic          shift_en,
  input  logic          slot_end,
  output logic          sout,   // serial data towards the switch
  input  logic          sin,    // serial data from the switch (OR of writers)
  input  logic          write   // WRITE line (OR of the ports' decoders)
);

  logic [7:0] mem [PAGE_BYTES];
  logic [7:0] wr_byte;

  always_ff @(posedge clk) begin
    if (slot_end && write) mem[addr] <= wr_byte;
  end

  // The read shift register takes mem[addr] at slot_load: together they form
  // the frame's synchronous read port.
  piso_sr #(.W(8)) u_rd_sr (
    .clk, .rst_n,
    .load (slot_load),
    .shift(shift_en),
    .din  (mem[addr]),
    .sout (sout)
  );

  sipo_sr #(.W(8)) u_wr_sr (
    .clk, .rst_n,
    .shift(shift_en),
    .sin  (sin),
    .dout (wr_byte)
  );

endmodule

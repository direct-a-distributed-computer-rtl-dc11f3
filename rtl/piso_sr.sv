// piso_sr: 8-bit parallel-in/serial-out shift register (the document's
// parallel-to-serial converter, an AM25LS299 type part).
//
// load copies din into the register; shift moves it one place towards the
// most significant end, so the byte leaves most significant bit first on
// sout, which is always the top bit. load wins over shift. The bit order is a
// choice of this design. Reset clears the register.
module piso_sr #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         shift,
  input  logic [W-1:0] din,
  output logic         sout
);

  logic [W-1:0] q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (load)  q <= din;
    else if (shift) q <= {q[W-2:0], 1'b0};
  end

  assign sout = q[W-1];

endmodule

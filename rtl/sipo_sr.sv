// sipo_sr: 8-bit serial-in/parallel-out shift register (the document's
// serial-to-parallel converter, an AM25LS164 type part).
//
// On each cycle with shift high, sin enters at the least significant end and
// the rest moves up one place, so after eight shifts dout holds a byte that was
// sent most significant bit first. Reset clears the register.
module sipo_sr #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic         sin,
  output logic [W-1:0] dout
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     dout <= '0;
    else if (shift) dout <= {dout[W-2:0], sin};
  end

endmodule

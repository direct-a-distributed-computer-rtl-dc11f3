// tb_sipo_sr: shifts random bytes in most significant bit first and checks
// the parallel output after eight shifts, and that it holds without shift.
module tb_sipo_sr;
  logic clk = 0, rst_n = 0, shift = 0, sin = 0;
  logic [7:0] dout;
  int checks = 0, failures = 0;

  sipo_sr #(.W(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      logic [7:0] b;
      b = 8'($urandom);
      for (int i = 7; i >= 0; i--) begin
        @(negedge clk); sin = b[i]; shift = 1;
      end
      @(negedge clk); shift = 0; sin = 1'($urandom);
      checks++;
      if (dout != b) begin failures++; $display("sent %h got %h", b, dout); end
      @(negedge clk);
      checks++; if (dout != b) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_piso_sr: loads random bytes and checks that they leave most significant
// bit first, one bit per shift, and that the register holds without shift.
module tb_piso_sr;
  logic clk = 0, rst_n = 0, load = 0, shift = 0, sout;
  logic [7:0] din = 0;
  int checks = 0, failures = 0;

  piso_sr #(.W(8)) dut (.*);
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
      logic [7:0] b, got;
      b = 8'($urandom);
      @(negedge clk); din = b; load = 1; shift = 1;  // load wins
      @(negedge clk); load = 0; shift = 0;
      // a hold cycle changes nothing
      @(negedge clk);
      checks++; if (sout != b[7]) failures++;
      for (int i = 7; i >= 0; i--) begin
        got[i] = sout;
        shift = 1;
        @(negedge clk);
      end
      shift = 0;
      checks++;
      if (got != b) begin failures++; $display("sent %h got %h", b, got); end
      checks++; if (sout != 1'b0) failures++;  // zeros follow the byte
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

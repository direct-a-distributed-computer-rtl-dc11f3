// tb_xpoint_switch: random selects, enables and serial data on a 3-port by
// 4-frame switch (the document's 2x4 figure plus one port), checked against a
// reference worked out from the selector / decoder / AND-OR description.
module tb_xpoint_switch;
  localparam int unsigned NP = 3, NF = 4;
  logic clk = 0, slot_end = 0;
  logic [NP-1:0][1:0] rd_sel, wr_sel;
  logic [NP-1:0] wr_en, port_tx, port_rx;
  logic [NF-1:0] frame_sout, frame_sin, frame_write;
  int checks = 0, failures = 0;

  xpoint_switch #(.NPORTS(NP), .NFRAMES(NF)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [NP-1:0] erx;
      logic [NF-1:0] esin, ewr;
      @(negedge clk);
      wr_sel = (NP*2)'($urandom);
      wr_en = NP'($urandom); port_tx = NP'($urandom); frame_sout = NF'($urandom);
      rd_sel = (NP*2)'($urandom);
      #1;
      esin = '0; ewr = '0;
      for (int p = 0; p < NP; p++) begin
        erx[p] = frame_sout[rd_sel[p]];
        if (wr_en[p]) begin
          ewr[wr_sel[p]] = 1'b1;
          if (port_tx[p]) esin[wr_sel[p]] = 1'b1;
        end
      end
      checks++;
      if (port_rx != erx || frame_sin != esin || frame_write != ewr) begin
        failures++;
        $display("rx %b/%b sin %b/%b wr %b/%b", port_rx, erx, frame_sin, esin, frame_write, ewr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ccd_page_frame: writes a page of random bytes into one frame bit by bit,
// as the switch would, then reads it back serially over two turns of the
// address register; a third turn sends data with WRITE low on some bytes and
// checks that only the written bytes change.
module tb_ccd_page_frame;
  localparam int unsigned PB = 16, BC = 10;
  logic clk = 0, rst_n = 0;
  logic [3:0] addr;
  logic slot_load, shift_en, slot_cap, slot_end;
  logic sout, sin = 0, write = 0;
  logic [7:0] model [PB];
  int checks = 0, failures = 0;

  addr_reg #(.PAGE_BYTES(PB), .BYTE_CLKS(BC)) u_addr (.*);
  ccd_page_frame #(.PAGE_BYTES(PB)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one byte slot: send wb serially (if wr), collect the read byte
  task automatic slot(input logic wr, input logic [7:0] wb, output logic [7:0] rb,
                      output logic [3:0] a);
    // we are at the negedge inside phase 0
    a = addr;
    write = wr;
    for (int i = 7; i >= 0; i--) begin
      @(negedge clk);           // phases 1..8
      sin   = wb[i];
      rb[i] = sout;
    end
    repeat (BC - 8) @(negedge clk);  // through the last phase to phase 0
    write = 0;
  endtask

  initial begin
    logic [7:0] rb, wb;
    logic [3:0] a;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    while (!slot_load) @(negedge clk);
    // turn 1: write everything
    for (int n = 0; n < PB; n++) begin
      wb = 8'($urandom);
      slot(1'b1, wb, rb, a);
      model[a] = wb;
    end
    // turns 2 and 3: read back; in turn 3 write only odd addresses
    for (int n = 0; n < 2 * PB; n++) begin
      logic wr;
      wb = 8'($urandom);
      wr = (n >= PB) && addr[0];
      slot(wr, wb, rb, a);
      checks++;
      if (rb != model[a]) begin
        failures++;
        $display("addr %0d read %h expected %h", a, rb, model[a]);
      end
      if (wr) model[a] = wb;
    end
    // turn 4: read back the mixed page
    for (int n = 0; n < PB; n++) begin
      slot(1'b0, 8'hff, rb, a);
      checks++;
      if (rb != model[a]) begin
        failures++;
        $display("addr %0d read %h expected %h", a, rb, model[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

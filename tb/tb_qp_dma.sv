// tb_qp_dma: one DMA port wired through a one-port switch to two page frames.
// Checks: a full-page write that starts at once (cmd_any) and wraps round the
// page; a read that waits for its starting address and then delivers each
// byte in its own address slot, one byte per BYTE_CLKS cycles; a zero-latency
// full-page read; a partial write at a given address into the second frame,
// read back. Expected bytes come from a reference pattern kept in the bench.
module tb_qp_dma;
  localparam int unsigned PB = 32, BC = 12, NF = 2;
  logic clk = 0, rst_n = 0;
  logic [4:0] addr;
  logic slot_load, shift_en, slot_cap, slot_end;
  logic cmd_valid = 0, cmd_ready, cmd_write = 0, cmd_any = 0, done;
  logic [0:0] cmd_frame = 0;
  logic [4:0] cmd_start = 0;
  logic [5:0] cmd_count = 0;
  logic rd_valid, wr_take;
  logic [4:0] rd_addr;
  logic [7:0] rd_data, wr_data;
  logic [0:0] rd_sel, wr_sel;
  logic wr_en, tx, rx;
  logic [NF-1:0] frame_sout, frame_sin, frame_write;
  logic [7:0] model [NF][PB];
  logic [7:0] src [PB];
  int checks = 0, failures = 0;
  longint cyc = 0;

  addr_reg #(.PAGE_BYTES(PB), .BYTE_CLKS(BC)) u_addr (.*);
  qp_dma #(.PAGE_BYTES(PB), .NFRAMES(NF)) dut (.*);
  xpoint_switch #(.NPORTS(1), .NFRAMES(NF)) u_sw (
    .clk, .slot_end, .rd_sel, .wr_sel, .wr_en, .port_tx(tx), .port_rx(rx),
    .frame_sout, .frame_sin, .frame_write);
  for (genvar f = 0; f < NF; f++) begin : g_f
    ccd_page_frame #(.PAGE_BYTES(PB)) u_fr (
      .clk, .rst_n, .addr, .slot_load, .shift_en, .slot_end,
      .sout(frame_sout[f]), .sin(frame_sin[f]), .write(frame_write[f]));
  end

  assign wr_data = src[addr];
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(input logic wr, input int fr, input int start, input logic any, input int cnt);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd_write = wr; cmd_frame = 1'(fr); cmd_start = 5'(start);
    cmd_any = any; cmd_count = 6'(cnt);
    @(negedge clk);
    cmd_valid = 0;
  endtask

  // collect a read of cnt bytes, checking data, address order and spacing
  task automatic collect(input int fr, input int first, input int cnt, input logic check_first);
    longint last_cyc;
    int exp_a, n;
    n = 0;
    exp_a = first;
    while (n < cnt) begin
      @(posedge clk); #1;
      if (rd_valid) begin
        checks++;
        if (check_first || n > 0) begin
          if (rd_addr != 5'(exp_a)) begin failures++; $display("read addr %0d exp %0d", rd_addr, exp_a); end
        end
        if (rd_data != model[fr][rd_addr]) begin
          failures++; $display("frame %0d addr %0d read %h exp %h", fr, rd_addr, rd_data, model[fr][rd_addr]);
        end
        // the byte is handed over inside its own address slot
        checks++; if (addr != rd_addr) begin failures++; $display("late byte"); end
        if (n > 0) begin
          checks++;
          if (cyc - last_cyc != BC) begin failures++; $display("byte spacing %0d", cyc - last_cyc); end
        end
        last_cyc = cyc;
        exp_a = (int'(rd_addr) + 1) % PB;
        n++;
      end
    end
  endtask

  initial begin
    int takes;
    longint t0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // 1. full-page write into frame 0, starting at once
    for (int a = 0; a < PB; a++) begin src[a] = 8'(a * 7 + 3); model[0][a] = src[a]; end
    issue(1'b1, 0, 0, 1'b1, PB);
    takes = 0;
    t0 = cyc;
    while (!done) begin @(posedge clk); #1; if (wr_take) takes++; end
    checks++; if (takes != PB) begin failures++; $display("wr_take %0d", takes); end
    // a page takes one turn of the address register, plus at most one slot
    checks++; if (cyc - t0 > (PB + 1) * BC) begin failures++; $display("write took %0d", cyc - t0); end

    // 2. read 5 bytes from address 20: waits for the address register
    issue(1'b0, 0, 20, 1'b0, 5);
    collect(0, 20, 5, 1'b1);
    @(posedge clk); #1;
    checks++; if (!cmd_ready) begin failures++; $display("not idle after read"); end

    // 3. zero-latency full-page read: first byte within one slot
    t0 = cyc;
    fork
      issue(1'b0, 0, 0, 1'b1, PB);
      collect(0, 0, PB, 1'b0);
      begin
        while (!rd_valid) @(posedge clk);
        checks++;
        if (cyc - t0 > 2 * BC + 2) begin failures++; $display("first byte after %0d", cyc - t0); end
      end
    join

    // 4. partial write at address 5 into frame 1, then read that frame
    for (int a = 0; a < PB; a++) begin src[a] = 8'($urandom); model[1][a] = 8'hxx; end
    issue(1'b1, 1, 5, 1'b0, PB);   // fill the whole page, starting at address 5
    while (!done) @(posedge clk);
    for (int a = 0; a < PB; a++) model[1][a] = src[a];
    for (int a = 0; a < PB; a++) src[a] = ~src[a];
    issue(1'b1, 1, 9, 1'b0, 4);    // overwrite addresses 9..12
    while (!done) @(posedge clk);
    for (int a = 9; a < 13; a++) model[1][a] = src[a];
    issue(1'b0, 1, 3, 1'b0, PB);
    collect(1, 3, PB, 1'b1);
    // frame 0 untouched
    issue(1'b0, 0, 0, 1'b1, PB);
    collect(0, 0, PB, 1'b0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

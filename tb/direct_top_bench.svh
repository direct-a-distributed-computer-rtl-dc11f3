// Body shared by the end-to-end benches of direct_top. The including module
// sets NQP, NF, PB, BC, NREL, NPAGES, NPKT (the top's sizes), R_PAGES (pages of
// the source relation) and WATCHDOG (cycles), and instantiates nothing else.
  localparam int unsigned AW = $clog2(PB);
  localparam int unsigned FW = $clog2(NF);
  localparam int unsigned TPP = (PB - 2) / 4;   // tuples per page
  localparam int REL_R = 1, REL_T = 2;

  logic clk = 0, rst_n = 0;
  logic [AW-1:0] addr;
  logic cfg_valid = 0, cfg_temp = 0, cfg_keep = 0;
  logic [REL_W-1:0] cfg_rel = 0;
  logic [PAGE_W:0] cfg_npages = 0;
  ctl_req_t [NQP-1:0] qp_req;
  ctl_rep_t [NQP-1:0] qp_rep;
  logic [NQP-1:0] qp_cmd_valid, qp_cmd_ready, qp_cmd_write, qp_cmd_any, qp_done;
  logic [NQP-1:0][FW-1:0] qp_cmd_frame;
  logic [NQP-1:0][AW-1:0] qp_cmd_start;
  logic [NQP-1:0][AW:0] qp_cmd_count;
  logic [NQP-1:0] qp_rd_valid, qp_wr_take;
  logic [NQP-1:0][AW-1:0] qp_rd_addr;
  logic [NQP-1:0][7:0] qp_rd_data, qp_wr_data;
  logic ms_active, ms_out, ms_rd_valid, ms_wr_take;
  logic [REL_W+PAGE_W-1:0] ms_disk;
  logic [AW-1:0] ms_rd_addr;
  logic [7:0] ms_rd_data, ms_wr_data;
  logic ev_fault, ev_evict, ev_writeback, ev_newpage, ev_lockwait, ev_noframe, ev_eor, ev_prefetch;

  int checks = 0, failures = 0;
  int n_pf = 0, n_fault = 0, n_evict = 0, n_wb = 0, n_new = 0, n_wait = 0, n_eor = 0;
  int n_any = 0, n_match = 0, n_shared = 0, n_tpages = 0;
  int n_scan = 0, scan_max = 0;   // whole-page reads and the longest one, in clocks

  logic [7:0] disk [int];                 // key: disk address * PB + byte
  logic [7:0] wbuf [NQP][PB];             // bytes a processor writes
  logic [7:0] rbuf [NQP][PB];             // bytes a processor read
  logic [NQP-1:0][FW-1:0] cur_rd_frame;
  int unsigned expect_q[$], got_q[$];

`ifdef DIRECT_FULL_SIZE
  direct_top dut (.*);
`else
  direct_top #(.NQP(NQP), .NFRAMES(NF), .PAGE_BYTES(PB), .BYTE_CLKS(BC),
               .NREL(NREL), .NPAGES(NPAGES), .NPKT(NPKT)) dut (.*);
`endif

  always #5 clk = ~clk;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- disk
  always_comb ms_wr_data = disk.exists(int'(ms_disk) * PB + int'(addr)) ? disk[int'(ms_disk) * PB + int'(addr)] : 8'h00;
  always @(posedge clk) if (ms_rd_valid) disk[int'(ms_disk) * PB + int'(ms_rd_addr)] = ms_rd_data;

  // ---------------- processors' write data
  always_comb for (int k = 0; k < NQP; k++) qp_wr_data[k] = wbuf[k][addr];

  // ---------------- event counts
  always @(posedge clk) if (rst_n) begin
    n_fault += int'(ev_fault); n_evict += int'(ev_evict); n_wb += int'(ev_writeback);
    n_new += int'(ev_newpage); n_wait += int'(ev_lockwait); n_eor += int'(ev_eor); n_pf += int'(ev_prefetch);
    for (int a = 0; a < NQP; a++)
      for (int b = a + 1; b < NQP; b++)
        if (qp_rd_valid[a] && qp_rd_valid[b] && cur_rd_frame[a] == cur_rd_frame[b]) n_shared++;
  end

  // ---------------- processor helpers
  task automatic ctl(input int k, input ctl_op_e op, input int pkt, input int r, input int pg,
                     input lock_val_e lv, output ctl_rep_t rp);
    @(negedge clk);
    qp_req[k].req_valid = 1; qp_req[k].op = op; qp_req[k].pkt = PKT_W'(pkt);
    qp_req[k].rel = REL_W'(r); qp_req[k].page = PAGE_W'(pg); qp_req[k].lock_val = lv;
    do @(posedge clk); while (!qp_rep[k].rep_valid);
    rp = qp_rep[k];
    @(negedge clk); qp_req[k].req_valid = 0;
  endtask

  task automatic dma(input int k, input logic wr, input int fr, input int start, input logic any, input int cnt);
    int cyc;
    @(negedge clk);
    while (!qp_cmd_ready[k]) @(negedge clk);
    qp_cmd_valid[k] = 1; qp_cmd_write[k] = wr; qp_cmd_frame[k] = FW'(fr);
    qp_cmd_start[k] = AW'(start); qp_cmd_any[k] = any; qp_cmd_count[k] = (AW+1)'(cnt);
    if (!wr) cur_rd_frame[k] = FW'(fr);
    if (any) n_any++; else n_match++;
    @(negedge clk); qp_cmd_valid[k] = 0;
    cyc = 1;
    do begin
      @(posedge clk);
      cyc++;
      if (qp_rd_valid[k]) rbuf[k][qp_rd_addr[k]] = qp_rd_data[k];
    end while (!qp_done[k]);
    // a whole page read from any address takes one page time, give or take
    // the wait for the next byte slot
    if (!wr && any && cnt == PB) begin
      n_scan++;
      checks++;
      if (cyc < (PB - 1) * BC || cyc > (PB + 1) * BC) begin
        failures++; $display("page read took %0d clocks", cyc);
      end
      if (cyc > scan_max) scan_max = cyc;
    end
  endtask

  function automatic int count_of(input int k);
    return int'(rbuf[k][0]) * 256 + int'(rbuf[k][1]);
  endfunction

  function automatic int unsigned tuple_of(input int k, input int i);
    return {rbuf[k][2+4*i], rbuf[k][3+4*i], rbuf[k][4+4*i], rbuf[k][5+4*i]};
  endfunction

  // write the processor's pending temporary page (wbuf) to frame fr
  task automatic flush(input int k, input int fr, input int n);
    wbuf[k][0] = 8'(n / 256); wbuf[k][1] = 8'(n);
    dma(k, 1'b1, fr, 0, 1'b1, PB);
  endtask

  // RESTRICT(R, key < 100) into T, as in the query processor algorithm
  task automatic restrict_qp(input int k, input int pkt);
    ctl_rep_t tp, rp;
    int tn;
    ctl(k, OP_NEXTPAGE, pkt, REL_T, 0, LV_RETRIEVE, tp);
    n_tpages++;
    tn = 0;
    forever begin
      ctl(k, OP_NEXTPAGE, pkt, REL_R, 0, LV_RETRIEVE, rp);
      if (rp.eor) break;
      dma(k, 1'b0, int'(rp.frame), 0, 1'b1, PB);
      for (int i = 0; i < count_of(k); i++) begin
        int unsigned t;
        t = tuple_of(k, i);
        if (t[31:24] < 8'd100) begin
          if (tn == TPP) begin
            flush(k, int'(tp.frame), tn);
            ctl(k, OP_NEXTPAGE, pkt, REL_T, 0, LV_RETRIEVE, tp);
            n_tpages++;
            tn = 0;
          end
          {wbuf[k][2+4*tn], wbuf[k][3+4*tn], wbuf[k][4+4*tn], wbuf[k][5+4*tn]} = t;
          tn++;
        end
      end
    end
    flush(k, int'(tp.frame), tn);
  endtask

  // read the n_tpages pages of T under packet pkt into got (if keep); the
  // page count is what the RESTRICT processors report when they finish (a
  // GETPAGE past the end of a temporary relation would add a page)
  task automatic scan_temp(input int k, input int pkt, input logic keep);
    ctl_rep_t rp;
    for (int pg = 0; pg < n_tpages; pg++) begin
      ctl(k, OP_GETPAGE, pkt, REL_T, pg, LV_RETRIEVE, rp);
      checks++; if (rp.eor) begin failures++; $display("temporary page %0d missing", pg); end
      dma(k, 1'b0, int'(rp.frame), 0, 1'b1, PB);
      if (keep) for (int i = 0; i < count_of(k); i++) got_q.push_back(tuple_of(k, i));
    end
    ctl(k, OP_RELEASE, pkt, REL_T, 0, LV_RETRIEVE, rp);
  endtask

  localparam int unsigned NEW_TUPLE = 32'h2A_C0FFEE;
  int ins_page;

  // INSERT(R, NEW_TUPLE): last page, or a new page after it if full
  task automatic insert_qp(input int k, input int pkt);
    ctl_rep_t rp;
    int n;
    ctl(k, OP_GETPAGE, pkt, REL_R, R_PAGES - 1, LV_UPDATE, rp);
    dma(k, 1'b0, int'(rp.frame), 0, 1'b1, PB);
    n = count_of(k);
    if (n == TPP) begin
      ctl(k, OP_NEXTPAGE, pkt, REL_R, 0, LV_UPDATE, rp);
      n = 0;
    end
    ins_page = int'(rp.page);
    {wbuf[k][2+4*n], wbuf[k][3+4*n], wbuf[k][4+4*n], wbuf[k][5+4*n]} = NEW_TUPLE;
    dma(k, 1'b1, int'(rp.frame), 2 + 4 * n, 1'b0, 4);   // the tuple, at its address
    wbuf[k][0] = 8'((n + 1) / 256); wbuf[k][1] = 8'(n + 1);
    dma(k, 1'b1, int'(rp.frame), 0, 1'b0, 2);            // the count
    ctl(k, OP_RELEASE, pkt, REL_R, 0, LV_RETRIEVE, rp);
  endtask

  initial begin
    ctl_rep_t rp;
    qp_req = '0; qp_cmd_valid = '0; qp_cmd_write = '0; qp_cmd_any = '0;
    qp_cmd_frame = '0; qp_cmd_start = '0; qp_cmd_count = '0; cur_rd_frame = '0;
    for (int k = 0; k < NQP; k++) for (int a = 0; a < PB; a++) wbuf[k][a] = 8'h00;

    // relation R on disk: full pages of tuples with random keys
    for (int p = 0; p < R_PAGES; p++) begin
      int base;
      base = ((REL_R << PAGE_W) + p) * PB;
      disk[base] = 8'(TPP / 256); disk[base + 1] = 8'(TPP);
      for (int i = 0; i < TPP; i++) begin
        int unsigned t;
        t = {8'($urandom_range(0, 255)), 8'(p), 16'(i)};
        {disk[base+2+4*i], disk[base+3+4*i], disk[base+4+4*i], disk[base+5+4*i]} = t;
        if (t[31:24] < 8'd100) expect_q.push_back(t);
      end
    end

    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // CREATE R (on disk) and T (temporary)
    @(negedge clk); cfg_valid = 1; cfg_rel = REL_W'(REL_R); cfg_npages = (PAGE_W+1)'(R_PAGES); cfg_temp = 0;
    @(negedge clk); cfg_rel = REL_W'(REL_T); cfg_npages = '0; cfg_temp = 1;
    @(negedge clk); cfg_valid = 0;

    fork
      restrict_qp(0, 0);
      restrict_qp(1, 0);
      begin
        repeat (20) @(posedge clk);
        insert_qp(2, 2);
      end
      begin
        // the controller releases R for packet 0 once both processors are done
        wait (n_eor >= 2);
        repeat (4 * BC) @(posedge clk);
        ctl(1, OP_RELEASE, 0, REL_R, 0, LV_RETRIEVE, rp);
      end
    join
    ctl(0, OP_RELEASE, 0, REL_T, 0, LV_RETRIEVE, rp);

    // the result, read by two packets at once
    fork
      scan_temp(2, 1, 1'b1);
      scan_temp(0, 3, 1'b0);
    join
    expect_q.sort();
    got_q.sort();
    checks++;
    if (got_q.size() != expect_q.size()) begin
      failures++; $display("result has %0d tuples, expected %0d", got_q.size(), expect_q.size());
    end else begin
      for (int i = 0; i < got_q.size(); i++) begin
        checks++;
        if (got_q[i] != expect_q[i]) begin failures++; $display("tuple %0d: %h vs %h", i, got_q[i], expect_q[i]); end
      end
    end

    // the inserted tuple
    ctl(1, OP_GETPAGE, 3, REL_R, ins_page, LV_RETRIEVE, rp);
    checks++; if (rp.eor) begin failures++; $display("inserted page missing"); end
    dma(1, 1'b0, int'(rp.frame), 0, 1'b1, PB);
    checks++;
    if (count_of(1) < 1 || tuple_of(1, count_of(1) - 1) != NEW_TUPLE) begin
      failures++; $display("inserted tuple not found (count %0d)", count_of(1));
    end
    ctl(1, OP_RELEASE, 3, REL_R, 0, LV_RETRIEVE, rp);

    // the result is kept as a permanent relation: NEXTPAGE walks its pages
    // and then reports end of relation instead of adding a page
    @(negedge clk); cfg_valid = 1; cfg_keep = 1; cfg_rel = REL_W'(REL_T);
    @(negedge clk); cfg_valid = 0; cfg_keep = 0;
    begin
      int np, nt, nn;
      np = 0; nt = 0; nn = n_new;
      forever begin
        ctl(2, OP_NEXTPAGE, 1, REL_T, 0, LV_RETRIEVE, rp);
        if (rp.eor) break;
        dma(2, 1'b0, int'(rp.frame), 0, 1'b1, PB);
        np++;
        nt += count_of(2);
      end
      ctl(2, OP_RELEASE, 1, REL_T, 0, LV_RETRIEVE, rp);
      checks++;
      if (np != n_tpages || nt != expect_q.size() || n_new != nn) begin
        failures++; $display("kept relation: %0d pages, %0d tuples, %0d new pages", np, nt, n_new - nn);
      end
    end

    $display("prefetches=%0d faults=%0d evictions=%0d writebacks=%0d newpages=%0d lockwaits=%0d eor=%0d any-start=%0d addr-start=%0d shared-slots=%0d tuples=%0d",
             n_pf, n_fault, n_evict, n_wb, n_new, n_wait, n_eor, n_any, n_match, n_shared, got_q.size());
    $display("page reads=%0d, longest %0d clocks (one page time is %0d)", n_scan, scan_max, PB * BC);
    checks++; if (n_scan == 0) begin failures++; $display("no whole-page read"); end
    checks++; if (n_fault == 0) begin failures++; $display("no page fault"); end
    checks++; if (n_new == 0) begin failures++; $display("no new page"); end
    checks++; if (n_pf == 0) begin failures++; $display("no anticipatory page-in"); end
    checks++; if (n_wait == 0) begin failures++; $display("no lock wait"); end
    checks++; if (n_eor == 0) begin failures++; $display("no end of relation"); end
    checks++; if (n_any == 0) begin failures++; $display("no zero-latency start"); end
    checks++; if (n_match == 0) begin failures++; $display("no address-matched start"); end
    checks++; if (n_shared == 0) begin failures++; $display("no shared frame read"); end
`ifndef DIRECT_FULL_SIZE
    checks++; if (n_evict == 0) begin failures++; $display("no eviction"); end
    checks++; if (n_wb == 0) begin failures++; $display("no write-back"); end
`endif
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

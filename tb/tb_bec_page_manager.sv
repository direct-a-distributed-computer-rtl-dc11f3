// tb_bec_page_manager: the controller's paging unit with 3 query processors,
// 4 frames and a mass-storage model that answers after a delay. The bench keeps
// its own record of which page each frame holds, from the page-in and
// page-out transfers it sees, and checks every reply against it.
// Scenarios: two processors share one packet and NEXTPAGE through a 3-page
// relation (each page handed out exactly once, then end of relation to both);
// a temporary relation grows on NEXTPAGE without disk reads; an update
// request waits while another packet has the relation IN-USE and is served
// after RELEASE; a retrieve from a higher-numbered packet waits while the
// relation is LOCKED; waiting requests are served in arrival order, with
// retrieves from packets numbered below a waiting updater let through; a relation that does not fit forces evictions, with
// dirty pages written back first; a temporary relation kept as a permanent
// one keeps its page and stops growing.
module tb_bec_page_manager;
  import direct_pkg::*;
  localparam int unsigned NQP = 3, NF = 4;
  logic clk = 0, rst_n = 0;
  logic cfg_valid = 0, cfg_temp = 0, cfg_keep = 0;
  logic [REL_W-1:0] cfg_rel = 0;
  logic [PAGE_W:0] cfg_npages = 0;
  ctl_req_t [NQP-1:0] req;
  ctl_rep_t [NQP-1:0] rep;
  logic ms_req_valid, ms_req_ready = 0, ms_req_out, ms_done = 0;
  logic [1:0] ms_req_frame;
  logic [REL_W+PAGE_W-1:0] ms_req_disk;
  logic ev_fault, ev_evict, ev_writeback, ev_newpage, ev_lockwait, ev_noframe, ev_eor, ev_prefetch;
  int checks = 0, failures = 0;
  int n_pf = 0, n_fault = 0, n_evict = 0, n_wb = 0, n_new = 0, n_wait = 0, n_eor = 0, n_pin = 0, n_pout = 0;
  logic [REL_W+PAGE_W-1:0] holds [NF];  // page in each frame, by the bench's record
  logic [NF-1:0] hvalid = '0;

  bec_page_manager #(.NQP(NQP), .NFRAMES(NF), .NREL(4), .NPAGES(8), .NPKT(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    n_fault += int'(ev_fault); n_evict += int'(ev_evict); n_wb += int'(ev_writeback);
    n_new += int'(ev_newpage); n_wait += int'(ev_lockwait); n_eor += int'(ev_eor); n_pf += int'(ev_prefetch);
  end

  // mass storage: accept, wait, finish; record the frame contents
  initial begin
    forever begin
      @(negedge clk);
      if (ms_req_valid) begin
        logic out; logic [1:0] f; logic [REL_W+PAGE_W-1:0] d;
        out = ms_req_out; f = ms_req_frame; d = ms_req_disk;
        ms_req_ready = 1;
        @(negedge clk); ms_req_ready = 0;
        repeat (20) @(negedge clk);
        if (out) begin
          n_pout++;
          checks++;
          if (!hvalid[f] || holds[f] != d) begin failures++; $display("page-out of frame %0d not holding %h", f, d); end
        end else begin
          n_pin++;
          holds[f] = d; hvalid[f] = 1;
        end
        ms_done = 1;
        @(negedge clk); ms_done = 0;
      end
    end
  end

  task automatic create(input int r, input int np, input logic temp);
    @(negedge clk);
    cfg_valid = 1; cfg_rel = REL_W'(r); cfg_npages = (PAGE_W+1)'(np); cfg_temp = temp;
    @(negedge clk); cfg_valid = 0;
  endtask

  task automatic request(input int k, input ctl_op_e op, input int pkt, input int r, input int pg,
                         input lock_val_e lv, output ctl_rep_t rp);
    @(negedge clk);
    req[k].req_valid = 1; req[k].op = op; req[k].pkt = PKT_W'(pkt); req[k].rel = REL_W'(r);
    req[k].page = PAGE_W'(pg); req[k].lock_val = lv;
    do @(posedge clk); while (!rep[k].rep_valid);
    rp = rep[k];
    @(negedge clk); req[k].req_valid = 0;
    if (op != OP_RELEASE && !rp.eor) begin
      // a new page of a temporary relation is made in the frame, not read in
      if (!hvalid[rp.frame[1:0]] || holds[rp.frame[1:0]] != {REL_W'(r), rp.page}) begin
        holds[rp.frame[1:0]] = {REL_W'(r), rp.page}; hvalid[rp.frame[1:0]] = 1;
        checks++;
        if (!ev_seen_new) begin failures++; $display("frame %0d handed out without its page", rp.frame); end
      end
    end
  endtask

  // a new-page event since the last check (temporary relation growth)
  logic ev_seen_new;
  always @(posedge clk) if (ev_newpage) ev_seen_new <= 1; else if (!req[0].req_valid && !req[1].req_valid && !req[2].req_valid) ev_seen_new <= 0;

  initial begin
    ctl_rep_t r0, r1, r2;
    int got [8];
    int seen;
    time t_upd, t_ret;
    req = '0;
    ev_seen_new = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    create(1, 3, 0);   // permanent relation, 3 pages
    create(2, 0, 1);   // temporary relation
    create(3, 3, 0);   // another permanent relation

    // --- intra-query: QP0 and QP1 run packet 0 over relation 1
    for (int i = 0; i < 8; i++) got[i] = 0;
    seen = 0;
    fork
      begin
        do begin request(0, OP_NEXTPAGE, 0, 1, 0, LV_RETRIEVE, r0); if (!r0.eor) got[r0.page]++; end
        while (!r0.eor);
      end
      begin
        do begin request(1, OP_NEXTPAGE, 0, 1, 0, LV_RETRIEVE, r1); if (!r1.eor) got[r1.page]++; end
        while (!r1.eor);
      end
    join
    for (int i = 0; i < 3; i++) begin
      checks++; if (got[i] != 1) begin failures++; $display("page %0d handed out %0d times", i, got[i]); end
    end
    // every page is read in once, on a fault or ahead of time
    checks++; if (n_fault + n_pf != 3 || n_pin != 3) begin failures++; $display("faults %0d prefetches %0d page-ins %0d", n_fault, n_pf, n_pin); end
    checks++; if (n_eor != 2) begin failures++; $display("eor %0d", n_eor); end

    // --- temporary relation grows by NEXTPAGE: no disk read
    request(2, OP_NEXTPAGE, 0, 2, 0, LV_RETRIEVE, r2);
    checks++; if (r2.eor || r2.page != 0 || n_new != 1 || n_pin != 3) begin failures++; $display("temp page"); end

    // --- update by packet 1 waits while packet 0 holds relation 1
    fork
      request(0, OP_GETPAGE, 1, 1, 2, LV_UPDATE, r0);
      begin
        repeat (200) @(posedge clk);
        checks++; if (n_wait == 0) begin failures++; $display("update was not held back"); end
        request(1, OP_RELEASE, 0, 1, 0, LV_RETRIEVE, r1);
      end
    join
    checks++; if (r0.eor || r0.page != 2) begin failures++; $display("update reply"); end
    // packet 2 retrieve waits on LOCKED, then proceeds after RELEASE by packet 1
    n_wait = 0;
    fork
      request(1, OP_GETPAGE, 2, 1, 0, LV_RETRIEVE, r1);
      begin
        repeat (200) @(posedge clk);
        checks++; if (n_wait == 0 || rep[1].rep_valid) begin failures++; $display("retrieve on LOCKED not held"); end
        request(0, OP_RELEASE, 1, 1, 0, LV_RETRIEVE, r0);
      end
    join
    checks++; if (r1.eor || r1.page != 0) begin failures++; $display("retrieve reply"); end
    request(1, OP_RELEASE, 2, 1, 0, LV_RETRIEVE, r1);

    // --- waiting requests are served in arrival order: an update by packet 2
    // queues behind packet 0's retrieve, a retrieve by packet 3 queues behind
    // the update, and a retrieve by packet 1 (numbered below the updater) is
    // still granted
    request(0, OP_GETPAGE, 0, 1, 0, LV_RETRIEVE, r0);
    t_upd = 0; t_ret = 0;
    fork
      begin request(1, OP_GETPAGE, 2, 1, 2, LV_UPDATE, r1); t_upd = $time; end
      begin
        repeat (50) @(posedge clk);
        request(2, OP_GETPAGE, 3, 1, 0, LV_RETRIEVE, r2); t_ret = $time;
      end
      begin
        repeat (100) @(posedge clk);
        checks++; if (t_upd != 0 || t_ret != 0) begin failures++; $display("queued requests served early"); end
        request(0, OP_GETPAGE, 1, 1, 1, LV_RETRIEVE, r0);
        checks++; if (r0.eor || r0.page != 1 || t_upd != 0) begin failures++; $display("lower packet not granted"); end
        request(0, OP_RELEASE, 1, 1, 0, LV_RETRIEVE, r0);
        request(0, OP_RELEASE, 0, 1, 0, LV_RETRIEVE, r0);
        wait (t_upd != 0);
        repeat (100) @(posedge clk);
        checks++; if (t_ret != 0) begin failures++; $display("retrieve passed the queued update"); end
        request(1, OP_RELEASE, 2, 1, 0, LV_RETRIEVE, r1);
      end
    join
    checks++; if (t_upd == 0 || t_ret <= t_upd || r2.page != 0) begin failures++; $display("queue order %0t %0t", t_upd, t_ret); end
    request(2, OP_RELEASE, 3, 1, 0, LV_RETRIEVE, r2);
    // two updaters are granted in arrival order, not by packet number
    request(0, OP_GETPAGE, 0, 1, 0, LV_RETRIEVE, r0);
    t_upd = 0; t_ret = 0;
    fork
      begin request(1, OP_GETPAGE, 3, 1, 2, LV_UPDATE, r1); t_upd = $time; end
      begin
        repeat (50) @(posedge clk);
        request(2, OP_GETPAGE, 2, 1, 2, LV_UPDATE, r2); t_ret = $time;
      end
      begin
        repeat (100) @(posedge clk);
        request(0, OP_RELEASE, 0, 1, 0, LV_RETRIEVE, r0);
        wait (t_upd != 0 || t_ret != 0);
        repeat (100) @(posedge clk);
        checks++; if (t_upd == 0 || t_ret != 0) begin failures++; $display("updaters out of order"); end
        request(1, OP_RELEASE, 3, 1, 0, LV_RETRIEVE, r1);
      end
    join
    request(2, OP_RELEASE, 2, 1, 0, LV_RETRIEVE, r2);

    // --- relation 3 needs frames: 4 frames hold rel1 p0..2 and the temp page
    // (pinned by QP2); rel1 p2 is dirty from the update
    fork
      begin
        // one processor with think time between pages: pages arrive ahead
        n_pf = 0;
        do begin request(0, OP_NEXTPAGE, 3, 3, 0, LV_RETRIEVE, r0); repeat (100) @(posedge clk); end
        while (!r0.eor);
        checks++; if (n_pf < 2) begin failures++; $display("prefetches %0d", n_pf); end
      end
    join
    checks++; if (n_evict < 3) begin failures++; $display("evictions %0d", n_evict); end
    checks++; if (n_wb != 1 || n_pout != 1) begin failures++; $display("writebacks %0d page-outs %0d", n_wb, n_pout); end
    // the temporary page stays, pinned by QP2
    request(2, OP_GETPAGE, 0, 2, 0, LV_RETRIEVE, r2);
    checks++; if (r2.eor || n_pin != 6) begin failures++; $display("temp page lost, page-ins %0d", n_pin); end
    // a page past the end of a permanent relation is end of relation
    request(2, OP_GETPAGE, 0, 3, 5, LV_RETRIEVE, r2);
    checks++; if (!r2.eor) begin failures++; $display("no eor past the end"); end

    // the temporary relation is kept as a permanent one: its page stays in
    // place and NEXTPAGE past its end is end of relation, not a new page
    @(negedge clk); cfg_valid = 1; cfg_keep = 1; cfg_rel = REL_W'(2);
    @(negedge clk); cfg_valid = 0; cfg_keep = 0;
    seen = n_new;
    request(2, OP_NEXTPAGE, 1, 2, 0, LV_RETRIEVE, r2);
    checks++; if (r2.eor || r2.page != 0 || n_pin != 6) begin failures++; $display("kept relation lost its page"); end
    request(2, OP_NEXTPAGE, 1, 2, 0, LV_RETRIEVE, r2);
    checks++; if (!r2.eor || n_new != seen) begin failures++; $display("kept relation still grows"); end
    request(2, OP_RELEASE, 1, 2, 0, LV_RETRIEVE, r2);

    $display("prefetches=%0d faults=%0d evictions=%0d writebacks=%0d newpages=%0d eor=%0d", n_pf, n_fault, n_evict, n_wb, n_new, n_eor);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// bec_page_manager: the paging and concurrency-control part of the DIRECT
// back-end controller, as one hardware unit.
//
// The document runs these primitives as indivisible operations in the
// controller's software; here a single state machine serves one request at a
// time, which makes every request indivisible. It keeps, as the document's
// tables do:
//   relation table (RATT part) : number of pages, temporary flag, relation
//                                lock (UNLOCKED / IN-USE / LOCKED) and a
//                                count of query packets using the relation
//   page tables (PT)           : per page a presence bit, a dirty bit and the
//                                frame number; the disk address is {rel, page}
//   query packet task table    : a currency pointer per (packet, relation)
//   frame table                : which page each CCD frame holds and which
//                                query processors are working in it
// Requests (ctl_req_t, one per query processor, held until the reply):
//   NEXTPAGE : the page named by the packet's currency pointer, which then
//              advances, so processors running one packet get different pages
//   GETPAGE  : a named page; the currency pointer moves past it
//   RELEASE  : the packet has finished with the relation (counting semaphore)
// The reply (SEND) is a one-cycle ctl_rep_t pulse with the frame number, or
// eor when the relation has no such page. Asking for the page just past the
// end of a temporary relation (or of any relation under an update lock)
// appends a new page in a fresh frame. A missing page is a page fault: a frame
// is taken (a free one, else the next frame from a clock hand that no query
// processor is working in), a dirty victim is written to mass storage, the
// page is read in, and only then is the reply sent. A request that finds no
// frame stays pending and is retried. Lock rule: retrieve is granted unless
// the relation is LOCKED; update is granted only on an UNLOCKED relation.
// A request whose lock cannot be granted joins the relation's request queue
// (the processor busy-waits for its reply, as in the document). Queued
// requests are served in arrival order: only the oldest one on a relation is
// retried. A new request on a relation with a queue joins it, except a
// retrieve from a packet numbered below a waiting updater, which is still
// granted, and a request from a packet that already holds the relation. The
// queue is one bit, a relation number and an age row per query processor.
// Anticipatory paging (PREFETCH): after a NEXTPAGE reply the unit, taking turns
// with waiting requests, pages in the next m pages of that relation, where m is the
// number of processors whose latest request was a NEXTPAGE of the same packet
// and relation (the document asks for n = m pages ahead). It uses the same
// frame choice; if no frame can be had it gives up until the next NEXTPAGE.
// Table sizes, the RELEASE request, the victim choice, the way m is counted
// and the ev_* event pulses are this design's.
// Mass-storage channel: ms_req_valid/ms_req_ready start a whole-page transfer
// (ms_req_out = 1: frame to disk), ms_done ends it.
module bec_page_manager
  import direct_pkg::*;
#(
  parameter int unsigned NQP     = 5,
  parameter int unsigned NFRAMES = 32,
  parameter int unsigned NREL    = 16,
  parameter int unsigned NPAGES  = 64,
  parameter int unsigned NPKT    = 8,
  parameter bit          PREFETCH = 1'b1,
  localparam int unsigned FW = (NFRAMES > 1) ? $clog2(NFRAMES) : 1,
  localparam int unsigned KW = (NQP > 1) ? $clog2(NQP) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // CREATE: define relation cfg_rel with cfg_npages pages, all on disk.
  // With cfg_keep, the temporary relation cfg_rel becomes permanent instead:
  // its pages and page table stay, and it no longer grows.
  input  logic                     cfg_valid,
  input  logic [REL_W-1:0]         cfg_rel,
  input  logic [PAGE_W:0]          cfg_npages,
  input  logic                     cfg_temp,
  input  logic                     cfg_keep,
  // query processor requests and replies
  input  ctl_req_t [NQP-1:0]       req,
  output ctl_rep_t [NQP-1:0]       rep,
  // mass-storage channel
  output logic                     ms_req_valid,
  input  logic                     ms_req_ready,
  output logic                     ms_req_out,
  output logic [FW-1:0]            ms_req_frame,
  output logic [REL_W+PAGE_W-1:0]  ms_req_disk,
  input  logic                     ms_done,
  // event pulses, for observation
  output logic                     ev_fault,
  output logic                     ev_evict,
  output logic                     ev_writeback,
  output logic                     ev_newpage,
  output logic                     ev_lockwait,
  output logic                     ev_noframe,
  output logic                     ev_eor,
  output logic                     ev_prefetch
);

  initial begin
    assert (NFRAMES <= 2**FRAME_W && NREL <= 2**REL_W && NPAGES <= 2**PAGE_W && NPKT <= 2**PKT_W)
      else $error("bec_page_manager: table sizes exceed the request field widths");
  end

  typedef enum logic [3:0] {
    S_IDLE, S_LOCK, S_LOOKUP, S_ALLOC, S_POUT, S_POUT_W, S_PIN, S_PIN_W, S_INSTALL, S_REPLY
  } state_e;
  state_e state;

  // ---------------- tables
  logic [PAGE_W:0]     rel_npages [NREL];
  logic                rel_temp   [NREL];
  rel_lock_e           rel_lock   [NREL];
  logic [PKT_W:0]      rel_users  [NREL];
  logic                rel_uwait  [NREL];
  logic [PKT_W-1:0]    rel_upkt   [NREL];

  logic                pt_present [NREL][NPAGES];
  logic                pt_dirty   [NREL][NPAGES];
  logic [FW-1:0]       pt_frame   [NREL][NPAGES];

  logic [PAGE_W:0]     qptt_cp    [NPKT][NREL];
  logic                qptt_holds [NPKT][NREL];

  logic [NFRAMES-1:0]  fr_valid;
  logic [REL_W-1:0]    fr_rel     [NFRAMES];
  logic [PAGE_W-1:0]   fr_page    [NFRAMES];
  logic [NQP-1:0]      fr_pin     [NFRAMES];
  logic [FW-1:0]       hand;

  // ---------------- request being served
  logic [KW-1:0]       k_q, rr;
  ctl_op_e             op_q;
  logic [PKT_W-1:0]    pkt_q;
  logic [REL_W-1:0]    rel_q;
  logic [PAGE_W-1:0]   page_q;   // GETPAGE page, then the resolved page
  lock_val_e           lv_q;
  logic                new_q;    // appending a new page
  logic [FW-1:0]       f_q;      // frame of the reply / frame being filled
  logic [REL_W-1:0]    vrel_q;
  logic [PAGE_W-1:0]   vpage_q;
  logic [NQP-1:0]      served;

  // lock request queue: the processors waiting on a relation lock, the
  // relation each waits on, and their order (older[j][k]: j queued before k)
  logic [NQP-1:0]      queued;
  logic [REL_W-1:0]    qrel       [NQP];
  logic [NQP-1:0]      older      [NQP];
  logic [NQP-1:0]      qhead;
  always_comb begin
    for (int c = 0; c < NQP; c++) begin
      qhead[c] = queued[c];
      for (int j = 0; j < NQP; j++)
        if (j != c && queued[j] && qrel[j] == qrel[c] && older[j][c]) qhead[c] = 1'b0;
    end
  end

  // anticipatory paging: the last NEXTPAGE of each processor, and the pages
  // still to be brought in ahead of the currency pointer
  logic [NQP-1:0]      nx_valid;
  logic [PKT_W-1:0]    nx_pkt     [NQP];
  logic [REL_W-1:0]    nx_rel     [NQP];
  logic                pf_valid, pf_mode, pf_turn;
  logic [REL_W-1:0]    pf_rel;
  logic [PAGE_W:0]     pf_page;
  logic [KW:0]         pf_left;
  logic [KW:0]         m_same;   // processors on the same packet and relation
  always_comb begin
    m_same = (KW+1)'(1);
    for (int i = 0; i < NQP; i++)
      if (nx_valid[i] && KW'(i) != k_q && nx_pkt[i] == pkt_q && nx_rel[i] == rel_q)
        m_same = m_same + 1'b1;
  end

  // ---------------- arbiter: round robin from rr+1; a queued request takes
  // part only at the head of its relation's queue, or once its packet holds
  // the relation
  logic          pick_ok;
  logic [KW-1:0] pick;
  always_comb begin
    pick_ok = 1'b0;
    pick    = '0;
    for (int i = 1; i <= NQP; i++) begin
      int unsigned c;
      c = (32'(rr) + i) % NQP;
      if (!pick_ok && req[c].req_valid && !served[c] &&
          (!queued[c] || qhead[c] || qptt_holds[req[c].pkt][req[c].rel])) begin
        pick_ok = 1'b1;
        pick    = KW'(c);
      end
    end
  end

  // ---------------- frame choice: a free frame, else the clock hand's victim
  logic          free_ok, vict_ok;
  logic [FW-1:0] free_f, vict_f;
  always_comb begin
    free_ok = 1'b0;
    free_f  = '0;
    for (int f = NFRAMES - 1; f >= 0; f--)
      if (!fr_valid[f]) begin
        free_ok = 1'b1;
        free_f  = FW'(f);
      end
    vict_ok = 1'b0;
    vict_f  = '0;
    for (int i = 0; i < NFRAMES; i++) begin
      int unsigned c;
      c = (32'(hand) + 32'(i)) % NFRAMES;
      if (!vict_ok && fr_valid[c] && fr_pin[c] == '0) begin
        vict_ok = 1'b1;
        vict_f  = FW'(c);
      end
    end
  end

  // ---------------- lock decision for the request being served
  // A request queues behind earlier requests on the same relation, except a
  // retrieve from a packet numbered below the waiting updater.
  logic held, grant_ok, q_busy, lower;
  always_comb begin
    held   = qptt_holds[pkt_q][rel_q];
    lower  = rel_uwait[rel_q] && pkt_q < rel_upkt[rel_q];
    q_busy = 1'b0;
    for (int j = 0; j < NQP; j++)
      if (KW'(j) != k_q && queued[j] && qrel[j] == rel_q && (!queued[k_q] || older[j][k_q]))
        q_busy = 1'b1;
    if (lv_q == LV_RETRIEVE)
      grant_ok = (rel_lock[rel_q] != REL_LOCKED) && (!q_busy || lower);
    else
      grant_ok = (rel_lock[rel_q] == REL_UNLOCKED) && !q_busy;
  end

  logic [PAGE_W:0] pg_w;
  assign pg_w = (op_q == OP_NEXTPAGE) ? qptt_cp[pkt_q][rel_q] : {1'b0, page_q};

  assign ms_req_valid = (state == S_POUT) || (state == S_PIN);
  // direction and disk address stay valid until ms_done
  assign ms_req_out   = (state == S_POUT) || (state == S_POUT_W);
  assign ms_req_frame = f_q;
  assign ms_req_disk  = ms_req_out ? {vrel_q, vpage_q} : {rel_q, page_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      rr     <= '0;
      k_q    <= '0;
      op_q   <= OP_NEXTPAGE;
      pkt_q  <= '0;
      rel_q  <= '0;
      page_q <= '0;
      lv_q   <= LV_RETRIEVE;
      new_q  <= 1'b0;
      f_q    <= '0;
      vrel_q <= '0;
      vpage_q <= '0;
      served <= '0;
      queued <= '0;
      hand   <= '0;
      fr_valid <= '0;
      rep    <= '0;
      {ev_fault, ev_evict, ev_writeback, ev_newpage, ev_lockwait, ev_noframe, ev_eor} <= '0;
      ev_prefetch <= 1'b0;
      nx_valid <= '0;
      pf_valid <= 1'b0;
      pf_mode  <= 1'b0;
      pf_turn  <= 1'b0;
      pf_rel   <= '0;
      pf_page  <= '0;
      pf_left  <= '0;
      for (int i = 0; i < NQP; i++) begin
        nx_pkt[i] <= '0;
        nx_rel[i] <= '0;
        qrel[i]   <= '0;
        older[i]  <= '0;
      end
      for (int r = 0; r < NREL; r++) begin
        rel_npages[r] <= '0;
        rel_temp[r]   <= 1'b0;
        rel_lock[r]   <= REL_UNLOCKED;
        rel_users[r]  <= '0;
        rel_uwait[r]  <= 1'b0;
        rel_upkt[r]   <= '0;
        for (int p = 0; p < NPAGES; p++) begin
          pt_present[r][p] <= 1'b0;
          pt_dirty[r][p]   <= 1'b0;
          pt_frame[r][p]   <= '0;
        end
      end
      for (int q = 0; q < NPKT; q++)
        for (int r = 0; r < NREL; r++) begin
          qptt_cp[q][r]    <= '0;
          qptt_holds[q][r] <= 1'b0;
        end
      for (int f = 0; f < NFRAMES; f++) begin
        fr_rel[f]  <= '0;
        fr_page[f] <= '0;
        fr_pin[f]  <= '0;
      end
    end else begin
      rep <= '0;
      {ev_fault, ev_evict, ev_writeback, ev_newpage, ev_lockwait, ev_noframe, ev_eor} <= '0;
      ev_prefetch <= 1'b0;
      for (int i = 0; i < NQP; i++)
        if (!req[i].req_valid) begin
          served[i] <= 1'b0;
          queued[i] <= 1'b0;
        end

      if (cfg_valid && cfg_keep) begin
        rel_temp[cfg_rel] <= 1'b0;
      end else if (cfg_valid) begin
        rel_npages[cfg_rel] <= cfg_npages;
        rel_temp[cfg_rel]   <= cfg_temp;
        for (int p = 0; p < NPAGES; p++) begin
          pt_present[cfg_rel][p] <= 1'b0;
          pt_dirty[cfg_rel][p]   <= 1'b0;
        end
      end

      unique case (state)
        // requests and anticipatory page-ins take turns, so that requests
        // waiting on a lock do not hold back the page-ins
        S_IDLE: if (pick_ok && !(pf_valid && pf_turn)) begin
          pf_turn <= 1'b1;
          k_q    <= pick;
          rr     <= pick;
          op_q   <= req[pick].op;
          pkt_q  <= req[pick].pkt;
          rel_q  <= req[pick].rel;
          page_q <= req[pick].page;
          lv_q   <= req[pick].lock_val;
          state  <= S_LOCK;
        end else if (pf_valid) begin
          // bring in the next page ahead of the readers
          pf_turn <= 1'b0;
          if (pf_left == '0 || pf_page >= rel_npages[pf_rel]) begin
            pf_valid <= 1'b0;
          end else if (pt_present[pf_rel][pf_page[PAGE_W-1:0]]) begin
            pf_page <= pf_page + 1'b1;
            pf_left <= pf_left - 1'b1;
          end else begin
            pf_mode <= 1'b1;
            rel_q   <= pf_rel;
            page_q  <= pf_page[PAGE_W-1:0];
            lv_q    <= LV_RETRIEVE;
            new_q   <= 1'b0;
            state   <= S_ALLOC;
          end
        end

        S_LOCK: begin
          nx_valid[k_q] <= 1'b0;
          if (op_q == OP_RELEASE) begin
            if (held) begin
              qptt_holds[pkt_q][rel_q] <= 1'b0;
              rel_users[rel_q] <= rel_users[rel_q] - 1'b1;
              if (rel_users[rel_q] == (PKT_W+1)'(1)) begin
                rel_lock[rel_q] <= REL_UNLOCKED;
                for (int f = 0; f < NFRAMES; f++)
                  if (fr_valid[f] && fr_rel[f] == rel_q) fr_pin[f] <= '0;
              end
            end
            qptt_cp[pkt_q][rel_q] <= '0;
            rep[k_q].rep_valid <= 1'b1;
            served[k_q] <= 1'b1;
            state <= S_IDLE;
          end else if (held || grant_ok) begin
            queued[k_q] <= 1'b0;
            if (!held) begin
              qptt_holds[pkt_q][rel_q] <= 1'b1;
              if (lv_q == LV_RETRIEVE) begin
                rel_lock[rel_q]  <= REL_IN_USE;
                rel_users[rel_q] <= rel_users[rel_q] + 1'b1;
              end else begin
                rel_lock[rel_q]  <= REL_LOCKED;
                rel_users[rel_q] <= (PKT_W+1)'(1);
                if (rel_uwait[rel_q] && rel_upkt[rel_q] == pkt_q) rel_uwait[rel_q] <= 1'b0;
              end
            end
            // the processor has left its previous page of this relation
            for (int f = 0; f < NFRAMES; f++)
              if (fr_valid[f] && fr_rel[f] == rel_q) fr_pin[f][k_q] <= 1'b0;
            state <= S_LOOKUP;
          end else begin
            if (lv_q == LV_UPDATE && (!rel_uwait[rel_q] || pkt_q < rel_upkt[rel_q])) begin
              rel_uwait[rel_q] <= 1'b1;
              rel_upkt[rel_q]  <= pkt_q;
            end
            if (!queued[k_q]) begin
              queued[k_q] <= 1'b1;
              qrel[k_q]   <= rel_q;
              for (int j = 0; j < NQP; j++) begin
                older[j][k_q] <= queued[j] && KW'(j) != k_q;
                older[k_q][j] <= 1'b0;
              end
            end
            ev_lockwait <= 1'b1;
            state <= S_IDLE;
          end
        end

        S_LOOKUP: begin
          page_q <= pg_w[PAGE_W-1:0];
          if (pg_w >= rel_npages[rel_q]) begin
            if ((rel_temp[rel_q] || lv_q == LV_UPDATE) && pg_w == rel_npages[rel_q] &&
                pg_w < (PAGE_W+1)'(NPAGES)) begin
              new_q <= 1'b1;
              state <= S_ALLOC;
            end else begin
              rep[k_q].rep_valid <= 1'b1;
              rep[k_q].eor       <= 1'b1;
              rep[k_q].page      <= pg_w[PAGE_W-1:0];
              served[k_q] <= 1'b1;
              ev_eor <= 1'b1;
              state <= S_IDLE;
            end
          end else if (pt_present[rel_q][pg_w[PAGE_W-1:0]]) begin
            f_q   <= pt_frame[rel_q][pg_w[PAGE_W-1:0]];
            state <= S_REPLY;
          end else begin
            new_q    <= 1'b0;
            ev_fault <= 1'b1;
            state    <= S_ALLOC;
          end
        end

        S_ALLOC: begin
          if (free_ok) begin
            f_q   <= free_f;
            state <= new_q ? S_INSTALL : S_PIN;
          end else if (vict_ok) begin
            f_q     <= vict_f;
            vrel_q  <= fr_rel[vict_f];
            vpage_q <= fr_page[vict_f];
            hand    <= (vict_f == FW'(NFRAMES - 1)) ? '0 : vict_f + 1'b1;
            fr_valid[vict_f] <= 1'b0;
            pt_present[fr_rel[vict_f]][fr_page[vict_f]] <= 1'b0;
            ev_evict <= 1'b1;
            if (pt_dirty[fr_rel[vict_f]][fr_page[vict_f]]) state <= S_POUT;
            else                                            state <= new_q ? S_INSTALL : S_PIN;
          end else begin
            if (pf_mode) begin
              pf_mode  <= 1'b0;
              pf_valid <= 1'b0;
            end else begin
              ev_noframe <= 1'b1;  // request stays pending
            end
            state <= S_IDLE;
          end
        end

        S_POUT:   if (ms_req_ready) state <= S_POUT_W;
        S_POUT_W: if (ms_done) begin
          pt_dirty[vrel_q][vpage_q] <= 1'b0;
          ev_writeback <= 1'b1;
          state <= new_q ? S_INSTALL : S_PIN;
        end
        S_PIN:    if (ms_req_ready) state <= S_PIN_W;
        S_PIN_W:  if (ms_done) state <= S_INSTALL;

        S_INSTALL: begin
          pt_present[rel_q][page_q] <= 1'b1;
          pt_frame[rel_q][page_q]   <= f_q;
          pt_dirty[rel_q][page_q]   <= new_q;
          fr_valid[f_q] <= 1'b1;
          fr_rel[f_q]   <= rel_q;
          fr_page[f_q]  <= page_q;
          fr_pin[f_q]   <= '0;
          if (new_q) begin
            rel_npages[rel_q] <= rel_npages[rel_q] + 1'b1;
            ev_newpage <= 1'b1;
          end
          if (pf_mode) begin
            pf_mode     <= 1'b0;
            pf_page     <= pf_page + 1'b1;
            pf_left     <= pf_left - 1'b1;
            ev_prefetch <= 1'b1;
            state       <= S_IDLE;
          end else begin
            state <= S_REPLY;
          end
        end

        S_REPLY: begin
          rep[k_q].rep_valid <= 1'b1;
          rep[k_q].frame     <= FRAME_W'(f_q);
          rep[k_q].page      <= page_q;
          served[k_q] <= 1'b1;
          fr_pin[f_q][k_q] <= 1'b1;
          qptt_cp[pkt_q][rel_q] <= {1'b0, page_q} + 1'b1;
          if (lv_q == LV_UPDATE) pt_dirty[rel_q][page_q] <= 1'b1;
          if (op_q == OP_NEXTPAGE) begin
            nx_valid[k_q] <= 1'b1;
            nx_pkt[k_q]   <= pkt_q;
            nx_rel[k_q]   <= rel_q;
            // keep the next m pages in memory, m = processors on this scan
            if (PREFETCH) begin
              pf_valid <= 1'b1;
              pf_rel   <= rel_q;
              pf_page  <= {1'b0, page_q} + 1'b1;
              pf_left  <= m_same;
            end
          end
          state <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // A query processor holds its request steady until it is answered.
  for (genvar i = 0; i < NQP; i++) begin : g_chk
    a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             (req[i].req_valid && !served[i] && !rep[i].rep_valid) |=> req[i].req_valid)
      else $error("bec_page_manager: request of processor %0d withdrawn before the reply", i);
  end

endmodule

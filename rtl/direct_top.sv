// direct_top: the DIRECT back end, with its processors and disk left outside.
//
// DIRECT runs relational queries on many query processors at once (MIMD). The
// relations live in pages of 16K bytes held in CCD page frames that all step
// together under one address register, so every frame always presents the
// byte named by that register. Each query processor reaches any frame through
// a cross-point switch that is only one bit wide and carries no addresses: a
// processor that wants a page simply selects that frame's serial line and
// takes bytes as they come by; any number of processors may read one frame at
// once. The back-end controller hands out page frames on request (NEXTPAGE,
// GETPAGE) and pages relations in from mass storage, which reaches the frames
// through one more port of the same switch.
//
// Inside: addr_reg (address register and byte-slot timing), NFRAMES x
// ccd_page_frame, xpoint_switch with NQP+1 ports, NQP x qp_dma (one per query
// processor, port i), one qp_dma for mass storage (port NQP) driven by
// bec_page_manager.
// Outside (ports): the query processors' controller requests and replies and
// their DMA command and byte streams; the disk's byte stream for the transfer
// the controller started (ms_*); CREATE of relations and keeping of query results (cfg_*); event pulses.
// Defaults follow the document's initial configuration: five query processors,
// thirty-two 16K-byte frames, 750 ns per byte at a 25 ns bit clock. The
// relation, page and packet table sizes are this design's.
module direct_top
  import direct_pkg::*;
#(
  parameter int unsigned NQP        = 5,
  parameter int unsigned NFRAMES    = 32,
  parameter int unsigned PAGE_BYTES = 16384,
  parameter int unsigned BYTE_CLKS  = 30,
  parameter int unsigned NREL       = 16,
  parameter int unsigned NPAGES     = 64,
  parameter int unsigned NPKT       = 8,
  localparam int unsigned AW = $clog2(PAGE_BYTES),
  localparam int unsigned FW = (NFRAMES > 1) ? $clog2(NFRAMES) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  output logic [AW-1:0]               addr,
  // CREATE relation
  input  logic                        cfg_valid,
  input  logic [REL_W-1:0]            cfg_rel,
  input  logic [PAGE_W:0]             cfg_npages,
  input  logic                        cfg_temp,
  input  logic                        cfg_keep,
  // query processors: controller requests and replies
  input  ctl_req_t [NQP-1:0]          qp_req,
  output ctl_rep_t [NQP-1:0]          qp_rep,
  // query processors: DMA
  input  logic [NQP-1:0]              qp_cmd_valid,
  output logic [NQP-1:0]              qp_cmd_ready,
  input  logic [NQP-1:0]              qp_cmd_write,
  input  logic [NQP-1:0][FW-1:0]      qp_cmd_frame,
  input  logic [NQP-1:0][AW-1:0]      qp_cmd_start,
  input  logic [NQP-1:0]              qp_cmd_any,
  input  logic [NQP-1:0][AW:0]        qp_cmd_count,
  output logic [NQP-1:0]              qp_done,
  output logic [NQP-1:0]              qp_rd_valid,
  output logic [NQP-1:0][AW-1:0]      qp_rd_addr,
  output logic [NQP-1:0][7:0]         qp_rd_data,
  output logic [NQP-1:0]              qp_wr_take,
  input  logic [NQP-1:0][7:0]         qp_wr_data,
  // mass storage
  output logic                        ms_active,   // a page transfer is under way
  output logic                        ms_out,      // 1: frame -> disk, 0: disk -> frame
  output logic [REL_W+PAGE_W-1:0]     ms_disk,     // disk address {relation, page}
  output logic                        ms_rd_valid, // byte for the disk
  output logic [AW-1:0]               ms_rd_addr,
  output logic [7:0]                  ms_rd_data,
  output logic                        ms_wr_take,  // byte from the disk taken
  input  logic [7:0]                  ms_wr_data,  // byte at address 'addr' of the page
  // events
  output logic                        ev_fault,
  output logic                        ev_evict,
  output logic                        ev_writeback,
  output logic                        ev_newpage,
  output logic                        ev_lockwait,
  output logic                        ev_noframe,
  output logic                        ev_eor,
  output logic                        ev_prefetch
);

  localparam int unsigned NPORTS = NQP + 1;

  logic slot_load, shift_en, slot_cap, slot_end;

  addr_reg #(.PAGE_BYTES(PAGE_BYTES), .BYTE_CLKS(BYTE_CLKS)) u_addr (
    .clk, .rst_n, .addr, .slot_load, .shift_en, .slot_cap, .slot_end
  );

  // ---------------- switch and frames
  logic [NPORTS-1:0][FW-1:0] rd_sel, wr_sel;
  logic [NPORTS-1:0]         wr_en, port_tx, port_rx;
  logic [NFRAMES-1:0]        frame_sout, frame_sin, frame_write;

  xpoint_switch #(.NPORTS(NPORTS), .NFRAMES(NFRAMES)) u_xpoint (
    .clk, .slot_end, .rd_sel, .wr_sel, .wr_en, .port_tx, .port_rx,
    .frame_sout, .frame_sin, .frame_write
  );

  for (genvar f = 0; f < NFRAMES; f++) begin : g_frame
    ccd_page_frame #(.PAGE_BYTES(PAGE_BYTES)) u_frame (
      .clk, .rst_n, .addr, .slot_load, .shift_en, .slot_end,
      .sout (frame_sout[f]),
      .sin  (frame_sin[f]),
      .write(frame_write[f])
    );
  end

  // ---------------- query processor DMA interfaces (ports 0..NQP-1)
  for (genvar q = 0; q < NQP; q++) begin : g_qp
    qp_dma #(.PAGE_BYTES(PAGE_BYTES), .NFRAMES(NFRAMES)) u_dma (
      .clk, .rst_n, .addr, .slot_load, .shift_en, .slot_cap, .slot_end,
      .cmd_valid(qp_cmd_valid[q]), .cmd_ready(qp_cmd_ready[q]),
      .cmd_write(qp_cmd_write[q]), .cmd_frame(qp_cmd_frame[q]),
      .cmd_start(qp_cmd_start[q]), .cmd_any(qp_cmd_any[q]),
      .cmd_count(qp_cmd_count[q]), .done(qp_done[q]),
      .rd_valid(qp_rd_valid[q]), .rd_addr(qp_rd_addr[q]), .rd_data(qp_rd_data[q]),
      .wr_take(qp_wr_take[q]), .wr_data(qp_wr_data[q]),
      .rd_sel(rd_sel[q]), .wr_sel(wr_sel[q]), .wr_en(wr_en[q]),
      .tx(port_tx[q]), .rx(port_rx[q])
    );
  end

  // ---------------- controller and the mass-storage port (port NQP)
  logic                    ms_req_valid, ms_req_ready, ms_done;
  logic [FW-1:0]           ms_req_frame;

  bec_page_manager #(
    .NQP(NQP), .NFRAMES(NFRAMES), .NREL(NREL), .NPAGES(NPAGES), .NPKT(NPKT)
  ) u_bec (
    .clk, .rst_n,
    .cfg_valid, .cfg_rel, .cfg_npages, .cfg_temp, .cfg_keep,
    .req(qp_req), .rep(qp_rep),
    .ms_req_valid, .ms_req_ready, .ms_req_out(ms_out), .ms_req_frame,
    .ms_req_disk(ms_disk), .ms_done,
    .ev_fault, .ev_evict, .ev_writeback, .ev_newpage, .ev_lockwait, .ev_noframe, .ev_eor,
    .ev_prefetch
  );

  qp_dma #(.PAGE_BYTES(PAGE_BYTES), .NFRAMES(NFRAMES)) u_ms_dma (
    .clk, .rst_n, .addr, .slot_load, .shift_en, .slot_cap, .slot_end,
    .cmd_valid(ms_req_valid), .cmd_ready(ms_req_ready),
    .cmd_write(!ms_out), .cmd_frame(ms_req_frame),
    .cmd_start('0), .cmd_any(1'b1), .cmd_count((AW+1)'(PAGE_BYTES)),
    .done(ms_done),
    .rd_valid(ms_rd_valid), .rd_addr(ms_rd_addr), .rd_data(ms_rd_data),
    .wr_take(ms_wr_take), .wr_data(ms_wr_data),
    .rd_sel(rd_sel[NQP]), .wr_sel(wr_sel[NQP]), .wr_en(wr_en[NQP]),
    .tx(port_tx[NQP]), .rx(port_rx[NQP])
  );

  assign ms_active = !ms_req_ready;

endmodule

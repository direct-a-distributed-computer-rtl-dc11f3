// xpoint_switch: the 1-bit-wide cross-point switch between NPORTS ports
// (query processors, plus the mass-storage channel) and NFRAMES CCD page frames.
//
// As in the document's 2x4 configuration, the switch carries no addresses and
// resolves no conflicts:
//   read  : each port has a SELECTOR driven by its read select; it picks the
//           serial output of one frame. Any number of ports may select the
//           same frame, so several query processors can scan one page at once.
//   write : each port has a DECODER driven by its write select; decoder output
//           j gates (AND) the port's serial data towards frame j. Each frame
//           ORs the gated data of all ports into its write shift register and
//           ORs the decoder outputs into its WRITE line.
// The decoder is enabled by wr_en (a port that is not writing drives no
// decoder output); that enable is this design's reading of the figure.
// Two ports writing one frame in the same byte slot is a software error in the
// document (the controller prevents it); an assertion flags it here.
// Purely combinational apart from that check.
module xpoint_switch #(
  parameter int unsigned NPORTS  = 6,
  parameter int unsigned NFRAMES = 32,
  localparam int unsigned FW = (NFRAMES > 1) ? $clog2(NFRAMES) : 1
) (
  input  logic                     clk,       // for the assertion only
  input  logic                     slot_end,  // for the assertion only
  input  logic [NPORTS-1:0][FW-1:0] rd_sel,
  input  logic [NPORTS-1:0][FW-1:0] wr_sel,
  input  logic [NPORTS-1:0]         wr_en,
  input  logic [NPORTS-1:0]         port_tx,    // serial data from each port
  output logic [NPORTS-1:0]         port_rx,    // serial data to each port
  input  logic [NFRAMES-1:0]        frame_sout, // serial data from each frame
  output logic [NFRAMES-1:0]        frame_sin,  // serial data to each frame
  output logic [NFRAMES-1:0]        frame_write // WRITE line of each frame
);

  logic [NPORTS-1:0][NFRAMES-1:0] dec;  // decoder outputs

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      port_rx[p] = frame_sout[rd_sel[p]];
      for (int f = 0; f < NFRAMES; f++)
        dec[p][f] = wr_en[p] && (wr_sel[p] == FW'(f));
    end
    for (int f = 0; f < NFRAMES; f++) begin
      frame_sin[f]   = 1'b0;
      frame_write[f] = 1'b0;
      for (int p = 0; p < NPORTS; p++) begin
        frame_sin[f]   = frame_sin[f] | (dec[p][f] & port_tx[p]);
        frame_write[f] = frame_write[f] | dec[p][f];
      end
    end
  end

  // At most one port writes a given frame in a byte slot.
  for (genvar f = 0; f < NFRAMES; f++) begin : g_chk
    logic [NPORTS-1:0] writers;
    always_comb for (int p = 0; p < NPORTS; p++) writers[p] = dec[p][f];
    a_one_writer: assert property (@(posedge clk) slot_end |-> $onehot0(writers))
      else $error("xpoint_switch: two ports write frame %0d in one slot", f);
  end

endmodule

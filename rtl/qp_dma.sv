// qp_dma: DMA interface of one port of the cross-point switch (a query
// processor, or the mass-storage channel).
//
// The document's DMA interface needs no address lines: it compares the
// starting address it was given with the common address register and begins
// the transfer when they match, then moves one byte per byte slot while the
// address register steps on. Because a query processor scans a whole page it
// may also start wherever the frame happens to be (cmd_any), which gives an
// access latency of essentially zero; a full-page transfer then wraps round the
// page. The byte crosses the switch one bit at a time through the port's own
// pair of shift registers:
//   read  : selector output -> sipo_sr; the byte at address A is handed out
//           (rd_valid, rd_addr = A, rd_data) one cycle after phase 9 of A's slot.
//   write : at phase 0 of A's slot the port takes wr_data, the byte for
//           address A = addr, into piso_sr (wr_take); the frame stores it at the
//           end of the same slot.
// Command handshake: cmd_valid with cmd_ready (high while idle) starts a
// transfer of cmd_count (1..PAGE_BYTES) bytes to or from frame cmd_frame;
// done pulses once the last byte has been delivered or stored. The read and
// write select registers drive the switch. Encodings, the handshake and the
// cmd_any option are this design's; the address compare is the document's.
module qp_dma #(
  parameter int unsigned PAGE_BYTES = 16384,
  parameter int unsigned NFRAMES    = 32,
  localparam int unsigned AW = $clog2(PAGE_BYTES),
  localparam int unsigned FW = (NFRAMES > 1) ? $clog2(NFRAMES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // byte-slot timing and the common address register
  input  logic [AW-1:0] addr,
  input  logic          slot_load,
  input  logic          shift_en,
  input  logic          slot_cap,
  input  logic          slot_end,
  // command from the processor
  input  logic          cmd_valid,
  output logic          cmd_ready,
  input  logic          cmd_write,   // 1: processor -> frame, 0: frame -> processor
  input  logic [FW-1:0] cmd_frame,
  input  logic [AW-1:0] cmd_start,   // starting address
  input  logic          cmd_any,     // start at the next byte, whatever its address
  input  logic [AW:0]   cmd_count,   // bytes to move, 1..PAGE_BYTES
  output logic          done,
  // data towards the processor memory
  output logic          rd_valid,
  output logic [AW-1:0] rd_addr,
  output logic [7:0]    rd_data,
  output logic          wr_take,     // supply the byte for address 'addr' now
  input  logic [7:0]    wr_data,
  // switch side
  output logic [FW-1:0] rd_sel,
  output logic [FW-1:0] wr_sel,
  output logic          wr_en,
  output logic          tx,
  input  logic          rx
);

  logic          busy, write_q, any_q, started, slot_act, last_q;
  logic [AW-1:0] start_q, cur_addr;
  logic [AW:0]   remaining;
  logic [7:0]    rx_byte;
  logic          go;

  assign cmd_ready = !busy;
  // this slot moves a byte
  assign go        = busy && (remaining != '0) && (started || any_q || (addr == start_q));
  assign wr_take   = slot_load && go && write_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      write_q   <= 1'b0;
      any_q     <= 1'b0;
      started   <= 1'b0;
      slot_act  <= 1'b0;
      last_q    <= 1'b0;
      start_q   <= '0;
      cur_addr  <= '0;
      remaining <= '0;
      rd_sel    <= '0;
      wr_sel    <= '0;
      wr_en     <= 1'b0;
      done      <= 1'b0;
      rd_valid  <= 1'b0;
      rd_addr   <= '0;
      rd_data   <= '0;
    end else begin
      done     <= 1'b0;
      rd_valid <= 1'b0;
      if (cmd_valid && !busy) begin
        busy      <= 1'b1;
        write_q   <= cmd_write;
        any_q     <= cmd_any;
        started   <= 1'b0;
        start_q   <= cmd_start;
        remaining <= cmd_count;
        slot_act  <= 1'b0;
        last_q    <= 1'b0;
        if (cmd_write) wr_sel <= cmd_frame;
        else           rd_sel <= cmd_frame;
      end
      if (slot_load) begin
        slot_act <= go;
        wr_en    <= go && write_q;
        if (go) begin
          started   <= 1'b1;
          cur_addr  <= addr;
          remaining <= remaining - 1'b1;
          last_q    <= (remaining == (AW+1)'(1));
        end
      end
      if (slot_cap && slot_act && !write_q) begin
        rd_valid <= 1'b1;
        rd_addr  <= cur_addr;
        rd_data  <= rx_byte;
        if (last_q) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
      if (slot_end && slot_act && write_q && last_q) begin
        busy  <= 1'b0;
        done  <= 1'b1;
        wr_en <= 1'b0;
      end
      if (slot_end) slot_act <= 1'b0;
    end
  end

  sipo_sr #(.W(8)) u_rx_sr (
    .clk, .rst_n,
    .shift(shift_en),
    .sin  (rx),
    .dout (rx_byte)
  );

  piso_sr #(.W(8)) u_tx_sr (
    .clk, .rst_n,
    .load (wr_take),
    .shift(shift_en),
    .din  (wr_data),
    .sout (tx)
  );

  a_count: assert property (@(posedge clk) disable iff (!rst_n)
                            (cmd_valid && cmd_ready) |-> (cmd_count != '0 && cmd_count <= (AW+1)'(PAGE_BYTES)))
    else $error("qp_dma: byte count out of range");

endmodule

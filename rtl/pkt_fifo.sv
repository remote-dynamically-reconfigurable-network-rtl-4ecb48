// pkt_fifo: store-and-forward packet FIFO with per-packet verdict.
//
// The middlebox buffers whole packets: the input buffer holds up to
// 2048 bytes (256 beats of 8 bytes), enough for any Ethernet v2 frame, and
// the application region uses a second one to throw away packets its
// protection module rejects. A packet becomes visible on the read side only
// after its last beat has been written and committed, so a downstream stage
// never sees half a packet and a late decision can still cancel it.
//
// Write side: beats are taken when in_valid && in_ready. In the cycle after
// a last beat is taken (the commit cycle, in_ready is low) the FIFO samples
// cm_drop and cm_meta: with cm_drop high the packet is removed again (the
// write pointer rolls back to the packet's first beat), otherwise it is
// committed and cm_meta is stored with it. When the FIFO is full, in_ready
// waits for the reader, except when the packet alone fills the whole FIFO:
// such an oversize packet can never fit, so the rest of it is accepted and
// discarded and `oversize` pulses in its commit cycle.
//
// Read side: out_beat is the oldest committed beat when out_valid is high;
// out_meta is the metadata of the packet it belongs to, steady for all of
// its beats. Timing: one beat per cycle in and out, one idle input cycle per
// packet, and a packet can be read from the cycle after its commit cycle.
// DEPTH must be a power of two. Dropping oversize packets, the commit
// cycle and the metadata store are choices of this design; the 2048-byte
// size follows the document.
module pkt_fifo
  import mb_pkg::*;
#(
  parameter int unsigned DEPTH  = 256,   // beats of 8 bytes: 2048 bytes
  parameter int unsigned META_W = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // write side
  input  logic              in_valid,
  output logic              in_ready,
  input  beat_t             in_beat,
  input  logic              cm_drop,
  input  logic [META_W-1:0] cm_meta,
  // read side
  output logic              out_valid,
  input  logic              out_ready,
  output beat_t             out_beat,
  output logic [META_W-1:0] out_meta,
  // one-cycle event pulses
  output logic              committed,
  output logic              dropped,
  output logic              oversize
);
  localparam int unsigned AW = $clog2(DEPTH);

  beat_t             mem  [DEPTH];
  logic [META_W-1:0] meta [DEPTH];

  // Pointers carry one extra bit to tell a full FIFO from an empty one.
  logic [AW:0] wr_ptr, pkt_start, cm_ptr, rd_ptr, rd_start;
  logic        commit_cyc, discard;
  logic        full, fire_in, fire_out, write_beat;

  assign full      = (wr_ptr - rd_ptr) == (AW+1)'(DEPTH);
  assign in_ready  = !commit_cyc && (discard || !full ||
                                     ((wr_ptr - pkt_start) == (AW+1)'(DEPTH)));
  assign fire_in   = in_valid && in_ready;
  // A beat is stored unless the packet is being discarded or has just been
  // found to be oversize (FIFO full with nothing but this packet in it).
  assign write_beat = fire_in && !discard && !full;

  always_ff @(posedge clk) begin
    if (write_beat) mem[wr_ptr[AW-1:0]] <= in_beat;
    if (commit_cyc && !discard && !cm_drop) meta[pkt_start[AW-1:0]] <= cm_meta;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr     <= '0;
      pkt_start  <= '0;
      cm_ptr     <= '0;
      commit_cyc <= 1'b0;
      discard    <= 1'b0;
      committed  <= 1'b0;
      dropped    <= 1'b0;
      oversize   <= 1'b0;
    end else begin
      committed <= 1'b0;
      dropped   <= 1'b0;
      oversize  <= 1'b0;
      if (commit_cyc) begin
        commit_cyc <= 1'b0;
        discard    <= 1'b0;
        if (discard) begin
          oversize <= 1'b1;
          wr_ptr   <= pkt_start;
        end else if (cm_drop) begin
          dropped  <= 1'b1;
          wr_ptr   <= pkt_start;
        end else begin
          committed <= 1'b1;
          cm_ptr    <= wr_ptr;
          pkt_start <= wr_ptr;
        end
      end else if (fire_in) begin
        if (write_beat) begin
          wr_ptr <= wr_ptr + 1'b1;
        end else if (!discard) begin
          // Oversize: forget what was stored of this packet.
          discard <= 1'b1;
          wr_ptr  <= pkt_start;
        end
        if (in_beat.last) commit_cyc <= 1'b1;
      end
    end
  end

  // Read side
  assign out_valid = (rd_ptr != cm_ptr);
  assign out_beat  = mem[rd_ptr[AW-1:0]];
  assign out_meta  = meta[rd_start[AW-1:0]];
  assign fire_out  = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr   <= '0;
      rd_start <= '0;
    end else if (fire_out) begin
      rd_ptr <= rd_ptr + 1'b1;
      if (out_beat.last) rd_start <= rd_ptr + 1'b1;
    end
  end

  a_depth_pow2: assert property (@(posedge clk) (DEPTH == (1 << AW)));
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 (wr_ptr - rd_ptr) <= (AW+1)'(DEPTH));
  a_out_hold:   assert property (@(posedge clk) disable iff (!rst_n)
                                 out_valid && !out_ready |=> out_valid);
endmodule

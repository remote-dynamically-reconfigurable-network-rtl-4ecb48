// fwd_learn: learning-switch forwarding module.
//
// The second forwarding algorithm the forwarding region can be loaded
// with. It learns which port each Ethernet source address lives behind and
// sends a packet only to the port of its destination address when that is
// known; a packet to an unknown, broadcast or multicast address is flooded
// to every port except the one it came in on. A packet is never sent back
// out of its own source port.
//
// How it works: the address table has TABLE_SIZE entries of {valid,
// 48-bit address, one-hot port}. On the first beat of a packet (which holds
// the whole destination address, bytes 0-5) all entries are compared at
// once and the destination ports are decided; the decision is kept for the
// packet's other beats. The source address (bytes 6-11) is complete on the
// second beat; it then updates its entry's port, or takes a new entry,
// replacing entries in round-robin order when the table is full.
//
// Interface: out_beat is in_beat with dst_port rewritten, combinationally;
// `fire` marks a beat that is transferred, which is when the packet
// position advances and learning happens. Frames shorter than two beats are
// forwarded but not learned from. There is no ageing. The table size and
// replacement policy are this design's choices; the thesis states only that
// the forwarding algorithm can be replaced remotely.
module fwd_learn
  import mb_pkg::*;
#(
  parameter int unsigned TABLE_SIZE = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  beat_t in_beat,
  input  logic  fire,
  output beat_t out_beat
);
  localparam int unsigned IW = (TABLE_SIZE > 1) ? $clog2(TABLE_SIZE) : 1;

  logic [TABLE_SIZE-1:0]                 tab_valid;
  logic [TABLE_SIZE-1:0][47:0]           tab_mac;
  logic [TABLE_SIZE-1:0][NUM_PORTS-1:0]  tab_port;
  logic [IW-1:0]                         next_slot;

  logic                 first, second;
  logic [NUM_PORTS-1:0] dst_q;
  logic [15:0]          src_hi;        // source address bytes 6-7 from beat 0

  // Bytes 0..5 of a beat as a big-endian 48-bit address.
  function automatic logic [47:0] mac_at0(input logic [63:0] d);
    return {d[7:0], d[15:8], d[23:16], d[31:24], d[39:32], d[47:40]};
  endfunction

  logic [47:0]          dst_mac, src_mac;
  logic                 hit;
  logic [NUM_PORTS-1:0] hit_port, dst_now;

  assign dst_mac = mac_at0(in_beat.data);
  assign src_mac = {src_hi, in_beat.data[7:0], in_beat.data[15:8],
                    in_beat.data[23:16], in_beat.data[31:24]};

  always_comb begin
    hit      = 1'b0;
    hit_port = '0;
    for (int e = 0; e < int'(TABLE_SIZE); e++)
      if (tab_valid[e] && tab_mac[e] == dst_mac) begin
        hit      = 1'b1;
        hit_port = tab_port[e];
      end
    // multicast / broadcast addresses have bit 0 of their first byte set
    if (hit && !dst_mac[40]) dst_now = hit_port & ~in_beat.src_port;
    else                     dst_now = ~in_beat.src_port;
  end

  always_comb begin
    out_beat = in_beat;
    out_beat.dst_port = first ? dst_now : dst_q;
  end

  // Entry holding the source address, if any.
  logic          src_hit;
  logic [IW-1:0] src_idx;
  always_comb begin
    src_hit = 1'b0;
    src_idx = '0;
    for (int e = 0; e < int'(TABLE_SIZE); e++)
      if (tab_valid[e] && tab_mac[e] == src_mac) begin
        src_hit = 1'b1;
        src_idx = IW'(e);
      end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      first     <= 1'b1;
      second    <= 1'b0;
      dst_q     <= '0;
      src_hi    <= '0;
      tab_valid <= '0;
      next_slot <= '0;
    end else if (fire) begin
      first  <= in_beat.last;
      second <= first && !in_beat.last;
      if (first) begin
        dst_q  <= dst_now;
        src_hi <= {in_beat.data[55:48], in_beat.data[63:56]};
      end
      if (second && !src_mac[40] && (&in_beat.keep[3:0])) begin
        if (src_hit) begin
          tab_port[src_idx] <= in_beat.src_port;
        end else begin
          tab_valid[next_slot] <= 1'b1;
          tab_mac[next_slot]   <= src_mac;
          tab_port[next_slot]  <= in_beat.src_port;
          next_slot <= (next_slot == IW'(TABLE_SIZE - 1)) ? '0 : next_slot + 1'b1;
        end
      end
    end
  end
endmodule

// hdr_parser: picks the Ethernet, IPv4 and TCP/UDP header fields out of a
// packet as its 64-bit beats go by.
//
// It only watches the stream: `fire` marks a beat that is being transferred.
// A beat counter tells which bytes of the frame a beat carries, and each
// field is captured from the beat that holds it (EtherType bytes 12-13,
// IPv4 version/IHL byte 14, protocol byte 23, destination address bytes
// 30-33, TCP/UDP ports bytes 34-37, UDP length bytes 38-39). Fields are
// cleared on the first beat of every packet. Only IPv4 headers without
// options (IHL 5) are decoded as such; for other frames is_ipv4 and is_l4
// stay low. VLAN tags are not decoded.
//
// Timing: the fields of a beat accepted in cycle t are visible from cycle
// t+1, and everything about a packet is visible in the cycle after its last
// beat, where they stay until the first beat of the next packet is taken.
// The byte offsets are standard protocol layout; the beat format is this
// design's own (see mb_pkg).
module hdr_parser
  import mb_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  beat_t beat,
  input  logic  fire,
  output hdr_t  hdr
);
  logic [2:0]  idx;        // beat number within the packet, saturating at 7
  logic [15:0] ethertype;
  logic [7:0]  ver_ihl, proto;
  logic [31:0] ip_dst;
  logic [15:0] l4_src, l4_dst, udp_len;
  logic        seen_l4;

  function automatic logic [7:0] byte_of(input beat_t b, input int unsigned i);
    return b.data[8*i +: 8];
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      idx       <= '0;
      ethertype <= '0;
      ver_ihl   <= '0;
      proto     <= '0;
      ip_dst    <= '0;
      l4_src    <= '0;
      l4_dst    <= '0;
      udp_len   <= '0;
      seen_l4   <= 1'b0;
    end else if (fire) begin
      idx <= beat.last ? 3'd0 : ((idx == 3'd7) ? idx : idx + 3'd1);
      unique case (idx)
        3'd0: begin
          ethertype <= '0;
          ver_ihl   <= '0;
          proto     <= '0;
          ip_dst    <= '0;
          l4_src    <= '0;
          l4_dst    <= '0;
          udp_len   <= '0;
          seen_l4   <= 1'b0;
        end
        3'd1: begin
          ethertype <= {byte_of(beat, 4), byte_of(beat, 5)};
          ver_ihl   <= byte_of(beat, 6);
        end
        3'd2: proto <= byte_of(beat, 7);
        3'd3: ip_dst[31:16] <= {byte_of(beat, 6), byte_of(beat, 7)};
        3'd4: begin
          ip_dst[15:0] <= {byte_of(beat, 0), byte_of(beat, 1)};
          l4_src  <= {byte_of(beat, 2), byte_of(beat, 3)};
          l4_dst  <= {byte_of(beat, 4), byte_of(beat, 5)};
          udp_len <= {byte_of(beat, 6), byte_of(beat, 7)};
          seen_l4 <= &beat.keep[5:2];
        end
        default: ;
      endcase
    end
  end

  always_comb begin
    hdr.ethertype = ethertype;
    hdr.ihl       = ver_ihl[3:0];
    hdr.ip_proto  = proto;
    hdr.ip_dst    = ip_dst;
    hdr.l4_src    = l4_src;
    hdr.l4_dst    = l4_dst;
    hdr.udp_len   = udp_len;
    hdr.is_ipv4   = (ethertype == ETH_IPV4) && (ver_ihl == 8'h45);
    hdr.is_l4     = hdr.is_ipv4 && seen_l4 &&
                    ((proto == PROTO_TCP) || (proto == PROTO_UDP));
  end
endmodule

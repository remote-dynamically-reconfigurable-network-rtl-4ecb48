// tb_pkt_pkg: packet construction helpers shared by the testbenches.
//
// Frames are built as byte queues (Ethernet II, IPv4 without options, UDP
// or TCP) and cut into the 64-bit beats of mb_pkg: byte 8*i+j of the frame
// is byte j of beat i. Checksums are left zero; the design does not use
// them.
package tb_pkt_pkg;
  import mb_pkg::*;

  typedef byte unsigned bytes_t[$];

  function automatic bytes_t eth_ipv4(input logic [31:0] ip_dst, input logic [7:0] proto,
                                      input logic [15:0] sport, input logic [15:0] dport,
                                      input bytes_t payload);
    bytes_t q;
    int l4len, iplen;
    l4len = (proto == PROTO_TCP ? 20 : 8) + payload.size();
    iplen = 20 + l4len;
    q = '{8'h02, 8'h00, 8'h00, 8'h00, 8'h00, 8'h01,      // destination MAC
          8'h02, 8'h00, 8'h00, 8'h00, 8'h00, 8'h02,      // source MAC
          8'h08, 8'h00,                                  // EtherType IPv4
          8'h45, 8'h00, iplen[15:8], iplen[7:0],         // version/IHL, TOS, length
          8'h12, 8'h34, 8'h40, 8'h00,                    // id, flags
          8'h40, proto, 8'h00, 8'h00,                    // TTL, protocol, checksum
          8'd10, 8'd0, 8'd0, 8'd7,                       // source address
          ip_dst[31:24], ip_dst[23:16], ip_dst[15:8], ip_dst[7:0],
          sport[15:8], sport[7:0], dport[15:8], dport[7:0]};
    if (proto == PROTO_TCP) begin
      // sequence, acknowledgement, offset 5, flags ACK|PSH, window, checksum, urgent
      for (int i = 0; i < 16; i++)
        q.push_back(i == 3 ? 8'h01 : i == 8 ? 8'h50 : i == 9 ? 8'h18 : i == 10 ? 8'h20 : 8'h00);
    end else begin
      q.push_back(l4len[15:8]);
      q.push_back(l4len[7:0]);
      q.push_back(8'h00);
      q.push_back(8'h00);
    end
    return {q, payload};
  endfunction

  // Payload of n bytes, byte i = (seed + 7*i) mod 251 (never a signature run).
  function automatic bytes_t fill(input int n, input int seed);
    bytes_t q;
    for (int i = 0; i < n; i++) q.push_back(8'((seed + 7 * i) % 251));
    return q;
  endfunction

  // A bitstream packet: reconfiguration header then the bitstream bytes.
  function automatic bytes_t rcfg_frame(input logic [31:0] ip_dst, input logic [15:0] port,
                                      input logic [7:0] flags, input logic [7:0] target,
                                      input logic [7:0] module_id, input bytes_t bs);
    bytes_t p;
    p = '{flags, target, module_id, 8'h00, 8'h00, 8'h00};
    return eth_ipv4(ip_dst, PROTO_UDP, 16'd5555, port, {p, bs});
  endfunction

  function automatic int nbeats(input bytes_t q);
    return (q.size() + 7) / 8;
  endfunction

  function automatic beat_t get_beat(input bytes_t q, input int i,
                                     input logic [NUM_PORTS-1:0] src);
    beat_t b;
    b = '0;
    for (int j = 0; j < 8; j++) begin
      if (8 * i + j < q.size()) begin
        b.data[8*j +: 8] = q[8*i + j];
        b.keep[j] = 1'b1;
      end
    end
    b.last     = (i == nbeats(q) - 1);
    b.src_port = src;
    return b;
  endfunction

  // Append the valid bytes of a beat to a queue.
  function automatic bytes_t add_beat(input bytes_t q, input beat_t b);
    for (int j = 0; j < 8; j++)
      if (b.keep[j]) q.push_back(b.data[8*j +: 8]);
    return q;
  endfunction
endpackage

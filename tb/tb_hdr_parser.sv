// tb_hdr_parser: self-checking test of the header parser. UDP, TCP,
// non-IPv4 and IPv4-with-options frames with random ports and addresses
// are streamed through; in the cycle after each last beat the extracted
// fields and the is_ipv4 / is_l4 flags are compared with the values the
// frames were built from.
`define TB_WATCHDOG 50000
module tb_hdr_parser;
  import mb_pkg::*;
  import tb_pkt_pkg::*;
`include "tb_common.svh"

  beat_t beat = '0;
  logic  fire = 1'b0;
  hdr_t  hdr;

  hdr_parser dut (.*);

  task automatic stream(input bytes_t q);
    for (int i = 0; i < nbeats(q); i++) begin
      beat = get_beat(q, i, 4'b0010);
      fire = ($urandom_range(3) != 0);
      @(negedge clk);
      if (!fire) i--;
    end
    fire = 1'b0;
    beat = '0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int k = 0; k < 200; k++) begin
      bytes_t q;
      logic [31:0] ip;
      logic [15:0] sp, dp;
      logic [7:0]  proto;
      int kind, plen;
      ip = $urandom; sp = 16'($urandom); dp = 16'($urandom);
      kind = $urandom_range(3);
      plen = $urandom_range(100);
      proto = (kind == 1) ? PROTO_TCP : PROTO_UDP;
      q = eth_ipv4(ip, proto, sp, dp, fill(plen, k));
      if (kind == 2) q[13] = 8'h06;          // ARP EtherType
      if (kind == 3) q[14] = 8'h46;          // IPv4 with options
      stream(q);
      // fields of the packet are visible now
      check(hdr.ethertype == ((kind == 2) ? 16'h0806 : 16'h0800), "ethertype");
      check(hdr.is_ipv4 == (kind < 2), $sformatf("is_ipv4 kind %0d", kind));
      check(hdr.is_l4 == (kind < 2), $sformatf("is_l4 kind %0d", kind));
      check(hdr.ip_proto == proto && hdr.ip_dst == ip, "protocol / address");
      check(hdr.l4_src == sp && hdr.l4_dst == dp, "ports");
      if (kind == 0) check(hdr.udp_len == 16'(8 + plen), "udp length");
      repeat ($urandom_range(2)) @(negedge clk);
    end
    finish_tb();
  end
endmodule

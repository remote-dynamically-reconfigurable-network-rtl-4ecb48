// tb_nips: self-checking test of the stateless intrusion prevention
// module. Random packets are given a signature ("/bin/sh", "cmd.exe",
// "root:" or eight NOP bytes) at a random byte offset, so that signatures
// fall inside a beat and across beat boundaries, or a signature with its
// last byte changed, or nothing. The verdict after each packet must match;
// a signature split between the end of one packet and the start of the
// next must not be reported.
`define TB_WATCHDOG 100000
module tb_nips;
  import mb_pkg::*;
  import tb_pkt_pkg::*;
`include "tb_common.svh"

  beat_t beat = '0;
  logic  fire = 1'b0;
  logic  drop;

  nips dut (.*);

  function automatic bytes_t sig(input int s);
    case (s)
      0: return '{8'h2F, 8'h62, 8'h69, 8'h6E, 8'h2F, 8'h73, 8'h68};
      1: return '{8'h63, 8'h6D, 8'h64, 8'h2E, 8'h65, 8'h78, 8'h65};
      2: return '{8'h72, 8'h6F, 8'h6F, 8'h74, 8'h3A};
      default: return '{8'h90, 8'h90, 8'h90, 8'h90, 8'h90, 8'h90, 8'h90, 8'h90};
    endcase
  endfunction

  task automatic stream(input bytes_t q);
    for (int i = 0; i < nbeats(q); i++) begin
      beat = get_beat(q, i, 4'b0001);
      fire = ($urandom_range(4) != 0);
      @(negedge clk);
      if (!fire) i--;
    end
    fire = 1'b0;
  endtask

  initial begin
    int hits;
    hits = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int k = 0; k < 400; k++) begin
      bytes_t q, s;
      int kind, off;
      q = eth_ipv4($urandom, PROTO_TCP, 16'd80, 16'd1234, fill(20 + $urandom_range(150), k));
      kind = $urandom_range(2);      // 0 clean, 1 signature, 2 near miss
      s = sig($urandom_range(3));
      if (kind == 2) s[s.size() - 1] = s[s.size() - 1] ^ 8'h01;
      if (kind != 0) begin
        off = $urandom_range(q.size() - s.size());
        foreach (s[j]) q[off + j] = s[j];
      end
      stream(q);
      check(drop == (kind == 1), $sformatf("packet %0d kind %0d offset %0d", k, kind, off));
      if (drop) hits++;
    end
    // "/bin" at the end of one packet, "/sh" at the start of the next
    begin
      bytes_t a, b;
      a = eth_ipv4(32'h01020304, PROTO_UDP, 16'd1, 16'd2, fill(30, 1));
      a.push_back(8'h2F); a.push_back(8'h62); a.push_back(8'h69); a.push_back(8'h6E);
      b = '{8'h2F, 8'h73, 8'h68};
      b = {b, fill(60, 2)};
      stream(a);
      check(!drop, "first half alone");
      stream(b);
      check(!drop, "signature split across packets");
    end
    check(hits > 80, "signatures were found");
    finish_tb();
  end
endmodule

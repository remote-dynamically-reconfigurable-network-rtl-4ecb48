// tb_port_firewall: self-checking test of the port-based firewall. TCP and
// UDP packets to and from blocked ports (23, 135, 445, 3389) must be
// rejected, others let through, non-IPv4 frames always let through; the
// verdict is read in the cycle after each packet's last beat.
`define TB_WATCHDOG 50000
module tb_port_firewall;
  import mb_pkg::*;
  import tb_pkt_pkg::*;
`include "tb_common.svh"

  beat_t beat = '0;
  logic  fire = 1'b0;
  logic  drop;

  port_firewall dut (.*);

  int blocked[4] = '{23, 135, 445, 3389};

  initial begin
    int n_drop;
    n_drop = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int k = 0; k < 300; k++) begin
      bytes_t q;
      logic [15:0] sp, dp;
      bit exp_drop, arp;
      sp = 16'(1024 + $urandom_range(50000));
      dp = 16'(1024 + $urandom_range(50000));
      case ($urandom_range(3))
        0: dp = 16'(blocked[$urandom_range(3)]);
        1: sp = 16'(blocked[$urandom_range(3)]);
        default: ;
      endcase
      if ($urandom_range(9) == 0) dp = 16'd22;   // a neighbour of a blocked port
      arp = ($urandom_range(9) == 0);
      exp_drop = 1'b0;
      foreach (blocked[r]) if (sp == blocked[r] || dp == blocked[r]) exp_drop = 1'b1;
      q = eth_ipv4($urandom, $urandom_range(1) ? PROTO_TCP : PROTO_UDP, sp, dp,
                   fill($urandom_range(60), k));
      if (arp) begin
        q[12] = 8'h08; q[13] = 8'h06;
        exp_drop = 1'b0;
      end
      for (int i = 0; i < nbeats(q); i++) begin
        beat = get_beat(q, i, 4'b0001);
        fire = 1'b1;
        @(negedge clk);
      end
      fire = 1'b0;
      check(drop == exp_drop, $sformatf("packet %0d ports %0d/%0d: drop %0b", k, sp, dp, drop));
      if (drop) n_drop++;
    end
    check(n_drop > 50, "some packets were blocked");
    finish_tb();
  end
endmodule

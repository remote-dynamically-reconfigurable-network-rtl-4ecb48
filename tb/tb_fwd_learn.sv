// tb_fwd_learn: self-checking test of the learning-switch forwarding module.
// Twenty hosts, more than the 16-entry address table holds, send frames to
// each other through four ports; a host now and then moves to another port.
// Some frames go to the broadcast address and some are too short to carry a
// whole source address. Every beat's destination ports are compared with a
// reference table kept by the testbench (flood to all but the source port
// when the destination is unknown or multicast, else the learned port minus
// the source port; round-robin replacement when full), and every other
// field must pass unchanged. Idle cycles are mixed in between beats.
`define TB_WATCHDOG 200000
module tb_fwd_learn;
  import mb_pkg::*;
  import tb_pkt_pkg::*;
`include "tb_common.svh"

  localparam int TS = 16;
  localparam int NH = 20;

  beat_t in_beat = '0, out_beat;
  logic  fire = 1'b0;

  fwd_learn dut (.*);

  // reference address table
  bit          r_valid[TS] = '{default: 1'b0};
  logic [47:0] r_mac[TS];
  logic [3:0]  r_port[TS];
  int          r_next = 0;
  int          home[NH];
  int          n_flood = 0, n_direct = 0, n_bcast = 0, n_evict = 0, n_move = 0, n_zero = 0;

  function automatic logic [47:0] host_mac(input int h);
    return {8'h02, 8'h00, 8'h5E, 8'h10, 8'(h >> 8), 8'(h)};
  endfunction

  function automatic logic [3:0] ref_dst(input logic [47:0] d, input logic [3:0] src);
    if (!d[40])
      for (int e = 0; e < TS; e++)
        if (r_valid[e] && r_mac[e] == d) return r_port[e] & ~src;
    return ~src;
  endfunction

  function automatic void ref_learn(input logic [47:0] s, input logic [3:0] src);
    for (int e = 0; e < TS; e++)
      if (r_valid[e] && r_mac[e] == s) begin
        r_port[e] = src;
        return;
      end
    if (r_valid[r_next]) n_evict++;
    r_valid[r_next] = 1'b1;
    r_mac[r_next]   = s;
    r_port[r_next]  = src;
    r_next = (r_next + 1) % TS;
  endfunction

  task automatic send(input int from, input logic [47:0] dmac, input int len);
    bytes_t q;
    logic [47:0] smac;
    logic [3:0] src, dst;
    beat_t b;
    smac = host_mac(from);
    src  = 4'(1 << home[from]);
    q = fill(len, from);
    for (int j = 0; j < 6 && j < len; j++) q[j] = dmac[47 - 8*j -: 8];
    for (int j = 0; j < 6 && 6 + j < len; j++) q[6 + j] = smac[47 - 8*j -: 8];
    dst = ref_dst(dmac, src);
    if (dmac[40]) n_bcast++;
    else if (dst == ~src) n_flood++;
    else if (dst == 0) n_zero++;
    else n_direct++;
    for (int i = 0; i < nbeats(q); i++) begin
      while ($urandom_range(3) == 0) @(negedge clk);
      b = get_beat(q, i, src);
      in_beat = b;
      fire = 1'b1;
      #1;
      checks++;
      if (out_beat.dst_port != dst) begin
        failures++;
        $display("FAIL: host %0d -> %h beat %0d: dst %b, expected %b",
                 from, dmac, i, out_beat.dst_port, dst);
      end
      b.dst_port = out_beat.dst_port;
      check(out_beat == b, "other fields unchanged");
      @(negedge clk);
      fire = 1'b0;
    end
    if (len >= 12) ref_learn(smac, src);
  endtask

  initial begin
    foreach (home[h]) home[h] = h % 4;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // a destination nobody has announced is flooded
    send(0, host_mac(1), 64);
    // host 1 answers; host 0 is known by now
    send(1, host_mac(0), 64);
    send(0, host_mac(1), 64);
    for (int k = 0; k < 1500; k++) begin
      int from, to, len;
      from = $urandom_range(NH - 1);
      to   = $urandom_range(NH - 1);
      if ($urandom_range(50) == 0) begin
        home[from] = $urandom_range(3);
        n_move++;
      end
      case ($urandom_range(19))
        0:       len = 6 + $urandom_range(5);       // too short to learn from
        1:       len = 12;
        default: len = 14 + $urandom_range(120);
      endcase
      send(from, ($urandom_range(15) == 0) ? 48'hFFFF_FFFF_FFFF : host_mac(to), len);
    end
    // reset clears the table
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    r_valid = '{default: 1'b0};
    r_next = 0;
    send(2, host_mac(3), 64);
    check(n_flood > 0 && n_direct > 0 && n_bcast > 0, "flood, direct and broadcast seen");
    check(n_evict > 0, "table entries replaced");
    check(n_move > 0, "hosts moved");
    $display("flooded %0d, direct %0d, broadcast %0d, same-port %0d, replaced %0d, moves %0d",
             n_flood, n_direct, n_bcast, n_zero, n_evict, n_move);
    finish_tb();
  end
endmodule

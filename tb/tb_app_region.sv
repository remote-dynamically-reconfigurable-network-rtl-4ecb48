// tb_app_region: self-checking test of the reconfigurable protection
// region. A mix of clean packets, packets to blocked ports and packets
// carrying a signature is sent first with the firewall loaded (blocked
// ports rejected, signatures let through) and then, after isolation and a
// load of module 1, with the intrusion prevention module (the reverse).
// The packets that come out, byte for byte, and the pass/drop counts must
// match a reference; isolation must wait for the packet in flight.
`define TB_WATCHDOG 200000
module tb_app_region;
  import mb_pkg::*;
  import tb_pkt_pkg::*;
`include "tb_common.svh"

  logic       in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1;
  beat_t      in_beat = '0, out_beat;
  logic       iso_req = 1'b0, iso_ack, load = 1'b0;
  logic [7:0] load_module = '0, module_id;
  logic       passed, dropped;

  app_region dut (.*);

  bytes_t exp[$], cur;
  int n_out = 0, n_pass = 0, n_drop = 0, leak = 0;

  always @(posedge clk) if (rst_n) begin
    if (passed) n_pass++;
    if (dropped) n_drop++;
    if (iso_ack && in_valid && in_ready) leak++;
    if (out_valid && out_ready) begin
      cur = add_beat(cur, out_beat);
      if (out_beat.last) begin
        checks++;
        if (exp.size() == 0 || cur != exp[0]) begin
          failures++;
          $display("FAIL: packet %0d", n_out);
        end
        if (exp.size()) void'(exp.pop_front());
        cur.delete();
        n_out++;
      end
    end
  end

  always @(negedge clk) out_ready = ($urandom_range(3) != 0);

  // kind 0 clean, 1 blocked port, 2 signature
  task automatic send(input int kind, input bit nips_loaded, input int k);
    bytes_t q;
    q = eth_ipv4($urandom, PROTO_TCP, 16'd40000, kind == 1 ? 16'd445 : 16'd80,
                 fill(30 + $urandom_range(200), k));
    if (kind == 2) begin
      q[60] = 8'h63; q[61] = 8'h6D; q[62] = 8'h64; q[63] = 8'h2E;
      q[64] = 8'h65; q[65] = 8'h78; q[66] = 8'h65;
    end
    if (!(kind == 1 && !nips_loaded) && !(kind == 2 && nips_loaded)) exp.push_back(q);
    for (int i = 0; i < nbeats(q); i++) begin
      in_valid = 1'b1;
      in_beat = get_beat(q, i, 4'b0001);
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    in_valid = 1'b0;
  endtask

  initial begin
    int e_drop;
    e_drop = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(module_id == APP_FIREWALL, "firewall after reset");
    for (int k = 0; k < 60; k++) begin
      int kind;
      kind = $urandom_range(2);
      if (kind == 1) e_drop++;
      send(kind, 1'b0, k);
    end
    // reconfigure to intrusion prevention
    fork
      send(0, 1'b0, 999);
      begin @(negedge clk); iso_req = 1'b1; end
    join
    repeat (2) @(negedge clk);
    check(iso_ack, "isolated");
    repeat (5) @(negedge clk);
    load = 1'b1; load_module = APP_NIPS;
    @(negedge clk);
    load = 1'b0;
    iso_req = 1'b0;
    @(negedge clk);
    check(module_id == APP_NIPS, "intrusion prevention loaded");
    for (int k = 0; k < 60; k++) begin
      int kind;
      kind = $urandom_range(2);
      if (kind == 2) e_drop++;
      send(kind, 1'b1, 100 + k);
    end
    repeat (400) @(negedge clk);
    check(exp.size() == 0, $sformatf("%0d packets missing", exp.size()));
    check(n_drop == e_drop && n_pass == n_out, $sformatf("drops %0d of %0d, passes %0d of %0d",
                                                      n_drop, e_drop, n_pass, n_out));
    check(leak == 0, "nothing entered while isolated");
    finish_tb();
  end
endmodule

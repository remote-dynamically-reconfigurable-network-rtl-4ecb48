// tb_fwd_region: self-checking test of the reconfigurable forwarding
// region. Packets from random ports must come out unchanged except for the
// destination ports chosen by the loaded module: port pairs after reset,
// the learning switch after a load of module 1 (flooding until the
// destination has been seen as a source, and again after a reload, which
// clears the address table). An isolation request raised in the
// middle of a packet must be acknowledged only after that packet's last
// beat, and no beat may pass while the region is isolated.
`define TB_WATCHDOG 50000
module tb_fwd_region;
  import mb_pkg::*;
  import tb_pkt_pkg::*;
`include "tb_common.svh"

  logic       in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1;
  beat_t      in_beat = '0, out_beat;
  logic       iso_req = 1'b0, iso_ack, load = 1'b0;
  logic [7:0] load_module = '0, module_id;

  fwd_region dut (.*);

  typedef struct { bytes_t b; logic [3:0] dst; } pkt_t;
  pkt_t   exp[$];
  bytes_t cur;
  int     n_out = 0, leak = 0;

  always @(posedge clk) if (rst_n) begin
    if (iso_ack && (out_valid || (in_valid && in_ready))) leak++;
    if (out_valid && out_ready) begin
      cur = add_beat(cur, out_beat);
      checks++;
      if (exp.size() == 0 || out_beat.dst_port != exp[0].dst) begin
        failures++;
        $display("FAIL: dst %b", out_beat.dst_port);
      end
      if (out_beat.last) begin
        checks++;
        if (exp.size() == 0 || cur != exp[0].b) begin
          failures++;
          $display("FAIL: packet %0d content", n_out);
        end
        if (exp.size()) void'(exp.pop_front());
        cur.delete();
        n_out++;
      end
    end
  end

  always @(negedge clk) out_ready = ($urandom_range(3) != 0);

  // reply: swap the two Ethernet addresses; want: expected ports, 0 = rule
  task automatic send(input int p, input bit flood, input int iso_at,
                      input bit reply = 1'b0, input logic [3:0] want = '0);
    bytes_t q;
    logic [3:0] src, dst;
    q = eth_ipv4($urandom, PROTO_UDP, 16'd1, 16'd2, fill(20 + $urandom_range(100), p));
    if (reply) begin q[5] = 8'h02; q[11] = 8'h01; end
    src = 4'(1 << p);
    dst = (want != 0) ? want : flood ? ~src : 4'(1 << (p ^ 1));
    exp.push_back('{q, dst});
    for (int i = 0; i < nbeats(q); i++) begin
      if (i == iso_at) iso_req = 1'b1;
      in_valid = 1'b1;
      in_beat = get_beat(q, i, src);
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      if (i < nbeats(q) - 1) check(!iso_ack, "no isolation inside a packet");
    end
    in_valid = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(module_id == FWD_PAIR, "pairing after reset");
    for (int k = 0; k < 30; k++) send($urandom_range(3), 1'b0, -1);
    // isolate in the middle of a packet, reload, release
    send(2, 1'b0, 3);
    repeat (3) @(negedge clk);
    check(iso_ack, "isolated at the packet boundary");
    // a packet offered while isolated must wait
    fork
      send(1, 1'b1, -1);
      begin
        repeat (10) @(negedge clk);
        load = 1'b1; load_module = FWD_LEARN;
        @(negedge clk);
        load = 1'b0;
        iso_req = 1'b0;
      end
    join
    check(module_id == FWD_LEARN, "learning switch loaded");
    for (int k = 0; k < 30; k++) send($urandom_range(3), 1'b1, -1);
    // the sender is now behind port 1; the host the test traffic goes to
    // answers from port 3 and is learned
    send(1, 1'b1, -1);
    send(3, 1'b1, -1, 1'b1, 4'b0010);
    send(0, 1'b1, -1, 1'b0, 4'b1000);
    send(2, 1'b1, -1, 1'b0, 4'b1000);
    // reloading the learning switch clears its table
    while (exp.size() != 0) @(negedge clk);
    load = 1'b1; load_module = FWD_LEARN;
    @(negedge clk);
    load = 1'b0;
    send(0, 1'b1, -1);
    repeat (20) @(negedge clk);
    check(exp.size() == 0, "all packets out");
    check(leak == 0, $sformatf("%0d beats moved while isolated", leak));
    finish_tb();
  end
endmodule

// tb_mb_top: end-to-end test of the middlebox at its default parameters.
//
// One packet stream goes in (as the Ethernet MACs would deliver it) and the
// output stream, the ICAP port and the status counters are checked:
//   1. traffic with the reset configuration (port pairing, firewall):
//      packets to blocked ports are dropped, the rest leave on the partner
//      port; an oversize (2056-byte) frame is dropped at the input;
//   2. a 2600-byte partial bitstream for the application region arrives in
//      three UDP packets (1016 + 1016 + 568 bytes) with clean traffic
//      interleaved; traffic that reaches the dispatcher while a region is
//      out of service is dropped, the rest must arrive;
//      a 1020-byte bitstream packet is rejected and a bitstream packet with
//      no START is refused by the controller;
//   3. traffic with the intrusion prevention module: packets carrying a
//      signature are dropped, blocked ports now pass;
//   4. a one-packet bitstream switches the forwarding region to the
//      learning switch; traffic between four hosts, one behind each port,
//      is flooded until the destination host has sent a packet and then
//      goes to that host's port only.
// Every bitstream word must reach ICAP in order; the output is read with
// random back-pressure and ICAP is busy on a tenth of the cycles. Each
// mechanism is counted and a failure is counted for one that never
// happened. The reconfiguration throughput is reported for a 160 MHz
// clock and must reach the 350 Mb/s the platform is reported to achieve.
`define TB_WATCHDOG 400000
module tb_mb_top;
  import mb_pkg::*;
  import tb_pkt_pkg::*;
`include "tb_common.svh"

  localparam logic [31:0] DEV_IP = 32'hC0A8_0164;
  localparam logic [15:0] RPORT  = 16'd10000;

  logic        rx_valid = 1'b0, rx_ready, tx_valid, tx_ready = 1'b1;
  beat_t       rx_beat = '0, tx_beat;
  logic        icap_csib, icap_rdwrb, icap_busy, reconf_active;
  logic [31:0] icap_i;
  logic [7:0]  fwd_module, app_module;
  logic [7:0]  bs_fifo_level;
  logic [31:0] stat_rx_pkts, stat_traffic_pkts, stat_down_drops;
  logic [31:0] stat_rx_oversize, stat_rcfg_pkts, stat_rcfg_bad, stat_reconfigs,
               stat_icap_words, stat_ctrl_err, stat_app_drops, stat_app_pass;

  mb_top dut (.*);
  icap_model #(.BUSY_PCT(10)) u_icap (.clk(clk), .csib(icap_csib), .rdwrb(icap_rdwrb),
                                      .i(icap_i), .busy(icap_busy));

  // ------------------------------------------------------------ reference
  typedef struct { bytes_t b; logic [3:0] dst; bit any_fwd; bit maybe; } pkt_t;
  pkt_t   exp[$];
  bytes_t cur;
  logic [3:0] cur_dst, cur_src;
  logic [31:0] exp_words[$];
  int n_out = 0, n_sent = 0, n_skipped = 0;
  bit during_update = 1'b0;
  int busy_holds = 0;
  bit known[4] = '{default: 1'b0};
  int n_direct = 0, n_flood = 0;
  longint cyc = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (icap_busy && dut.u_ctrl.state == 2'd2 && dut.bs_rd_valid) busy_holds++;
    if (tx_valid && tx_ready) begin
      if (cur.size() == 0) cur_dst = tx_beat.dst_port;
      cur_src = tx_beat.src_port;
      cur = add_beat(cur, tx_beat);
      checks++;
      if (tx_beat.dst_port != cur_dst) begin
        failures++;
        $display("FAIL: destination changes inside packet %0d", n_out);
      end
      if (tx_beat.last) begin
        // packets sent during an update may have been dropped: skip them
        while (exp.size() > 1 && exp[0].maybe && cur != exp[0].b) begin
          void'(exp.pop_front());
          n_skipped++;
        end
        checks += 2;
        if (exp.size() == 0 || cur != exp[0].b) begin
          failures++;
          $display("FAIL: packet %0d content: %0d bytes, expected %0d", n_out, cur.size(),
                   exp.size() ? exp[0].b.size() : -1);
        end else if (!(cur_dst == exp[0].dst || (exp[0].any_fwd && cur_dst == ~cur_src))) begin
          failures++;
          $display("FAIL: packet %0d leaves on %b", n_out, cur_dst);
        end
        if (exp.size()) void'(exp.pop_front());
        cur.delete();
        n_out++;
      end
    end
  end

  always @(negedge clk) tx_ready = ($urandom_range(4) != 0);

  // ---------------------------------------------------------------- drive
  task automatic put_frame(input bytes_t q, input logic [3:0] src);
    for (int i = 0; i < nbeats(q); i++) begin
      rx_valid = 1'b1;
      rx_beat = get_beat(q, i, src);
      #1;
      while (!rx_ready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    rx_valid = 1'b0;
  endtask

  // kind 0 clean, 1 blocked port, 2 signature; fwd 0 pair, 1 learning switch, 2 either
  task automatic traffic(input int kind, input bit nips, input int fwd, input int k);
    bytes_t q;
    int p, h;
    logic [3:0] src, dst;
    p = $urandom_range(3);
    src = 4'(1 << p);
    q = eth_ipv4(32'h0A00_0000 + 32'(k), $urandom_range(1) ? PROTO_TCP : PROTO_UDP,
                 16'd40000, kind == 1 ? 16'd23 : 16'd443, fill(30 + $urandom_range(300), k));
    if (kind == 2) begin
      q[50] = 8'h90; q[51] = 8'h90; q[52] = 8'h90; q[53] = 8'h90;
      q[54] = 8'h90; q[55] = 8'h90; q[56] = 8'h90; q[57] = 8'h90;
    end
    if (fwd == 1) begin
      // learning switch: host h sits behind port h; its address is learned
      // from the first packet it sends
      h = (p + 1 + $urandom_range(2)) % 4;
      q[5] = 8'(h); q[4] = 8'h01; q[11] = 8'(p); q[10] = 8'h01;
      dst = known[h] ? 4'(1 << h) : ~src;
      if (known[h]) n_direct++; else n_flood++;
      known[p] = 1'b1;
    end else begin
      dst = 4'(1 << (p ^ 1));
    end
    if (!(kind == 1 && !nips) && !(kind == 2 && nips))
      exp.push_back('{q, dst, fwd == 2, during_update});
    n_sent++;
    put_frame(q, src);
  endtask

  function automatic bytes_t make_bitstream(input int nbytes, input int seed);
    bytes_t b;
    logic [31:0] w;
    for (int i = 0; i < nbytes / 4; i++) begin
      if (i == 0)                   w = 32'hFFFF_FFFF;
      else if (i == 1)              w = 32'hAA99_5566;
      else if (i == nbytes / 4 - 2) w = 32'h3000_8001;
      else if (i == nbytes / 4 - 1) w = 32'h0000_000D;
      else                          w = 32'(seed * 7919 + i * 104729);
      exp_words.push_back(w);
      for (int j = 0; j < 4; j++) b.push_back(w[8*j +: 8]);
    end
    return b;
  endfunction

  // Cut a bitstream into packets of at most 1016 bytes.
  task automatic send_bitstream(input bytes_t bs, input target_e tgt, input logic [7:0] mid,
                                input bit interleave, input int fwd_during);
    int off;
    off = 0;
    while (off < bs.size()) begin
      bytes_t part;
      logic [7:0] fl;
      int n;
      n = (bs.size() - off > 1016) ? 1016 : bs.size() - off;
      for (int i = 0; i < n; i++) part.push_back(bs[off + i]);
      fl = {6'd0, off + n == bs.size(), off == 0};
      put_frame(rcfg_frame(DEV_IP, RPORT, fl, 8'(tgt), mid, part), 4'b0001);
      off += n;
      if (interleave)
        for (int k = 0; k < 3; k++) traffic(0, 1'b0, fwd_during, 5000 + off + k);
    end
  endtask

  // ---------------------------------------------------------------- run
  int     mech_over, mech_fw, mech_ips, mech_stall, mech_bad, mech_err, mech_busy;
  longint t_rcfg0, t_rcfg1;

  initial begin
    bytes_t bs_app, bs_fwd, junk;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(fwd_module == FWD_PAIR && app_module == APP_FIREWALL, "reset configuration");

    // 1. reset configuration
    for (int k = 0; k < 40; k++) traffic($urandom_range(1), 1'b0, 0, k);
    put_frame(fill(2056, 7), 4'b0010);
    for (int k = 0; k < 10; k++) traffic(2, 1'b0, 0, 100 + k);   // firewall ignores payloads
    while (exp.size() != 0) @(negedge clk);
    mech_over = stat_rx_oversize;
    mech_fw   = stat_app_drops;
    check(mech_over == 1, "oversize frame dropped at the input");

    // 2. application region -> intrusion prevention
    bs_app = make_bitstream(2600, 1);
    t_rcfg0 = cyc;
    during_update = 1'b1;
    send_bitstream(bs_app, TGT_APP, APP_NIPS, 1'b1, 0);
    while (stat_reconfigs != 1) @(negedge clk);
    during_update = 1'b0;
    t_rcfg1 = cyc;
    check(app_module == APP_NIPS, "intrusion prevention loaded");
    check(stat_rcfg_pkts == 3, "three bitstream packets accepted");
    // rejected: 1020 bytes of bitstream; refused: data with no START
    put_frame(rcfg_frame(DEV_IP, RPORT, 8'h00, 8'h01, 8'h00, fill(1020, 3)), 4'b0001);
    junk = fill(64, 9);
    put_frame(rcfg_frame(DEV_IP, RPORT, 8'h00, 8'h01, 8'h00, junk), 4'b0001);
    repeat (400) @(negedge clk);
    mech_bad = stat_rcfg_bad;
    mech_err = stat_ctrl_err;
    check(mech_bad == 1, "oversize bitstream packet rejected");
    check(mech_err == 9, $sformatf("%0d entries refused without START", mech_err));

    // 3. traffic under intrusion prevention
    for (int k = 0; k < 40; k++) traffic($urandom_range(2), 1'b1, 0, 200 + k);
    while (exp.size() != 0) @(negedge clk);
    mech_ips = stat_app_drops - mech_fw;

    // 4. forwarding region -> learning switch (one packet, START and END)
    bs_fwd = make_bitstream(400, 2);
    during_update = 1'b1;
    send_bitstream(bs_fwd, TGT_FWD, FWD_LEARN, 1'b1, 2);
    while (stat_reconfigs != 2) @(negedge clk);
    during_update = 1'b0;
    check(fwd_module == FWD_LEARN, "learning switch loaded");
    for (int k = 0; k < 30; k++) traffic(0, 1'b1, 1, 300 + k);
    while (exp.size() != 0) @(negedge clk);
    repeat (20) @(negedge clk);

    // ICAP saw both bitstreams, word for word
    check(u_icap.syncs == 2 && u_icap.desyncs == 2, "two complete bitstreams at ICAP");
    check(u_icap.words.size() == exp_words.size() && stat_icap_words == 32'(exp_words.size()),
          $sformatf("%0d ICAP words of %0d", u_icap.words.size(), exp_words.size()));
    for (int k = 0; k < exp_words.size() && k < u_icap.words.size(); k++)
      if (u_icap.words[k] != exp_words[k]) begin
        check(1'b0, $sformatf("ICAP word %0d", k));
        break;
      end
    check(stat_app_pass == 32'(n_out), "pass counter");
    check(stat_traffic_pkts == stat_app_pass + stat_app_drops, "traffic counter");

    mech_stall = stat_down_drops;
    mech_busy  = busy_holds;
    $display("mechanisms: oversize %0d, firewall drops %0d, ips drops %0d, traffic dropped during updates %0d,",
             mech_over, mech_fw, mech_ips, mech_stall);
    $display("            rejected bitstream packets %0d, refused entries %0d, ICAP busy holds %0d, reconfigurations %0d",
             mech_bad, mech_err, mech_busy, stat_reconfigs);
    check(mech_fw > 0,    "firewall dropped packets");
    check(mech_ips > 0,   "intrusion prevention dropped packets");
    check(mech_stall > 0, "traffic dropped while a region was out of service");
    check(n_skipped == mech_stall, $sformatf("%0d packets missing, %0d dropped during updates",
                                            n_skipped, mech_stall));
    check(mech_busy > 0,  "controller held for a busy ICAP");
    $display("learning switch: %0d packets flooded, %0d sent to a learned port", n_flood, n_direct);
    check(n_flood > 0,    "learning switch flooded unknown destinations");
    check(n_direct > 0,   "learning switch forwarded to learned ports");
    check(stat_reconfigs == 2, "two reconfigurations");
    begin
      real mbps;
      mbps = 2600.0 * 8.0 / real'(t_rcfg1 - t_rcfg0) * 160.0;
      $display("application bitstream: 2600 bytes in %0d cycles = %0.0f Mb/s at 160 MHz",
               t_rcfg1 - t_rcfg0, mbps);
      check(mbps >= 350.0, "reconfiguration throughput at least 350 Mb/s");
    end
    $display("packets sent %0d, delivered %0d", n_sent, n_out);
    finish_tb();
  end
endmodule

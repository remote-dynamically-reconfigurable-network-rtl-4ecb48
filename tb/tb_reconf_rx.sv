// tb_reconf_rx: self-checking test of the bitstream packet receiver.
// Well-formed bitstream packets (1016 bytes, the maximum; lengths that end
// on a half beat; with and without START/END flags) must become exactly
// the expected sequence of command and word entries. Packets with 1020 or
// 1018 bytes of bitstream, or shorter than their UDP length says, must be
// rejected. The output is read with random back-pressure.
`define TB_WATCHDOG 200000
module tb_reconf_rx;
  import mb_pkg::*;
  import tb_pkt_pkg::*;
`include "tb_common.svh"

  logic      in_valid = 1'b0, in_ready;
  beat_t     in_beat = '0;
  hdr_t      in_hdr = '0;
  logic      out_valid, out_ready = 1'b0;
  bs_entry_t out_entry;
  logic      pkt_ok, bad_pkt;

  reconf_rx dut (.*);

  bs_entry_t exp[$];
  int n_ok = 0, n_bad = 0, n_ent = 0;

  always @(posedge clk) if (rst_n) begin
    if (pkt_ok) n_ok++;
    if (bad_pkt) n_bad++;
    if (out_valid && out_ready) begin
      checks++;
      n_ent++;
      if (exp.size() == 0 || out_entry != exp[0]) begin
        failures++;
        $display("FAIL: entry %0d: %p expected %p", n_ent, out_entry,
                 exp.size() ? exp[0] : bs_entry_t'('0));
      end
      if (exp.size()) void'(exp.pop_front());
    end
  end

  always @(negedge clk) out_ready = ($urandom_range(3) != 0);

  function automatic void expect_pkt(input logic [7:0] flags, input logic [7:0] tgt,
                                     input logic [7:0] mid, input bytes_t bs);
    exp.push_back('{BS_CMD, 64'({mid, 7'd0, tgt[0], flags & 8'hFD})});
    for (int i = 0; i < bs.size(); i += 8) begin
      logic [63:0] d;
      d = '0;
      for (int j = 0; j < 8 && i + j < bs.size(); j++) d[8*j +: 8] = bs[i + j];
      exp.push_back('{(i + 4 == bs.size()) ? BS_WORD1 : BS_WORD2, d});
    end
    if (flags[1]) exp.push_back('{BS_CMD, 64'd2});
  endfunction

  task automatic send(input bytes_t q, input int udp_len);
    in_hdr = '0;
    in_hdr.udp_len = 16'(udp_len);
    for (int i = 0; i < nbeats(q); i++) begin
      in_valid = 1'b1;
      in_beat = get_beat(q, i, 4'b0001);
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat ($urandom_range(3)) @(negedge clk);
  endtask

  initial begin
    int good, bad;
    bytes_t bs, q;
    good = 0; bad = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // full-size packet with START, then middle packets, then END
    bs = fill(1016, 1);
    expect_pkt(8'h01, 8'h01, 8'h05, bs);
    send(rcfg_frame(0, 0, 8'h01, 8'h01, 8'h05, bs), 14 + 1016); good++;
    for (int k = 0; k < 20; k++) begin
      logic [7:0] fl;
      int n;
      n = 4 * $urandom_range(1, 254);
      fl = 8'($urandom_range(3));
      bs = fill(n, k);
      expect_pkt(fl, 8'(k), 8'(k + 3), bs);
      send(rcfg_frame(0, 0, fl, 8'(k), 8'(k + 3), bs), 14 + n); good++;
    end
    // header-only END packet
    bs.delete();
    expect_pkt(8'h02, 8'h00, 8'h00, bs);
    send(rcfg_frame(0, 0, 8'h02, 8'h00, 8'h00, bs), 14); good++;
    // rejected: too long, not whole words
    send(rcfg_frame(0, 0, 8'h03, 8'h00, 8'h00, fill(1020, 9)), 14 + 1020); bad++;
    send(rcfg_frame(0, 0, 8'h03, 8'h00, 8'h00, fill(1018, 9)), 14 + 1018); bad++;
    // cut short: UDP length promises 64 bytes more than there are
    bs = fill(200, 4);
    q = rcfg_frame(0, 0, 8'h03, 8'h00, 8'h07, bs);
    exp.push_back('{BS_CMD, 64'({8'h07, 7'd0, 1'b0, 8'h01})});
    for (int i = 0; i < 200; i += 8) begin
      logic [63:0] d;
      for (int j = 0; j < 8; j++) d[8*j +: 8] = bs[i + j];
      exp.push_back('{BS_WORD2, d});
    end
    send(q, 14 + 264); bad++;
    // a good one afterwards still works
    bs = fill(36, 5);
    expect_pkt(8'h03, 8'h00, 8'h02, bs);
    send(rcfg_frame(0, 0, 8'h03, 8'h00, 8'h02, bs), 14 + 36); good++;
    repeat (50) @(negedge clk);
    check(exp.size() == 0, $sformatf("%0d entries missing", exp.size()));
    check(n_ok == good, $sformatf("accepted %0d of %0d", n_ok, good));
    check(n_bad == bad, $sformatf("rejected %0d of %0d", n_bad, bad));
    finish_tb();
  end
endmodule

// tb_reconf_ctrl: self-checking test of the reconfiguration controller.
// Checks that bitstream words without a START are discarded as errors;
// that a START isolates the named region and no word reaches ICAP before
// the region acknowledges; that every word reaches ICAP in order (low word
// of an entry first, bits of each byte reversed, as the ICAP model undoes);
// that the controller sustains one word per cycle when ICAP is never busy;
// that it holds while ICAP is busy; and that END releases the region and
// pulses load with the target and module.
`define TB_WATCHDOG 50000
module tb_reconf_ctrl;
  import mb_pkg::*;
`include "tb_common.svh"

  logic        in_valid = 1'b0, in_ready;
  bs_entry_t   in_entry = '0;
  logic [1:0]  iso_req, iso_ack = 2'b00;
  logic        load;
  target_e     load_target;
  logic [7:0]  load_module;
  logic        icap_csib, icap_rdwrb, icap_busy, busy_a, busy_b;
  logic [31:0] icap_i;
  logic        active, word_wr, err;
  bit          use_busy = 1'b0;

  reconf_ctrl dut (.*);
  icap_model #(.BUSY_PCT(0))  u_icap  (.clk(clk), .csib(icap_csib), .rdwrb(icap_rdwrb),
                                       .i(icap_i), .busy(busy_a));
  icap_model #(.BUSY_PCT(40)) u_busy  (.clk(clk), .csib(1'b1), .rdwrb(1'b1),
                                       .i(32'd0), .busy(busy_b));
  assign icap_busy = use_busy ? busy_b : busy_a;

  int n_load = 0, n_err = 0, n_words = 0, early = 0, while_busy = 0;
  logic busy_q = 1'b0;
  longint cyc = 0, first_w = -1, last_w = -1;
  target_e    got_tgt;
  logic [7:0] got_mod;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (err) n_err++;
    if (word_wr) begin
      n_words++;
      if (first_w < 0) first_w = cyc;
      last_w = cyc;
    end
    if (!icap_csib && !(iso_ack[0] | iso_ack[1])) early++;
    if (!icap_csib && busy_q) while_busy++;
    busy_q <= icap_busy;
    if (load) begin
      n_load++;
      got_tgt = load_target;
      got_mod = load_module;
    end
  end

  // regions acknowledge isolation a few cycles after the request
  always @(posedge clk) begin
    for (int r = 0; r < 2; r++)
      if (!iso_req[r]) iso_ack[r] <= 1'b0;
      else if ($urandom_range(3) == 0) iso_ack[r] <= 1'b1;
  end

  task automatic put(input bs_entry_t e);
    in_valid = 1'b1;
    in_entry = e;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  logic [31:0] exp_w[$];

  task automatic bitstream(input target_e t, input logic [7:0] m, input int pairs);
    put('{BS_CMD, 64'({m, 7'd0, t, 8'h01})});
    for (int k = 0; k < pairs; k++) begin
      logic [31:0] a, b;
      a = (k == 0) ? 32'hAA99_5566 : $urandom;
      b = $urandom;
      exp_w.push_back(a);
      exp_w.push_back(b);
      put('{BS_WORD2, {b, a}});
    end
    exp_w.push_back(32'h3000_8001);
    put('{BS_WORD1, 64'h3000_8001});
    exp_w.push_back(32'h0000_000D);
    put('{BS_WORD1, 64'h0000_000D});
    put('{BS_CMD, 64'h2});
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // words with no START are thrown away
    put('{BS_WORD2, 64'h1234_5678_9ABC_DEF0});
    put('{BS_CMD, 64'h2});
    repeat (3) @(negedge clk);
    check(n_err == 2 && n_words == 0 && !active, "entries before START rejected");

    // a bitstream for the application region, ICAP never busy
    bitstream(TGT_APP, 8'd1, 64);
    repeat (5) @(negedge clk);
    check(n_load == 1 && got_tgt == TGT_APP && got_mod == 8'd1, "load after END");
    check(iso_req == 2'b00 && !active, "region released");
    check(early == 0, "no ICAP write before isolation");
    check(u_icap.syncs == 1 && u_icap.desyncs == 1, "sync and desync seen by ICAP");
    // 64 two-word entries written back to back: 128 words in 128 cycles
    check(n_words == 130, $sformatf("%0d words written", n_words));
    check(last_w - first_w + 1 <= 130 + 1, $sformatf("%0d cycles for 130 words",
                                                    last_w - first_w + 1));

    // a bitstream for the forwarding region while ICAP is busy at random
    use_busy = 1'b1;
    bitstream(TGT_FWD, 8'd1, 40);
    repeat (5) @(negedge clk);
    check(n_load == 2 && got_tgt == TGT_FWD && got_mod == 8'd1, "second load");
    check(u_icap.syncs == 2 && u_icap.desyncs == 2, "second bitstream complete");
    check(u_icap.words.size() == exp_w.size(), "word count");
    for (int k = 0; k < exp_w.size() && k < u_icap.words.size(); k++)
      if (u_icap.words[k] != exp_w[k]) begin
        check(1'b0, $sformatf("word %0d: %h expected %h", k, u_icap.words[k], exp_w[k]));
        break;
      end
    check(early == 0, "no ICAP write outside isolation");
    check(while_busy == 0, $sformatf("%0d words written while ICAP was busy", while_busy));
    finish_tb();
  end
endmodule

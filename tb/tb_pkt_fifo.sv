// tb_pkt_fifo: self-checking test of the store-and-forward packet FIFO at
// its full 2048-byte size. Random-length packets (up to 2048 bytes) are
// written with random gaps and random verdicts, read with random
// back-pressure, and compared byte for byte, with their metadata, against
// a reference queue of the packets that should survive. Packets of 2049
// and 2056 bytes must be discarded as oversize. The store-and-forward
// latency is checked on an empty FIFO: the first beat appears two cycles
// after the last beat was taken.
module tb_pkt_fifo;
  import mb_pkg::*;
  import tb_pkt_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  logic        in_valid = 1'b0, in_ready, cm_drop = 1'b0;
  beat_t       in_beat = '0;
  logic [15:0] cm_meta = '0, out_meta;
  logic        out_valid, out_ready = 1'b0;
  beat_t       out_beat;
  logic        committed, dropped, oversize;

  pkt_fifo #(.META_W(16)) dut (.*);

  // reference
  bytes_t exp_q[$];
  int     exp_meta[$];
  bytes_t cur;
  int     n_rx = 0, n_over = 0, n_drop = 0, n_commit = 0;
  longint cyc = 0;
  longint last_in_cyc, first_out_cyc;
  bit     first_out_seen;

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && oversize)  n_over++;
    if (rst_n && dropped)   n_drop++;
    if (rst_n && committed) n_commit++;
    if (in_valid && in_ready && in_beat.last) last_in_cyc <= cyc;
    if (out_valid && out_ready) begin
      if (!first_out_seen) begin
        first_out_seen <= 1'b1;
        first_out_cyc  <= cyc;
      end
      cur = add_beat(cur, out_beat);
      if (out_meta != 16'(exp_meta.size() ? exp_meta[0] : -1)) begin
        failures++;
        $display("FAIL: metadata %0d", out_meta);
      end
      if (out_beat.last) begin
        checks++;
        if (exp_q.size() == 0 || cur != exp_q[0]) begin
          failures++;
          $display("FAIL: packet %0d differs", n_rx);
        end
        if (exp_q.size()) begin
          void'(exp_q.pop_front());
          void'(exp_meta.pop_front());
        end
        cur.delete();
        n_rx++;
      end
    end
  end

  task automatic put(input beat_t b, input int gap_pct);
    while ($urandom_range(99) < gap_pct) begin
      in_valid = 1'b0;
      @(negedge clk);
    end
    in_valid = 1'b1;
    in_beat  = b;
    #1;
    while (!in_ready) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic send(input bytes_t q, input bit drop, input int meta, input int gap_pct);
    cm_drop = drop;
    cm_meta = 16'(meta);
    for (int i = 0; i < nbeats(q); i++) put(get_beat(q, i, 4'b0001), gap_pct);
    // verdict is sampled in the commit cycle that follows
    @(negedge clk);
    if (!drop && q.size() <= 2048) begin
      exp_q.push_back(q);
      exp_meta.push_back(meta);
    end
  endtask

  // random read back-pressure once enabled
  bit rd_random = 1'b0;
  always @(negedge clk) out_ready <= rd_random ? ($urandom_range(3) != 0) : 1'b1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_exp_drop, n_exp_over;
    bytes_t p;
    n_exp_drop = 0;
    n_exp_over = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // latency on an empty FIFO
    send(fill(64, 1), 1'b0, 100, 0);
    repeat (10) @(negedge clk);
    check(first_out_cyc - last_in_cyc == 2, $sformatf("store-and-forward latency %0d",
                                                    first_out_cyc - last_in_cyc));

    // a 2048-byte packet fits, 2049 and 2056 bytes do not
    send(fill(2048, 2), 1'b0, 101, 0);
    repeat (300) @(negedge clk);
    send(fill(2049, 3), 1'b0, 102, 0);
    n_exp_over++;
    send(fill(2056, 4), 1'b0, 103, 0);
    n_exp_over++;
    repeat (10) @(negedge clk);

    // random traffic with random verdicts and back-pressure
    rd_random = 1'b1;
    for (int k = 0; k < 60; k++) begin
      bit d;
      d = ($urandom_range(4) == 0);
      if (d) n_exp_drop++;
      send(fill(60 + $urandom_range(1400), k), d, 200 + k, 20);
    end
    repeat (3000) @(negedge clk);

    check(exp_q.size() == 0, $sformatf("%0d packets never came out", exp_q.size()));
    check(n_over == n_exp_over, $sformatf("oversize count %0d", n_over));
    check(n_drop == n_exp_drop, $sformatf("drop count %0d vs %0d", n_drop, n_exp_drop));
    check(n_commit == n_rx, $sformatf("commits %0d vs packets out %0d", n_commit, n_rx));
    $display("packets out %0d, dropped %0d, oversize %0d", n_rx, n_drop, n_over);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

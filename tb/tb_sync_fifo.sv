// tb_sync_fifo: self-checking test of the bitstream FIFO. Random writes and
// reads are compared against a reference queue, at the default depth of
// 128 entries and at a depth of 5 (not a power of two). Also checks that
// wr_ready falls exactly when the FIFO holds DEPTH entries, that count
// tracks the queue and that data written in cycle t is readable in t+1.
`define TB_WATCHDOG 100000
module tb_sync_fifo;
`include "tb_common.svh"

  logic        wv[2], wr[2], rv[2], rr[2];
  logic [65:0] wd[2], rd[2];
  logic [7:0]  cnt0;
  logic [2:0]  cnt1;

  sync_fifo dut0 (.clk(clk), .rst_n(rst_n), .wr_valid(wv[0]), .wr_ready(wr[0]), .wr_data(wd[0]),
                  .rd_valid(rv[0]), .rd_ready(rr[0]), .rd_data(rd[0]), .count(cnt0));
  sync_fifo #(.WIDTH(66), .DEPTH(5)) dut1 (
                  .clk(clk), .rst_n(rst_n), .wr_valid(wv[1]), .wr_ready(wr[1]), .wr_data(wd[1]),
                  .rd_valid(rv[1]), .rd_ready(rr[1]), .rd_data(rd[1]), .count(cnt1));

  logic [65:0] model[2][$];
  int          depth[2] = '{128, 5};
  int          wr_pct = 50;

  initial for (int f = 0; f < 2; f++) begin
    wv[f] = 0; rr[f] = 0; wd[f] = '0;
  end

  // compare and update the model on every edge
  always @(posedge clk) if (rst_n) begin
    for (int f = 0; f < 2; f++) begin
      int c;
      c = (f == 0) ? int'(cnt0) : int'(cnt1);
      checks++;
      if (c != model[f].size() || wr[f] != (model[f].size() < depth[f]) ||
          rv[f] != (model[f].size() > 0)) begin
        failures++;
        $display("FAIL: fifo %0d count %0d model %0d", f, c, model[f].size());
      end
      if (rv[f] && rr[f]) begin
        checks++;
        if (rd[f] != model[f][0]) begin
          failures++;
          $display("FAIL: fifo %0d read %h expected %h", f, rd[f], model[f][0]);
        end
        void'(model[f].pop_front());
      end
      if (wv[f] && wr[f]) model[f].push_back(wd[f]);
    end
  end

  always @(negedge clk) if (rst_n) begin
    for (int f = 0; f < 2; f++) begin
      wv[f] = ($urandom_range(99) < wr_pct);
      wd[f] = {$urandom_range(3), $urandom, $urandom};
      rr[f] = ($urandom_range(99) < 100 - wr_pct);
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wr_pct = 80;          // fill up
    repeat (400) @(negedge clk);
    check(model[0].size() > 100 && model[1].size() >= 4, "FIFOs filled");
    wr_pct = 50;
    repeat (2000) @(negedge clk);
    wr_pct = 10;          // drain
    repeat (600) @(negedge clk);
    check(model[0].size() < 3, "FIFO drained");
    finish_tb();
  end
endmodule

// tb_pkt_dispatch: self-checking test of the dispatcher. Packets of four
// kinds (bitstream packet to the device address and port, UDP to another
// port, UDP to another address, TCP to the reconfiguration port number)
// are presented with the header record the parser would give them; each
// must come out whole on the right path only, under random back-pressure
// on both outputs, and the first-beat pulses must count them. Traffic
// packets that start while `hold` is high must be discarded whole, while
// bitstream packets still pass.
`define TB_WATCHDOG 100000
module tb_pkt_dispatch;
  import mb_pkg::*;
  import tb_pkt_pkg::*;
`include "tb_common.svh"

  localparam logic [31:0] IP   = 32'hC0A8_0164;
  localparam logic [15:0] PORT = 16'd10000;

  logic  in_valid = 1'b0, in_ready;
  beat_t in_beat = '0;
  hdr_t  in_hdr = '0;
  logic  hold = 1'b0;
  logic  rcfg_valid, rcfg_ready = 1'b0, data_valid, data_ready = 1'b0;
  beat_t rcfg_beat, data_beat;
  hdr_t  rcfg_hdr;
  logic  rcfg_pkt, data_pkt, data_drop;
  int    n_hold = 0;

  pkt_dispatch dut (.*);

  bytes_t exp_r[$], exp_d[$], cur_r, cur_d;
  int n_r = 0, n_d = 0, p_r = 0, p_d = 0;

  always @(posedge clk) if (rst_n) begin
    if (rcfg_pkt) p_r++;
    if (data_pkt) p_d++;
    if (data_drop) n_hold++;
    if (rcfg_valid && rcfg_ready) begin
      cur_r = add_beat(cur_r, rcfg_beat);
      if (rcfg_beat.last) begin
        checks++;
        if (exp_r.size() == 0 || cur_r != exp_r[0]) begin
          failures++; $display("FAIL: reconfiguration path packet %0d", n_r);
        end
        if (exp_r.size()) void'(exp_r.pop_front());
        cur_r.delete(); n_r++;
      end
    end
    if (data_valid && data_ready) begin
      cur_d = add_beat(cur_d, data_beat);
      if (data_beat.last) begin
        checks++;
        if (exp_d.size() == 0 || cur_d != exp_d[0]) begin
          failures++; $display("FAIL: traffic path packet %0d", n_d);
        end
        if (exp_d.size()) void'(exp_d.pop_front());
        cur_d.delete(); n_d++;
      end
    end
  end

  always @(negedge clk) begin
    rcfg_ready = ($urandom_range(2) != 0);
    data_ready = ($urandom_range(2) != 0);
  end

  initial begin
    int er, ed, eh;
    er = 0; ed = 0; eh = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 100; k++) begin
      bytes_t q;
      int kind;
      kind = $urandom_range(3);
      case (kind)
        0: q = rcfg_frame(IP, PORT, 8'h01, 8'h00, 8'h00, fill(16 + 8 * $urandom_range(20), k));
        1: q = eth_ipv4(IP, PROTO_UDP, 16'd1, PORT + 16'd1, fill($urandom_range(80), k));
        2: q = eth_ipv4(IP + 32'd1, PROTO_UDP, 16'd1, PORT, fill($urandom_range(80), k));
        default: q = eth_ipv4(IP, PROTO_TCP, 16'd1, PORT, fill($urandom_range(80), k));
      endcase
      in_hdr = '0;
      in_hdr.ethertype = 16'h0800;
      in_hdr.ihl = 4'd5;
      in_hdr.is_ipv4 = 1'b1;
      in_hdr.is_l4 = 1'b1;
      in_hdr.ip_proto = (kind == 3) ? PROTO_TCP : PROTO_UDP;
      in_hdr.ip_dst = (kind == 2) ? IP + 32'd1 : IP;
      in_hdr.l4_dst = (kind == 1) ? PORT + 16'd1 : PORT;
      // in the second half, traffic is held back (discarded) on every third packet
      hold = (k >= 50) && (k % 3 == 0);
      if (kind == 0) begin exp_r.push_back(q); er++; end
      else if (!hold) begin exp_d.push_back(q); ed++; end
      else eh++;
      for (int i = 0; i < nbeats(q); i++) begin
        in_valid = 1'b1;
        in_beat = get_beat(q, i, 4'b0001);
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
        @(negedge clk);
      end
      in_valid = 1'b0;
    end
    repeat (20) @(negedge clk);
    check(n_r == er && n_d == ed, $sformatf("packets %0d/%0d of %0d/%0d", n_r, n_d, er, ed));
    check(p_r == er && p_d == ed, "first-beat pulses");
    check(n_hold == eh && eh > 0, $sformatf("%0d of %0d held packets discarded", n_hold, eh));
    finish_tb();
  end
endmodule

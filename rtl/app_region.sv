// app_region: the reconfigurable network-protection region.
//
// The protection application of the middlebox lives in a partially
// reconfigurable region and is replaced remotely by a new partial
// bitstream. Two applications are provided: a port-based firewall
// (module 0, the one a freshly configured middlebox holds) and a stateless
// intrusion prevention module (module 1). On the FPGA the region holds only
// the loaded one; in RTL both are present and a module register, set by the
// controller's load pulse, selects whose verdict counts. This stands in for
// the configuration memory that ICAP rewrites.
//
// The protection modules only watch the packets: every beat entering the
// region is written into a store-and-forward packet buffer (pkt_fifo,
// 2048 bytes) and, in the cycle after the last beat, the selected module's
// verdict either commits the packet or removes it again. Rejected packets
// never leave the region; `dropped` pulses for each. Isolation works as in
// fwd_region: on iso_req the region stops taking beats at the next packet
// boundary (iso_ack), while packets already in its buffer still drain.
// Latency: a packet can leave two cycles after its last beat entered.
module app_region
  import mb_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 256   // beats of 8 bytes
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  beat_t      in_beat,
  output logic       out_valid,
  input  logic       out_ready,
  output beat_t      out_beat,
  input  logic       iso_req,
  output logic       iso_ack,
  input  logic       load,
  input  logic [7:0] load_module,
  output logic [7:0] module_id,
  output logic       passed,     // pulse: a packet was accepted
  output logic       dropped     // pulse: a packet was rejected
);
  logic buf_ready, fire, in_pkt;
  logic fw_drop, ips_drop, verdict;
  logic unused_meta, unused_oversize;

  assign in_ready = buf_ready && !iso_ack;
  assign fire     = in_valid && in_ready;

  port_firewall u_fw  (.clk(clk), .rst_n(rst_n), .beat(in_beat), .fire(fire), .drop(fw_drop));
  nips          u_ips (.clk(clk), .rst_n(rst_n), .beat(in_beat), .fire(fire), .drop(ips_drop));

  assign verdict = (module_id == APP_NIPS) ? ips_drop : fw_drop;

  pkt_fifo #(.DEPTH(BUF_DEPTH), .META_W(1)) u_buf (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid && !iso_ack),
    .in_ready  (buf_ready),
    .in_beat   (in_beat),
    .cm_drop   (verdict),
    .cm_meta   (1'b0),
    .out_valid (out_valid),
    .out_ready (out_ready),
    .out_beat  (out_beat),
    .out_meta  (unused_meta),
    .committed (passed),
    .dropped   (dropped),
    .oversize  (unused_oversize)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_pkt    <= 1'b0;
      iso_ack   <= 1'b0;
      module_id <= APP_FIREWALL;
    end else begin
      if (fire) in_pkt <= !in_beat.last;
      if (!iso_req)
        iso_ack <= 1'b0;
      else if (!iso_ack && !(in_valid && !fire) && (fire ? in_beat.last : !in_pkt))
        iso_ack <= 1'b1;
      if (load) module_id <= load_module;
    end
  end

  a_iso_at_boundary: assert property (@(posedge clk) disable iff (!rst_n)
                                      $rose(iso_ack) |-> !in_pkt);
endmodule

// fwd_region: the reconfigurable packet-forwarding region.
//
// The forwarding decision of the middlebox lives in a partially
// reconfigurable region, so that the forwarding algorithm itself can be
// replaced remotely after deployment. On the FPGA the region holds exactly
// one forwarding module and a partial bitstream swaps it. In RTL the region
// holds every module that can be loaded and a module register, set by the
// controller's load pulse, selects the one in use; this stands in for the
// configuration memory ICAP rewrites. The two forwarding algorithms are:
//   FWD_PAIR  (module 0, after reset): ports are paired, 0 with 1, 2 with 3;
//             a packet leaves on the partner of the port it came in on, so
//             the middlebox sits transparently in two links. Being a fixed
//             rewiring of the port sideband it is written here directly.
//   FWD_LEARN (module 1): the learning switch in fwd_learn.
// The learning switch's address table is cleared when it is loaded, as a
// freshly configured module would be.
//
// Around the module sits the isolation logic the controller needs. When
// iso_req rises the region lets the packet in flight finish and, at the
// next packet boundary with no beat waiting, stops taking beats and shows
// no output (iso_ack high). It resumes when iso_req falls. The stream is
// valid/ready, combinational from input to output (no latency). The
// isolation handshake and the module register are this design's choices.
module fwd_region
  import mb_pkg::*;
(
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
  output logic [7:0] module_id
);
  beat_t pair_beat, learn_beat;
  logic  in_pkt, fire, learn_rst_n;

  always_comb begin
    pair_beat = in_beat;
    for (int p = 0; p < int'(NUM_PORTS); p++)
      pair_beat.dst_port[p] = in_beat.src_port[p ^ 1];
  end

  assign learn_rst_n = rst_n && !(load && load_module == FWD_LEARN);

  fwd_learn u_learn (
    .clk     (clk),
    .rst_n   (learn_rst_n),
    .in_beat (in_beat),
    .fire    (fire && module_id == FWD_LEARN),
    .out_beat(learn_beat)
  );

  assign out_beat  = (module_id == FWD_LEARN) ? learn_beat : pair_beat;
  assign out_valid = in_valid && !iso_ack;
  assign in_ready  = out_ready && !iso_ack;
  assign fire      = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_pkt    <= 1'b0;
      iso_ack   <= 1'b0;
      module_id <= FWD_PAIR;
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

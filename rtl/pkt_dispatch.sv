// pkt_dispatch: separates partial-bitstream packets from ordinary traffic.
//
// The middlebox is updated over the same Ethernet links that carry the
// traffic it protects. Every packet leaving the input buffer comes with the
// header fields the parser recorded for it (in_hdr, steady for the whole
// packet). A packet is a reconfiguration packet when it is an IPv4 UDP
// datagram addressed to this middlebox (DEVICE_IP) on RECONF_UDP_PORT; it
// then goes, beat by beat, to the bitstream receiver. Any other packet goes
// to the packet-forwarding region. The address, the port and the use of UDP
// for both regions are this design's choices.
//
// While `hold` is high (the reconfiguration controller is isolating or
// writing a region) ordinary packets that reach the head of the input
// buffer are discarded whole and data_drop pulses: the traffic path is out
// of service, and holding its packets would block the bitstream packets
// queued behind them in the same buffer. Bitstream packets always pass. A
// packet's class is fixed at its first beat, so a packet already started
// is finished normally. Dropping rather than holding is this design's
// choice; the document only says the device is down during an update.
//
// The steering is combinational: each output's valid is the input valid
// gated by the class, and the input ready is the ready of the chosen output,
// so a packet moves at one beat per cycle with no added latency. rcfg_pkt
// and data_pkt pulse when the first beat of a packet of that class is
// passed on.
module pkt_dispatch
  import mb_pkg::*;
#(
  parameter logic [31:0] DEVICE_IP       = 32'hC0A8_0164,  // 192.168.1.100
  parameter logic [15:0] RECONF_UDP_PORT = 16'd10000
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  beat_t in_beat,
  input  hdr_t  in_hdr,
  input  logic  hold,
  // reconfiguration path
  output logic  rcfg_valid,
  input  logic  rcfg_ready,
  output beat_t rcfg_beat,
  output hdr_t  rcfg_hdr,
  // traffic path
  output logic  data_valid,
  input  logic  data_ready,
  output beat_t data_beat,
  // first-beat event pulses
  output logic  rcfg_pkt,
  output logic  data_pkt,
  output logic  data_drop
);
  typedef enum logic [1:0] {C_DATA, C_RCFG, C_DISCARD} class_e;

  logic   is_rcfg, first, fire;
  class_e cls, cls_q;

  assign is_rcfg = in_hdr.is_l4 && (in_hdr.ip_proto == PROTO_UDP) &&
                   (in_hdr.ip_dst == DEVICE_IP) &&
                   (in_hdr.l4_dst == RECONF_UDP_PORT);

  assign cls = !first ? cls_q : is_rcfg ? C_RCFG : hold ? C_DISCARD : C_DATA;

  assign rcfg_valid = in_valid && (cls == C_RCFG);
  assign data_valid = in_valid && (cls == C_DATA);
  assign rcfg_beat  = in_beat;
  assign data_beat  = in_beat;
  assign rcfg_hdr   = in_hdr;
  always_comb begin
    unique case (cls)
      C_RCFG:  in_ready = rcfg_ready;
      C_DATA:  in_ready = data_ready;
      default: in_ready = 1'b1;
    endcase
  end
  assign fire      = in_valid && in_ready;
  assign rcfg_pkt  = fire && first && (cls == C_RCFG);
  assign data_pkt  = fire && first && (cls == C_DATA);
  assign data_drop = fire && first && (cls == C_DISCARD);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      first <= 1'b1;
      cls_q <= C_DATA;
    end else if (fire) begin
      first <= in_beat.last;
      cls_q <= cls;
    end
  end
endmodule

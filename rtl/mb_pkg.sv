// mb_pkg: types and constants shared by the middlebox.
//
// Packets move through the middlebox as a stream of 64-bit beats (8 bytes).
// Byte i of a beat sits in data[8*i +: 8] and is valid when keep[i] is set;
// the first byte of the packet is byte 0 of the first beat. `last` marks the
// final beat of a packet. Every beat also carries the one-hot source port and
// the one-hot destination port(s) of its packet, as the NetFPGA packet
// pipeline does in its sideband. The beat width, the sideband encoding and
// the layout of the reconfiguration header are choices of this design.
package mb_pkg;

  localparam int unsigned DATA_W    = 64;
  localparam int unsigned KEEP_W    = DATA_W / 8;
  localparam int unsigned NUM_PORTS = 4;      // SFP+ ports of a NetFPGA-10G board

  typedef struct packed {
    logic [DATA_W-1:0]    data;
    logic [KEEP_W-1:0]    keep;
    logic                 last;
    logic [NUM_PORTS-1:0] src_port;   // one-hot port the packet came in on
    logic [NUM_PORTS-1:0] dst_port;   // one-hot set of ports it leaves on
  } beat_t;

  // Header fields of an Ethernet / IPv4 / TCP-UDP packet (network byte order
  // already undone: the values are plain numbers).
  typedef struct packed {
    logic [15:0] ethertype;
    logic [3:0]  ihl;
    logic [7:0]  ip_proto;
    logic [31:0] ip_dst;
    logic [15:0] l4_src;
    logic [15:0] l4_dst;
    logic [15:0] udp_len;
    logic        is_ipv4;     // EtherType 0x0800, version 4, IHL 5
    logic        is_l4;       // is_ipv4 and protocol TCP or UDP, ports seen
  } hdr_t;

  localparam logic [15:0] ETH_IPV4   = 16'h0800;
  localparam logic [7:0]  PROTO_TCP  = 8'd6;
  localparam logic [7:0]  PROTO_UDP  = 8'd17;

  // Reconfiguration packets: UDP datagrams to RECONF_UDP_PORT whose payload
  // starts with a 6-byte header (bytes 42..47 of the frame), so that the
  // bitstream starts on an 8-byte boundary at byte 48:
  //   byte 42  flags    bit0 START (isolate the target region first)
  //                     bit1 END   (bitstream complete: release the region)
  //   byte 43  target   0 = forwarding region, 1 = application region
  //   byte 44  module   identifier of the module the bitstream holds
  //   byte 45..47       reserved
  localparam int unsigned RCFG_HDR_BYTES = 6;
  localparam int unsigned RCFG_PAYLOAD_OFFSET = 48;
  localparam int unsigned BS_MAX_BYTES = 1016;  // bitstream bytes per packet

  typedef enum logic [0:0] {
    TGT_FWD = 1'b0,
    TGT_APP = 1'b1
  } target_e;

  // Entries of the bitstream FIFO: a command word or bitstream words.
  typedef enum logic [1:0] {
    BS_CMD   = 2'd0,   // data[7:0] flags, data[8] target, data[23:16] module
    BS_WORD1 = 2'd1,   // one 32-bit bitstream word in data[31:0]
    BS_WORD2 = 2'd2    // two words: data[31:0] first, then data[63:32]
  } bs_kind_e;

  typedef struct packed {
    bs_kind_e          kind;
    logic [DATA_W-1:0] data;
  } bs_entry_t;

  localparam int unsigned BS_ENTRY_W = $bits(bs_entry_t);

  // Application-region module identifiers.
  localparam logic [7:0] APP_FIREWALL = 8'd0;
  localparam logic [7:0] APP_NIPS     = 8'd1;
  // Forwarding-region module identifiers.
  localparam logic [7:0] FWD_PAIR     = 8'd0;
  localparam logic [7:0] FWD_LEARN    = 8'd1;

endpackage

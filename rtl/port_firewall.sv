// port_firewall: port-based firewall module of the application region.
//
// One of the two network-protection applications the middlebox is built
// for. It watches the packets entering the application region and rejects
// every IPv4 TCP or UDP packet whose source or destination port is on its
// block list. Other packets (non-IPv4, other protocols, IPv4 with options)
// are let through. The rules are parameters: on the FPGA a new rule set is
// a new partial bitstream, so the list is built into the module.
//
// It only observes the stream (`fire` marks a transferred beat) and uses
// hdr_parser for the ports. `drop` is valid in the cycle after a packet's
// last beat, which is when the region's output buffer samples its verdict.
// The default block list (telnet 23, 135, 445 and 3389) is this design's
// example; the document names the application but not its rules.
module port_firewall
  import mb_pkg::*;
#(
  parameter int unsigned NUM_RULES = 4,
  parameter logic [NUM_RULES-1:0][15:0] BLOCKED = {16'd3389, 16'd445, 16'd135, 16'd23}
) (
  input  logic  clk,
  input  logic  rst_n,
  input  beat_t beat,
  input  logic  fire,
  output logic  drop
);
  hdr_t hdr;

  hdr_parser u_parse (.clk(clk), .rst_n(rst_n), .beat(beat), .fire(fire), .hdr(hdr));

  always_comb begin
    drop = 1'b0;
    for (int r = 0; r < int'(NUM_RULES); r++)
      if (hdr.is_l4 && (hdr.l4_src == BLOCKED[r] || hdr.l4_dst == BLOCKED[r]))
        drop = 1'b1;
  end
endmodule

// sync_fifo: single-clock first-in first-out buffer with valid/ready ports.
//
// In the middlebox it is the bitstream FIFO that decouples the bitstream
// receiver from the reconfiguration controller: the receiver writes command
// and bitstream entries as fast as packets arrive, the controller drains
// them at one ICAP word per cycle. The default depth of 128 eight-byte
// entries (1024 bytes) holds one bitstream packet of at most 1016 bytes
// (127 entries) plus its command entry; reading 1016 as 1024 minus one
// header word is this design's interpretation of the 1016-byte limit.
//
// Interface: a write happens when wr_valid && wr_ready, a read when
// rd_valid && rd_ready. rd_data shows the oldest entry whenever rd_valid is
// high (first-word fall-through, read combinationally from the array).
// Timing: an entry written in cycle t is readable in cycle t+1. Any DEPTH
// of 2 or more works; it need not be a power of two. Reset is active-low
// and synchronous and empties the FIFO.
module sync_fifo #(
  parameter int unsigned WIDTH = 66,
  parameter int unsigned DEPTH = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_valid,
  output logic             wr_ready,
  input  logic [WIDTH-1:0] wr_data,
  output logic             rd_valid,
  input  logic             rd_ready,
  output logic [WIDTH-1:0] rd_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign wr_ready = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign rd_valid = (count != '0);
  assign do_wr    = wr_valid && wr_ready;
  assign do_rd    = rd_valid && rd_ready;
  assign rd_data  = mem[rd_ptr];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= inc(wr_ptr);
      if (do_rd) rd_ptr <= inc(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  32'(count) <= DEPTH);
endmodule

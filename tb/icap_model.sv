// icap_model: behavioural model of the FPGA's Internal Configuration Access
// Port, for testbenches only (the real port is a hard block of the FPGA).
//
// On every clock edge with csib and rdwrb both low it accepts the 32-bit
// word on `i`, reverses the bits of each byte back (the port sees
// bit-swapped bytes) and appends it to `words`. It counts the
// synchronisation word 0xAA995566 that opens a bitstream and the DESYNC
// command (0x30008001 followed by 0x0000000D) that closes one. With
// BUSY_PCT above zero, busy is raised at random on that share of cycles.
module icap_model #(
  parameter int BUSY_PCT = 0
) (
  input  logic        clk,
  input  logic        csib,
  input  logic        rdwrb,
  input  logic [31:0] i,
  output logic        busy
);
  logic [31:0] words[$];
  int          syncs = 0, desyncs = 0;
  logic [31:0] prev = '0;

  function automatic logic [31:0] unswap(input logic [31:0] w);
    logic [31:0] r;
    for (int b = 0; b < 4; b++)
      for (int k = 0; k < 8; k++) r[8*b + k] = w[8*b + 7 - k];
    return r;
  endfunction

  initial busy = 1'b0;
  always @(negedge clk) busy <= (BUSY_PCT > 0) && ($urandom_range(99) < BUSY_PCT);

  always @(posedge clk) begin
    if (!csib && !rdwrb) begin
      logic [31:0] w;
      w = unswap(i);
      words.push_back(w);
      if (w == 32'hAA99_5566) syncs++;
      if (prev == 32'h3000_8001 && w == 32'h0000_000D) desyncs++;
      prev = w;
    end
  end
endmodule

// nips: stateless network intrusion prevention module.
//
// The second network-protection application: it rejects any packet that
// contains one of NUM_SIGS byte signatures anywhere in it, headers
// included. Stateless means every packet is judged on its own; a signature
// split across two packets is not seen.
//
// Each signature is 1 to 8 bytes long (SIG_LEN) and stored with its first
// byte in bits 7:0 of SIGS. The matcher keeps the previous beat of the
// packet, so it looks at a 16-byte window: for every byte position of the
// current beat and every signature it compares the signature ending at that
// position. This finds signatures that straddle a beat boundary at full
// line rate (one beat per cycle). Bytes outside the packet (keep low, or
// before the first beat) never match.
//
// It only observes the stream (`fire` marks a transferred beat). `drop`
// is registered and valid in the cycle after a packet's last beat, when the
// region's output buffer samples it. The default signatures ("/bin/sh",
// "cmd.exe", "root:" and eight 0x90 NOP bytes) are examples of this design;
// the document names the application but not its rule set.
module nips
  import mb_pkg::*;
#(
  parameter int unsigned NUM_SIGS = 4,
  parameter logic [NUM_SIGS-1:0][63:0] SIGS = {
    64'h9090_9090_9090_9090,          // 8 x NOP
    64'h0000_003A_746F_6F72,     // "root:"
    64'h0065_7865_2E64_6D63,          // "cmd.exe"
    64'h0068_732F_6E69_622F           // "/bin/sh"
  },
  parameter logic [NUM_SIGS-1:0][3:0] SIG_LEN = {4'd8, 4'd5, 4'd7, 4'd7}
) (
  input  logic  clk,
  input  logic  rst_n,
  input  beat_t beat,
  input  logic  fire,
  output logic  drop
);
  logic [63:0] prev_data;
  logic [7:0]  prev_keep;   // zero on the first beat of a packet
  logic        first;
  logic        hit;

  logic [15:0][7:0] win;
  logic [15:0]      win_ok;

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      win[i]      = prev_data[8*i +: 8];
      win_ok[i]   = prev_keep[i] && !first;
      win[8+i]    = beat.data[8*i +: 8];
      win_ok[8+i] = beat.keep[i];
    end
    hit = 1'b0;
    for (int e = 0; e < 8; e++) begin          // signature ends at byte 8+e
      for (int s = 0; s < int'(NUM_SIGS); s++) begin
        logic m;
        m = win_ok[8+e];
        for (int k = 0; k < 8; k++) begin
          if (k < int'(SIG_LEN[s])) begin
            // byte k of the signature sits at window position 8+e-len+1+k
            int pos;
            pos = 8 + e - int'(SIG_LEN[s]) + 1 + k;
            if (!win_ok[pos] || win[pos] != SIGS[s][8*k +: 8]) m = 1'b0;
          end
        end
        if (m) hit = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev_data <= '0;
      prev_keep <= '0;
      first     <= 1'b1;
      drop      <= 1'b0;
    end else if (fire) begin
      prev_data <= beat.data;
      prev_keep <= beat.keep;
      first     <= beat.last;
      drop      <= (first ? 1'b0 : drop) | hit;
    end
  end
endmodule

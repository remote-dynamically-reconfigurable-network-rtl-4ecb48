// reconf_rx: bitstream packet receiver.
//
// Partial bitstreams reach the middlebox as a series of UDP datagrams, each
// carrying at most 1016 bytes of bitstream (the document's limit). This
// block takes one such packet at a time from the dispatcher, checks it and
// turns it into entries of the bitstream FIFO:
//   * beats 0-4 (Ethernet, IPv4 and UDP headers) are consumed;
//   * beat 5 holds the 6-byte reconfiguration header (bytes 42-47, layout in
//     mb_pkg). The payload length is the UDP length minus 8 bytes of UDP
//     header and 6 bytes of reconfiguration header. A packet whose payload
//     is over MAX_BYTES or not a whole number of 32-bit words is rejected
//     (bad_pkt pulses, nothing is written); otherwise a BS_CMD entry with
//     the flags (END masked off), target region and module number is
//     written;
//   * beats 6 onwards carry the bitstream, two 32-bit words per beat, and
//     become BS_WORD2 entries (BS_WORD1 for a final half beat);
//   * after the last beat, if the header had the END flag, a second BS_CMD
//     entry carrying only END is written so that the controller sees the end
//     of the bitstream after its last word.
// A packet that is shorter than its UDP length says is reported as bad and
// gets no END entry. Bitstream words are passed on in packet byte order
// (byte 48 of the frame is the low byte of the first word).
//
// Handshakes are valid/ready on both sides; a beat that produces an entry
// waits for out_ready, the others are taken at once. The header layout and
// the checks are this design's choices.
module reconf_rx
  import mb_pkg::*;
#(
  parameter int unsigned MAX_BYTES = BS_MAX_BYTES
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  beat_t     in_beat,
  input  hdr_t      in_hdr,
  output logic      out_valid,
  input  logic      out_ready,
  output bs_entry_t out_entry,
  output logic      pkt_ok,     // pulse: a packet was taken in full
  output logic      bad_pkt     // pulse: a packet was rejected or cut short
);
  typedef enum logic [1:0] {S_HDR, S_DATA, S_SKIP, S_END} state_e;

  state_e      state;
  logic [2:0]  idx;          // beat number while in S_HDR
  logic [15:0] remaining;    // bitstream bytes still expected
  logic        end_flag;
  logic [15:0] pay_len;
  logic        len_ok, fire_in, fire_out;
  logic [7:0]  flags, target, module_id;

  assign flags     = in_beat.data[8*2 +: 8];
  assign target    = in_beat.data[8*3 +: 8];
  assign module_id = in_beat.data[8*4 +: 8];
  assign pay_len   = in_hdr.udp_len - 16'(8 + RCFG_HDR_BYTES);
  assign len_ok    = (in_hdr.udp_len >= 16'(8 + RCFG_HDR_BYTES)) &&
                     (pay_len <= 16'(MAX_BYTES)) && (pay_len[1:0] == 2'b00);

  // What the current beat produces.
  logic produce, word2_ok, word1_ok;
  assign word2_ok = (remaining >= 16'd8) && (&in_beat.keep);
  assign word1_ok = (remaining == 16'd4) && (&in_beat.keep[3:0]);

  always_comb begin
    produce   = 1'b0;
    out_entry = '{kind: BS_CMD, data: '0};
    unique case (state)
      S_HDR: if (idx == 3'd5 && len_ok) begin
        produce   = 1'b1;
        out_entry.kind = BS_CMD;
        out_entry.data = DATA_W'({module_id, 7'd0, target[0], flags & 8'hFD});
      end
      S_DATA: if (word2_ok || word1_ok) begin
        produce   = 1'b1;
        out_entry.kind = word2_ok ? BS_WORD2 : BS_WORD1;
        out_entry.data = word2_ok ? in_beat.data : {32'd0, in_beat.data[31:0]};
      end
      S_END: begin
        out_entry.kind = BS_CMD;
        out_entry.data = DATA_W'(8'h02);
      end
      default: ;
    endcase
  end

  assign in_ready  = (state != S_END) && (!produce || out_ready);
  assign out_valid = (state == S_END) || (in_valid && produce);
  assign fire_in   = in_valid && in_ready;
  assign fire_out  = out_valid && out_ready;

  // Bitstream bytes left after the current beat.
  logic [15:0] rem_after;
  always_comb begin
    if (state == S_HDR)  rem_after = pay_len;
    else if (word2_ok)   rem_after = remaining - 16'd8;
    else if (word1_ok)   rem_after = remaining - 16'd4;
    else                 rem_after = remaining;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_HDR;
      idx       <= '0;
      remaining <= '0;
      end_flag  <= 1'b0;
      pkt_ok    <= 1'b0;
      bad_pkt   <= 1'b0;
    end else begin
      pkt_ok  <= 1'b0;
      bad_pkt <= 1'b0;
      if (state == S_END) begin
        if (fire_out) begin
          state  <= S_HDR;
          pkt_ok <= 1'b1;
        end
      end else if (fire_in) begin
        unique case (state)
          S_HDR: begin
            idx <= idx + 3'd1;
            if (idx == 3'd5) begin
              end_flag  <= flags[1];
              remaining <= pay_len;
              state     <= len_ok ? S_DATA : S_SKIP;
              if (!len_ok) bad_pkt <= 1'b1;
            end
          end
          S_DATA: begin
            remaining <= rem_after;
            if (!word2_ok && !word1_ok && remaining != 16'd0) begin
              // Fewer or odd bytes where whole words were announced.
              bad_pkt <= 1'b1;
              state   <= S_SKIP;
            end
          end
          default: ;
        endcase
        if (in_beat.last) begin
          idx <= '0;
          if (state == S_SKIP) begin
            state <= S_HDR;
          end else if ((state == S_DATA || (state == S_HDR && idx == 3'd5 && len_ok)) &&
                       rem_after == 16'd0 && (state == S_HDR || word2_ok || word1_ok ||
                                              remaining == 16'd0)) begin
            // Complete packet: announce the end of the bitstream if asked.
            if (state == S_HDR ? flags[1] : end_flag) state <= S_END;
            else begin
              state  <= S_HDR;
              pkt_ok <= 1'b1;
            end
          end else begin
            bad_pkt <= 1'b1;
            state   <= S_HDR;
          end
        end
      end
    end
  end
endmodule

// reconf_ctrl: the reconfiguration controller.
//
// A small state machine in the FPGA fabric, instead of a processor, moves
// partial bitstreams from the bitstream FIFO into the Internal Configuration
// Access Port (ICAP) and looks after the region being replaced:
//   IDLE     waits for a BS_CMD entry with the START flag, which names the
//            target region (0 forwarding, 1 application) and the module the
//            bitstream holds. Bitstream words that arrive without a START
//            are discarded and counted as errors.
//   ISOLATE  raises iso_req for the target region and waits for iso_ack:
//            the region finishes the packet it is passing and then stops
//            taking traffic, which waits in the buffers in front of it.
//   WRITE    writes the bitstream to ICAP, one 32-bit word per cycle while
//            icap_busy is low (a BS_WORD2 entry takes two cycles, low word
//            first). A BS_CMD entry with END ends the bitstream.
//   DONE     pulses `load` with the target and module number for one cycle,
//            drops iso_req and counts the reconfiguration.
//
// ICAP port: icap_csib and icap_rdwrb are active low (write = both low) and
// icap_i carries the word; they are registered, so a word popped in cycle t
// is on the port in cycle t+1. With BIT_SWAP set, the bits of every byte
// are reversed on the way out, as the Virtex-5 ICAP expects of a bitstream
// stored in file byte order. Peak rate is one word per cycle: 3.2 Gb/s at
// 100 MHz. The command format, the isolation handshake and the load pulse
// (which lets a simulation follow which module a region holds) are choices
// of this design; the document states only that a customized controller
// built from fabric logic drives ICAP.
module reconf_ctrl
  import mb_pkg::*;
#(
  parameter bit BIT_SWAP = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  // bitstream FIFO
  input  logic        in_valid,
  output logic        in_ready,
  input  bs_entry_t   in_entry,
  // region isolation
  output logic [1:0]  iso_req,      // index = target_e
  input  logic [1:0]  iso_ack,
  output logic        load,         // pulse: region `load_target` now holds
  output target_e     load_target,  //        module `load_module`
  output logic [7:0]  load_module,
  // ICAP
  output logic        icap_csib,
  output logic        icap_rdwrb,
  output logic [31:0] icap_i,
  input  logic        icap_busy,
  // status
  output logic        active,       // a region is isolated / being written
  output logic        word_wr,      // pulse: one word written to ICAP
  output logic        err           // pulse: entry out of sequence
);
  typedef enum logic [1:0] {S_IDLE, S_ISOLATE, S_WRITE, S_DONE} state_e;

  state_e     state;
  target_e    tgt;
  logic [7:0] mod_id;
  logic       half;            // second word of a BS_WORD2 entry is next
  logic       put_word;
  logic [31:0] word;

  function automatic logic [31:0] swap_bits(input logic [31:0] w);
    logic [31:0] r;
    for (int b = 0; b < 4; b++)
      for (int i = 0; i < 8; i++)
        r[8*b + i] = w[8*b + 7 - i];
    return r;
  endfunction

  // What the current FIFO entry does this cycle.
  always_comb begin
    in_ready = 1'b0;
    put_word = 1'b0;
    word     = half ? in_entry.data[63:32] : in_entry.data[31:0];
    unique case (state)
      S_IDLE:  in_ready = 1'b1;
      S_WRITE: begin
        if (in_entry.kind == BS_CMD) begin
          in_ready = 1'b1;
        end else if (!icap_busy) begin
          put_word = in_valid;
          in_ready = (in_entry.kind == BS_WORD1) || half;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      tgt         <= TGT_FWD;
      mod_id      <= '0;
      half        <= 1'b0;
      load        <= 1'b0;
      load_target <= TGT_FWD;
      load_module <= '0;
      err         <= 1'b0;
      icap_csib   <= 1'b1;
      icap_rdwrb  <= 1'b1;
      icap_i      <= '0;
      word_wr     <= 1'b0;
    end else begin
      load      <= 1'b0;
      err       <= 1'b0;
      word_wr   <= put_word;
      icap_csib <= !put_word;
      icap_rdwrb <= !put_word;
      if (put_word) icap_i <= BIT_SWAP ? swap_bits(word) : word;
      unique case (state)
        S_IDLE: if (in_valid) begin
          if (in_entry.kind == BS_CMD && in_entry.data[0]) begin
            tgt    <= target_e'(in_entry.data[8]);
            mod_id <= in_entry.data[23:16];
            state  <= S_ISOLATE;
          end else begin
            err <= 1'b1;
          end
        end
        S_ISOLATE: if (iso_ack[tgt]) state <= S_WRITE;
        S_WRITE: begin
          if (put_word && in_entry.kind == BS_WORD2) half <= !half;
          if (in_valid && in_entry.kind == BS_CMD && in_entry.data[1]) state <= S_DONE;
        end
        S_DONE: begin
          load        <= 1'b1;
          load_target <= tgt;
          load_module <= mod_id;
          state       <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    iso_req = '0;
    if (state == S_ISOLATE || state == S_WRITE || state == S_DONE) iso_req[tgt] = 1'b1;
  end
  assign active = (state != S_IDLE);

  a_write_needs_iso: assert property (@(posedge clk) disable iff (!rst_n)
                                      put_word |-> iso_ack[tgt]);
endmodule

// mb_top: remotely and dynamically reconfigurable network-processing
// middlebox.
//
// The middlebox sits in Ethernet links and processes their traffic with
// two partially reconfigurable regions: a forwarding region that decides
// where each packet goes and an application region that protects the
// network (port-based firewall or stateless intrusion prevention). Both can
// be replaced while the rest keeps running, by partial bitstreams that are
// sent to the middlebox as ordinary UDP packets over the same links; no
// processor and no host computer take part.
//
// Data path (one 64-bit beat per cycle, valid/ready everywhere):
//   rx -> hdr_parser + pkt_fifo (2048-byte input buffer, header fields kept
//   per packet) -> pkt_dispatch -+-> fwd_region -> app_region -> tx
//                                +-> reconf_rx -> bitstream FIFO (sync_fifo)
//                                    -> reconf_ctrl -> ICAP port
// The controller isolates the target region at a packet boundary, writes the
// bitstream, pulses `load` to the target region and releases it. While it
// does, traffic reaching the dispatcher is dropped (the processing path is
// down) so that bitstream packets behind it in the input buffer keep
// flowing.
//
// Ports: rx_* is the packet stream from the Ethernet MACs (src_port set),
// tx_* the stream to them (dst_port set); icap_* connects to the FPGA's
// ICAP primitive; the stat_* counters count events since reset. The MACs,
// PHYs and ICAP are outside this module. Beat format and parameters are in
// mb_pkg; choices of this design are listed in the block headers.
module mb_top
  import mb_pkg::*;
#(
  parameter int unsigned IN_DEPTH        = 256,   // input buffer, beats (2048 bytes)
  parameter int unsigned OUT_DEPTH       = 256,   // application buffer, beats
  parameter int unsigned BS_FIFO_DEPTH   = 128,   // bitstream FIFO entries (1024 bytes)
  parameter logic [31:0] DEVICE_IP       = 32'hC0A8_0164,
  parameter logic [15:0] RECONF_UDP_PORT = 16'd10000
) (
  input  logic        clk,
  input  logic        rst_n,
  // packets from the network
  input  logic        rx_valid,
  output logic        rx_ready,
  input  beat_t       rx_beat,
  // packets to the network
  output logic        tx_valid,
  input  logic        tx_ready,
  output beat_t       tx_beat,
  // ICAP primitive
  output logic        icap_csib,
  output logic        icap_rdwrb,
  output logic [31:0] icap_i,
  input  logic        icap_busy,
  // status
  output logic        reconf_active,
  output logic [$clog2(BS_FIFO_DEPTH+1)-1:0] bs_fifo_level,   // bitstream FIFO entries
  output logic [7:0]  fwd_module,
  output logic [7:0]  app_module,
  output logic [31:0] stat_rx_pkts,       // input packets buffered
  output logic [31:0] stat_traffic_pkts,  // packets sent to the processing path
  output logic [31:0] stat_rx_oversize,   // input packets over 2048 bytes
  output logic [31:0] stat_down_drops,    // traffic dropped during an update
  output logic [31:0] stat_rcfg_pkts,     // bitstream packets accepted
  output logic [31:0] stat_rcfg_bad,      // bitstream packets rejected
  output logic [31:0] stat_reconfigs,     // completed reconfigurations
  output logic [31:0] stat_icap_words,    // words written to ICAP
  output logic [31:0] stat_ctrl_err,      // entries out of sequence
  output logic [31:0] stat_app_drops,     // packets rejected by the application
  output logic [31:0] stat_app_pass       // packets let through by it
);
  // ---------------------------------------------------------------- input
  hdr_t  rx_hdr, buf_hdr;
  logic  buf_valid, buf_ready;
  beat_t buf_beat;
  logic  in_committed, in_dropped, in_oversize;

  hdr_parser u_rx_parse (
    .clk(clk), .rst_n(rst_n), .beat(rx_beat), .fire(rx_valid && rx_ready), .hdr(rx_hdr)
  );

  pkt_fifo #(.DEPTH(IN_DEPTH), .META_W($bits(hdr_t))) u_in_buf (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (rx_valid),
    .in_ready  (rx_ready),
    .in_beat   (rx_beat),
    .cm_drop   (1'b0),
    .cm_meta   (rx_hdr),
    .out_valid (buf_valid),
    .out_ready (buf_ready),
    .out_beat  (buf_beat),
    .out_meta  (buf_hdr),
    .committed (in_committed),
    .dropped   (in_dropped),
    .oversize  (in_oversize)
  );

  // ------------------------------------------------------------- dispatch
  logic [1:0] iso_req, iso_ack;   // per region, index = target_e
  logic  rcfg_valid, rcfg_ready, data_valid, data_ready;
  beat_t rcfg_beat, data_beat;
  hdr_t  rcfg_hdr;
  logic  rcfg_pkt, data_pkt, data_drop;

  pkt_dispatch #(.DEVICE_IP(DEVICE_IP), .RECONF_UDP_PORT(RECONF_UDP_PORT)) u_disp (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (buf_valid),
    .in_ready   (buf_ready),
    .in_beat    (buf_beat),
    .in_hdr     (buf_hdr),
    .hold       (iso_req != 2'b00),
    .rcfg_valid (rcfg_valid),
    .rcfg_ready (rcfg_ready),
    .rcfg_beat  (rcfg_beat),
    .rcfg_hdr   (rcfg_hdr),
    .data_valid (data_valid),
    .data_ready (data_ready),
    .data_beat  (data_beat),
    .rcfg_pkt   (rcfg_pkt),
    .data_pkt   (data_pkt),
    .data_drop  (data_drop)
  );

  // ------------------------------------------------- reconfiguration path
  logic      bs_wr_valid, bs_wr_ready, bs_rd_valid, bs_rd_ready;
  bs_entry_t bs_wr_entry, bs_rd_entry;
  logic      rx_ok, rx_bad;

  reconf_rx u_rcfg_rx (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (rcfg_valid),
    .in_ready  (rcfg_ready),
    .in_beat   (rcfg_beat),
    .in_hdr    (rcfg_hdr),
    .out_valid (bs_wr_valid),
    .out_ready (bs_wr_ready),
    .out_entry (bs_wr_entry),
    .pkt_ok    (rx_ok),
    .bad_pkt   (rx_bad)
  );

  sync_fifo #(.WIDTH(BS_ENTRY_W), .DEPTH(BS_FIFO_DEPTH)) u_bs_fifo (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_valid (bs_wr_valid),
    .wr_ready (bs_wr_ready),
    .wr_data  (bs_wr_entry),
    .rd_valid (bs_rd_valid),
    .rd_ready (bs_rd_ready),
    .rd_data  (bs_rd_entry),
    .count    (bs_fifo_level)
  );

  logic       load, word_wr, ctrl_err;
  target_e    load_target;
  logic [7:0] load_module;

  reconf_ctrl u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_valid    (bs_rd_valid),
    .in_ready    (bs_rd_ready),
    .in_entry    (bs_rd_entry),
    .iso_req     (iso_req),
    .iso_ack     (iso_ack),
    .load        (load),
    .load_target (load_target),
    .load_module (load_module),
    .icap_csib   (icap_csib),
    .icap_rdwrb  (icap_rdwrb),
    .icap_i      (icap_i),
    .icap_busy   (icap_busy),
    .active      (reconf_active),
    .word_wr     (word_wr),
    .err         (ctrl_err)
  );

  // ---------------------------------------------------- processing path
  logic  fwd_valid, fwd_ready;
  beat_t fwd_beat;
  logic  app_pass, app_drop;

  fwd_region u_fwd (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_valid    (data_valid),
    .in_ready    (data_ready),
    .in_beat     (data_beat),
    .out_valid   (fwd_valid),
    .out_ready   (fwd_ready),
    .out_beat    (fwd_beat),
    .iso_req     (iso_req[TGT_FWD]),
    .iso_ack     (iso_ack[TGT_FWD]),
    .load        (load && load_target == TGT_FWD),
    .load_module (load_module),
    .module_id   (fwd_module)
  );

  app_region #(.BUF_DEPTH(OUT_DEPTH)) u_app (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_valid    (fwd_valid),
    .in_ready    (fwd_ready),
    .in_beat     (fwd_beat),
    .out_valid   (tx_valid),
    .out_ready   (tx_ready),
    .out_beat    (tx_beat),
    .iso_req     (iso_req[TGT_APP]),
    .iso_ack     (iso_ack[TGT_APP]),
    .load        (load && load_target == TGT_APP),
    .load_module (load_module),
    .module_id   (app_module),
    .passed      (app_pass),
    .dropped     (app_drop)
  );

  // ---------------------------------------------------------- statistics
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stat_rx_pkts     <= '0;
      stat_traffic_pkts <= '0;
      stat_rx_oversize <= '0;
      stat_down_drops  <= '0;
      stat_rcfg_pkts   <= '0;
      stat_rcfg_bad    <= '0;
      stat_reconfigs   <= '0;
      stat_icap_words  <= '0;
      stat_ctrl_err    <= '0;
      stat_app_drops   <= '0;
      stat_app_pass    <= '0;
    end else begin
      stat_rx_pkts     <= stat_rx_pkts     + 32'(in_committed);
      stat_traffic_pkts <= stat_traffic_pkts + 32'(data_pkt);
      stat_rx_oversize <= stat_rx_oversize + 32'(in_oversize);
      stat_down_drops  <= stat_down_drops  + 32'(data_drop);
      stat_rcfg_pkts   <= stat_rcfg_pkts   + 32'(rx_ok);
      stat_rcfg_bad    <= stat_rcfg_bad    + 32'(rx_bad);
      stat_reconfigs   <= stat_reconfigs   + 32'(load);
      stat_icap_words  <= stat_icap_words  + 32'(word_wr);
      stat_ctrl_err    <= stat_ctrl_err    + 32'(ctrl_err);
      stat_app_drops   <= stat_app_drops   + 32'(app_drop);
      stat_app_pass    <= stat_app_pass    + 32'(app_pass);
    end
  end
endmodule

// attestation_top: on-the-fly attestation of a partial reconfiguration
// bitstream, snooping the byte bus into the FPGA's internal configuration
// access port (ICAP).
//
// ICAP clock domain (clk_icap, 50 MHz in the reference system):
//   sync_filter      drops everything before the sync sequence and packs the
//                    bytes into 32-bit packet words;
//   region_delimiter parses the packets and raises abort, with a 4-bit code,
//                    on a frame write outside the reconfigurable region, a
//                    wrong frame length, or a SWITCH / SHUTDOWN / MFWR;
//   packet_counter   counts the packet words (28 bits);
//   async_fifo       write side; its full flag is brought out as halt.
// Hash clock domain (clk_hash, faster, 100 MHz in the reference system):
//   async_fifo       read side;
//   sha256_core      hashes every packet word after the sync sequence;
//   hash_control     starts a block when 16 words are waiting, completes the
//                    last block with zeros on read_hash, raises ready, and
//                    serves the register bank: address 0..7 digest, 8
//                    {abort code, packet count}.
//
// Interface: a byte is snooped when icap_ce and icap_write are both high.
// The reconfiguration master must stop sending bytes while abort (sticky) or
// halt (FIFO nearly full) is high. synced shows that the sync sequence
// has been seen. global_reset is synchronous to clk_hash
// and is carried into the ICAP domain by a two-flop synchroniser, so it must
// be held for at least two clk_icap cycles. Reading address 8 (rd_strobe)
// resets the ICAP-domain units for the next bitstream until the eight digest
// words have been read; global_reset then clears the hash side.
//
// The block structure, the two clock domains, the widths (8-bit input,
// 32-bit words, 28-bit count, 4-bit abort value, 256-bit digest, 32-bit read
// bus) and the FIFO size follow the design description. Region bounds and
// frame length are parameters whose defaults are this design's choices.
module attestation_top
  import attest_pkg::*;
#(
  parameter int unsigned FRAME_WORDS  = 206,
  parameter logic [17:0] REGION_FIRST = 18'h0_4000,
  parameter logic [17:0] REGION_LAST  = 18'h0_4FFF,
  parameter int unsigned FIFO_DEPTH   = 128
) (
  input  logic        clk_icap,
  input  logic        clk_hash,
  input  logic        global_reset,
  // snooped ICAP input bus
  input  logic [7:0]  icap_data,
  input  logic        icap_write,
  input  logic        icap_ce,
  output logic        abort,
  output logic        halt,
  output logic        synced,     // sync sequence seen
  // host register bank
  input  logic        read_hash,
  input  logic        rd_strobe,
  input  logic [3:0]  address,
  output logic [31:0] data,
  output logic        ready,
  output logic        busy_hash
);

  localparam int unsigned FIFO_AW = $clog2(FIFO_DEPTH);

  // ------------------------------------------------------------ resets
  logic reset_icap_req;       // from hash_control, clk_hash domain
  logic grst_icap, rreq_icap, rst_icap_units;

  bit_sync u_sync_grst (.clk(clk_icap), .d(global_reset),   .q(grst_icap));
  bit_sync u_sync_rreq (.clk(clk_icap), .d(reset_icap_req), .q(rreq_icap));

  assign rst_icap_units = grst_icap | rreq_icap;

  // ------------------------------------------------------------ ICAP domain
  logic [31:0] pkt_word;
  logic        new_packet;
  logic [27:0] pkt_count;
  abort_e      abort_code;

  sync_filter u_filter (
    .clk        (clk_icap),
    .rst        (rst_icap_units),
    .in_data    (icap_data),
    .in_write   (icap_write),
    .in_ce      (icap_ce),
    .word       (pkt_word),
    .new_packet (new_packet),
    .synced     (synced)
  );

  region_delimiter #(
    .FRAME_WORDS  (FRAME_WORDS),
    .REGION_FIRST (REGION_FIRST),
    .REGION_LAST  (REGION_LAST)
  ) u_region (
    .clk        (clk_icap),
    .rst        (rst_icap_units),
    .word       (pkt_word),
    .new_packet (new_packet),
    .abort      (abort),
    .abort_code (abort_code)
  );

  packet_counter #(.WIDTH(28)) u_counter (
    .clk        (clk_icap),
    .rst        (rst_icap_units),
    .new_packet (new_packet),
    .count      (pkt_count)
  );

  // ------------------------------------------------------------ FIFO
  logic [31:0]      fifo_data;
  logic             fifo_rd_en, fifo_empty, fifo_block_avail;
  logic [FIFO_AW:0] fifo_count;

  async_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wr_clk      (clk_icap),
    .wr_rst      (grst_icap),
    .wr_en       (new_packet),
    .wr_data     (pkt_word),
    .full        (halt),
    .rd_clk      (clk_hash),
    .rd_rst      (global_reset),
    .rd_en       (fifo_rd_en),
    .rd_data     (fifo_data),
    .empty       (fifo_empty),
    .rd_count    (fifo_count),
    .block_avail (fifo_block_avail)
  );

  // ------------------------------------------------------------ hash domain
  logic         core_start, core_start_ok, core_msg_req, core_done, core_busy;
  logic [31:0]  core_msg_word;
  logic [255:0] core_digest;

  sha256_core u_sha (
    .clk      (clk_hash),
    .rst      (global_reset),
    .start    (core_start),
    .start_ok (core_start_ok),
    .msg_req  (core_msg_req),
    .msg_word (core_msg_word),
    .busy     (core_busy),
    .done     (core_done),
    .digest   (core_digest)
  );

  hash_control #(.FIFO_AW(FIFO_AW)) u_ctrl (
    .clk              (clk_hash),
    .rst              (global_reset),
    .fifo_block_avail (fifo_block_avail),
    .fifo_empty       (fifo_empty),
    .fifo_count       (fifo_count),
    .fifo_data        (fifo_data),
    .fifo_rd_en       (fifo_rd_en),
    .core_start_ok    (core_start_ok),
    .core_msg_req     (core_msg_req),
    .core_done        (core_done),
    .core_busy        (core_busy),
    .core_digest      (core_digest),
    .core_start       (core_start),
    .core_msg_word    (core_msg_word),
    .count            (pkt_count),
    .abort_code       (abort_code),
    .read_hash        (read_hash),
    .rd_strobe        (rd_strobe),
    .address          (address),
    .data             (data),
    .ready            (ready),
    .busy_hash        (busy_hash),
    .reset_icap       (reset_icap_req)
  );

endmodule

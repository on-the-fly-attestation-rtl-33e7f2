// async_fifo: dual-clock FIFO between the ICAP clock domain and the hash
// clock domain.
//
// Packet words from the bitstream filter are written at the ICAP clock and
// read by the hash controller at the (faster) hash clock. Read and write
// pointers are kept in binary in their own domain and passed to the other
// domain as Gray code through two-flop synchronisers, so each domain sees a
// conservative count: the writer never overwrites unread data and the reader
// never reads unwritten data.
//
// Write side: wr_data is stored in the cycle wr_en is high and full is low.
// full is raised HALT_MARGIN entries before the FIFO is really full; it is
// the signal that halts the reconfiguration, and the margin absorbs the words
// already on their way while the halt takes effect.
// Read side: first-word fall-through. rd_data shows the oldest word whenever
// empty is low; rd_en pops it. rd_count is the number of words available,
// block_avail is high when at least BLOCK_WORDS words (one 512-bit hash
// block) are available.
// Both sides reset synchronously; both resets must be applied together.
// An assertion flags a write into a FIFO that is really full.
//
// Depth 128 x 32 bits and the full / empty / 512-bits-available status follow
// the design description; the halt margin and the fall-through read port are
// this design's choices.
module async_fifo #(
  parameter int unsigned WIDTH       = 32,
  parameter int unsigned DEPTH       = 128,
  parameter int unsigned BLOCK_WORDS = 16,
  parameter int unsigned HALT_MARGIN = 2,
  localparam int unsigned AW         = $clog2(DEPTH)
) (
  input  logic             wr_clk,
  input  logic             wr_rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,

  input  logic             rd_clk,
  input  logic             rd_rst,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic [AW:0]      rd_count,
  output logic             block_avail
);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wptr_bin, wptr_gray, rptr_bin, rptr_gray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen by the writer
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen by the reader
  logic [AW:0] rptr_in_w, wptr_in_r, wr_used;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--)
      b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ------------------------------------------------------------ write side
  assign rptr_in_w = gray2bin(rgray_w2);
  assign wr_used   = wptr_bin - rptr_in_w;
  assign full      = (wr_used >= (AW+1)'(DEPTH - HALT_MARGIN));

  always_ff @(posedge wr_clk) begin
    if (wr_en && wr_used != (AW+1)'(DEPTH))
      mem[wptr_bin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wptr_bin  <= '0;
      wptr_gray <= '0;
      rgray_w1  <= '0;
      rgray_w2  <= '0;
    end else begin
      rgray_w1 <= rptr_gray;
      rgray_w2 <= rgray_w1;
      if (wr_en && wr_used != (AW+1)'(DEPTH)) begin
        wptr_bin  <= wptr_bin + 1'b1;
        wptr_gray <= bin2gray(wptr_bin + 1'b1);
      end
    end
  end

  // the writer must respect full: the halt margin is never used up
  a_no_overflow: assert property (@(posedge wr_clk) disable iff (wr_rst)
                                  wr_en |-> wr_used != (AW+1)'(DEPTH));

  // ------------------------------------------------------------ read side
  assign wptr_in_r   = gray2bin(wgray_r2);
  assign rd_count    = wptr_in_r - rptr_bin;
  assign empty       = (rd_count == '0);
  assign block_avail = (rd_count >= (AW+1)'(BLOCK_WORDS));
  assign rd_data     = mem[rptr_bin[AW-1:0]];

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rptr_bin  <= '0;
      rptr_gray <= '0;
      wgray_r1  <= '0;
      wgray_r2  <= '0;
    end else begin
      wgray_r1 <= wptr_gray;
      wgray_r2 <= wgray_r1;
      if (rd_en && !empty) begin
        rptr_bin  <= rptr_bin + 1'b1;
        rptr_gray <= bin2gray(rptr_bin + 1'b1);
      end
    end
  end

endmodule

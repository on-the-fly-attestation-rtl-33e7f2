// sync_filter: bitstream filter on the ICAP byte bus.
//
// The ICAP receives the configuration bitstream one byte per clock. Everything
// before the synchronisation sequence FF FF FF FF AA 99 55 66 (file header,
// padding) carries no configuration and is dropped. Once the sequence has been
// seen, the filter packs every four bytes, first byte in bits [31:24], into a
// 32-bit packet word and pulses new_packet for one cycle with it.
//
// Interface: a byte is taken in every cycle in which ce and write are both
// high. word and new_packet are registered: they appear in the cycle after
// the fourth byte of a word. synced stays high from the cycle after the last
// sync byte until reset. Reset is synchronous and returns the filter to
// hunting for the sync sequence.
//
// The sync sequence and the 8-to-32-bit packing follow the design
// description; the byte order within a word is the Virtex-II Pro one, and the
// active-high ce/write strobes are this design's choice.
module sync_filter
  import attest_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  in_data,
  input  logic        in_write,
  input  logic        in_ce,
  output logic [31:0] word,
  output logic        new_packet,
  output logic        synced
);

  logic [8*(SYNC_LEN-1)-1:0] hist;   // last seven bytes while hunting
  logic [23:0]               part;   // bytes 0..2 of the word being packed
  logic [1:0]                nbytes; // bytes already in part
  logic                      byte_en;

  assign byte_en = in_ce & in_write;

  always_ff @(posedge clk) begin
    if (rst) begin
      hist       <= '0;
      part       <= '0;
      nbytes     <= '0;
      synced     <= 1'b0;
      word       <= '0;
      new_packet <= 1'b0;
    end else begin
      new_packet <= 1'b0;
      if (byte_en) begin
        if (!synced) begin
          hist <= {hist[8*(SYNC_LEN-2)-1:0], in_data};
          if ({hist, in_data} == SYNC_SEQ) begin
            synced <= 1'b1;
            nbytes <= '0;
          end
        end else if (nbytes == 2'd3) begin
          word       <= {part, in_data};
          new_packet <= 1'b1;
          nbytes     <= '0;
        end else begin
          part   <= {part[15:0], in_data};
          nbytes <= nbytes + 2'd1;
        end
      end
    end
  end

endmodule

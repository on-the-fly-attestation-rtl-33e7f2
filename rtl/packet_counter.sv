// packet_counter: length of the loaded bitstream in 32-bit packet words.
//
// Counts the new_packet strobes of the bitstream filter, so that after a
// reconfiguration it holds the number of 32-bit words that followed the sync
// sequence. The count is part of the validation data read back with the
// digest: the hash is taken without a length field, and the length is checked
// separately.
//
// Interface: count increments in the cycle after each new_packet pulse and
// saturates at all ones instead of wrapping, so that an over-long bitstream
// can never alias to a short one. Synchronous reset clears it. The 28-bit
// width is the design description's; saturation is this design's choice.
module packet_counter #(
  parameter int unsigned WIDTH = 28
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             new_packet,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk) begin
    if (rst)
      count <= '0;
    else if (new_packet && count != '1)
      count <= count + 1'b1;
  end

endmodule

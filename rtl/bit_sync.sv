// bit_sync: two-flop synchroniser for a single level signal.
//
// Carries a level that changes slowly compared with the destination clock
// (a reset or a reset request) into another clock domain. The output follows
// the input two destination clock edges later; the flops have no reset of
// their own, so the input must be held for at least two destination cycles.
// The helper is this design's own: the design description only states that
// the attestation module runs in two clock domains.
module bit_sync (
  input  logic clk,
  input  logic d,
  output logic q
);

  logic meta;

  always_ff @(posedge clk) begin
    meta <= d;
    q    <= meta;
  end

endmodule

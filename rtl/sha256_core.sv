// sha256_core: iterative SHA-256 compression function, one round per clock.
//
// The core keeps the running hash value H (eight 32-bit words, set to the
// SHA-256 initial value by reset) and compresses one 512-bit block in 65
// clock cycles: 64 round cycles followed by one cycle that adds the working
// variables a..h into H. The message is not buffered: during rounds 0..15 the
// core raises msg_req and takes msg_word in that same cycle as W[t]; rounds
// 16..63 derive W[t] from a 16-word window of the schedule.
//
// Interface: start is accepted when start_ok is high (idle, or the final
// cycle of the previous block), and round 0 runs in the next cycle. The
// caller must then supply a valid msg_word in each of the 16 cycles msg_req
// is high. done pulses in the final cycle of a block; digest is updated at the
// end of that cycle and holds until the next block ends. No padding and no
// length field are added here: the core compresses exactly the blocks it is
// given. Synchronous reset.
//
// SHA-256 and the 65-cycle block time follow the design description (the
// original work used an existing core whose insides are not described); the
// streaming message input is this design's choice.
module sha256_core
  import attest_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  output logic         start_ok,
  output logic         msg_req,
  input  logic [31:0]  msg_word,
  output logic         busy,
  output logic         done,
  output logic [255:0] digest
);

  logic [31:0] h [8];          // running hash value
  logic [31:0] a, b, c, d, e, f, g, hh;
  logic [31:0] w [16];         // W[t-16] .. W[t-1]
  logic [6:0]  t;              // round number, 64 = final add
  logic        active;

  logic [31:0] wt, t1, t2;
  logic        final_cycle;

  assign final_cycle = active && t == 7'd64;
  assign start_ok    = !active || final_cycle;
  assign msg_req     = active && t < 7'd16;
  assign busy        = active;
  assign done        = final_cycle;

  always_comb begin
    if (t < 7'd16)
      wt = msg_word;
    else
      wt = small_sigma1(w[14]) + w[9] + small_sigma0(w[1]) + w[0];
    t1 = hh + big_sigma1(e) + ((e & f) ^ (~e & g)) + sha256_k(t[5:0]) + wt;
    t2 = big_sigma0(a) + ((a & b) ^ (a & c) ^ (b & c));
  end

  always_comb
    for (int i = 0; i < 8; i++)
      digest[32*(7-i) +: 32] = h[i];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 8; i++)
        h[i] <= SHA256_H0[32*(7-i) +: 32];
      for (int i = 0; i < 16; i++)
        w[i] <= '0;
      {a, b, c, d, e, f, g, hh} <= SHA256_H0;
      t      <= '0;
      active <= 1'b0;
    end else begin
      if (final_cycle) begin
        h[0] <= h[0] + a;  h[1] <= h[1] + b;
        h[2] <= h[2] + c;  h[3] <= h[3] + d;
        h[4] <= h[4] + e;  h[5] <= h[5] + f;
        h[6] <= h[6] + g;  h[7] <= h[7] + hh;
        {a, b, c, d} <= {h[0] + a, h[1] + b, h[2] + c, h[3] + d};
        {e, f, g, hh} <= {h[4] + e, h[5] + f, h[6] + g, h[7] + hh};
        active <= start;
        t      <= '0;
      end else if (active) begin
        hh <= g;  g <= f;  f <= e;  e <= d + t1;
        d  <= c;  c <= b;  b <= a;  a <= t1 + t2;
        for (int i = 0; i < 15; i++)
          w[i] <= w[i+1];
        w[15] <= wt;
        t <= t + 1'b1;
      end else if (start) begin
        {a, b, c, d, e, f, g, hh} <= {h[0], h[1], h[2], h[3], h[4], h[5], h[6], h[7]};
        active <= 1'b1;
        t      <= '0;
      end
    end
  end

endmodule

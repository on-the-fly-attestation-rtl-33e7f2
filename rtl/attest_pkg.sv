// attest_pkg: constants and types shared by the bitstream attestation module.
//
// Holds the synchronisation sequence that starts the packet stream, the
// Virtex-II Pro configuration packet layout, register addresses and command
// codes the region delimiter decodes, the 4-bit abort (violation) codes, and
// the SHA-256 round constants and initial hash value.
//
// The sync sequence, the register set and the command set follow the design
// description. Their binary encodings (packet header fields, register
// addresses, command codes) are those of the Virtex-II Pro configuration
// logic as published by the FPGA vendor; the abort code values are this
// design's own numbering.
package attest_pkg;

  // ---------------------------------------------------------------- sync
  localparam int unsigned SYNC_LEN = 8;
  localparam logic [8*SYNC_LEN-1:0] SYNC_SEQ = 64'hFFFF_FFFF_AA99_5566;

  // ---------------------------------------------------------------- packets
  // Type 1: [31:29]=001 [28:27]=op [26:13]=register [10:0]=word count
  // Type 2: [31:29]=010 [28:27]=op [26:0]=word count (register of last type 1)
  typedef enum logic [2:0] {
    PKT_TYPE1 = 3'b001,
    PKT_TYPE2 = 3'b010
  } pkt_type_e;

  typedef enum logic [1:0] {
    OP_NOP   = 2'b00,
    OP_READ  = 2'b01,
    OP_WRITE = 2'b10
  } pkt_op_e;

  // configuration register addresses (5 LSBs of the 14-bit field)
  typedef enum logic [4:0] {
    REG_CRC    = 5'd0,
    REG_FAR    = 5'd1,
    REG_FDRI   = 5'd2,
    REG_FDRO   = 5'd3,
    REG_CMD    = 5'd4,
    REG_CTL    = 5'd5,
    REG_MASK   = 5'd6,
    REG_STAT   = 5'd7,
    REG_LOUT   = 5'd8,
    REG_COR    = 5'd9,
    REG_MFWR   = 5'd10,
    REG_FLR    = 5'd11,
    REG_KEY    = 5'd12,
    REG_CBC    = 5'd13,
    REG_IDCODE = 5'd14
  } cfg_reg_e;

  // CMD register codes
  typedef enum logic [3:0] {
    CMD_NULL     = 4'd0,
    CMD_WCFG     = 4'd1,
    CMD_MFWR     = 4'd2,
    CMD_LFRM     = 4'd3,
    CMD_RCFG     = 4'd4,
    CMD_START    = 4'd5,
    CMD_RCAP     = 4'd6,
    CMD_RCRC     = 4'd7,
    CMD_AGHIGH   = 4'd8,
    CMD_SWITCH   = 4'd9,
    CMD_GRESTORE = 4'd10,
    CMD_SHUTDOWN = 4'd11,
    CMD_GCAPTURE = 4'd12,
    CMD_DESYNCH  = 4'd13
  } cfg_cmd_e;

  // ---------------------------------------------------------------- abort
  typedef enum logic [3:0] {
    ABT_NONE         = 4'd0,
    ABT_FRAME_REGION = 4'd1,  // frame written outside the reconfigurable region
    ABT_BAD_FLR      = 4'd2,  // frame length differs from the device's
    ABT_CMD_SWITCH   = 4'd3,  // SWITCH command (clock frequency change)
    ABT_CMD_SHUTDOWN = 4'd4,  // SHUTDOWN command
    ABT_CMD_MFWR     = 4'd5,  // MFWR command (multiple frame write)
    ABT_MFWR_REG     = 4'd6,  // write to the MFWR register
    ABT_BAD_PACKET   = 4'd7   // word that is no type 1 / type 2 header
  } abort_e;

  // ---------------------------------------------------------------- SHA-256
  localparam logic [255:0] SHA256_H0 = {
    32'h6a09e667, 32'hbb67ae85, 32'h3c6ef372, 32'ha54ff53a,
    32'h510e527f, 32'h9b05688c, 32'h1f83d9ab, 32'h5be0cd19
  };

  localparam logic [32*64-1:0] SHA256_K = {
    32'h428a2f98, 32'h71374491, 32'hb5c0fbcf, 32'he9b5dba5,
    32'h3956c25b, 32'h59f111f1, 32'h923f82a4, 32'hab1c5ed5,
    32'hd807aa98, 32'h12835b01, 32'h243185be, 32'h550c7dc3,
    32'h72be5d74, 32'h80deb1fe, 32'h9bdc06a7, 32'hc19bf174,
    32'he49b69c1, 32'hefbe4786, 32'h0fc19dc6, 32'h240ca1cc,
    32'h2de92c6f, 32'h4a7484aa, 32'h5cb0a9dc, 32'h76f988da,
    32'h983e5152, 32'ha831c66d, 32'hb00327c8, 32'hbf597fc7,
    32'hc6e00bf3, 32'hd5a79147, 32'h06ca6351, 32'h14292967,
    32'h27b70a85, 32'h2e1b2138, 32'h4d2c6dfc, 32'h53380d13,
    32'h650a7354, 32'h766a0abb, 32'h81c2c92e, 32'h92722c85,
    32'ha2bfe8a1, 32'ha81a664b, 32'hc24b8b70, 32'hc76c51a3,
    32'hd192e819, 32'hd6990624, 32'hf40e3585, 32'h106aa070,
    32'h19a4c116, 32'h1e376c08, 32'h2748774c, 32'h34b0bcb5,
    32'h391c0cb3, 32'h4ed8aa4a, 32'h5b9cca4f, 32'h682e6ff3,
    32'h748f82ee, 32'h78a5636f, 32'h84c87814, 32'h8cc70208,
    32'h90befffa, 32'ha4506ceb, 32'hbef9a3f7, 32'hc67178f2
  };

  function automatic logic [31:0] sha256_k(input logic [5:0] t);
    return SHA256_K[32*(63-int'(t)) +: 32];
  endfunction

  function automatic logic [31:0] rotr(input logic [31:0] x, input int unsigned n);
    return (x >> n) | (x << (32 - n));
  endfunction

  function automatic logic [31:0] big_sigma0(input logic [31:0] x);
    return rotr(x, 2) ^ rotr(x, 13) ^ rotr(x, 22);
  endfunction

  function automatic logic [31:0] big_sigma1(input logic [31:0] x);
    return rotr(x, 6) ^ rotr(x, 11) ^ rotr(x, 25);
  endfunction

  function automatic logic [31:0] small_sigma0(input logic [31:0] x);
    return rotr(x, 7) ^ rotr(x, 18) ^ (x >> 3);
  endfunction

  function automatic logic [31:0] small_sigma1(input logic [31:0] x);
    return rotr(x, 17) ^ rotr(x, 19) ^ (x >> 10);
  endfunction

endpackage

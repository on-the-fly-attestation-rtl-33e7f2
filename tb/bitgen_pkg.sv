// bitgen_pkg: builds configuration packet streams for the testbenches.
//
// Packet words follow the Virtex-II Pro layout: type 1 header
// {3'b001, op, 14-bit register, 2'b00, 11-bit count}, type 2 header
// {3'b010, op, 27-bit count}, op 2'b10 = write, 2'b01 = read.
// Register and command codes are written out here as plain numbers so that
// the streams do not depend on the design's package.
package bitgen_pkg;

  typedef logic [31:0] wq_t [$];

  localparam int R_CRC = 0, R_FAR = 1, R_FDRI = 2, R_FDRO = 3, R_CMD = 4,
                 R_COR = 9, R_MFWR = 10, R_FLR = 11, R_IDCODE = 14;
  localparam int C_WCFG = 1, C_MFWR = 2, C_LFRM = 3, C_START = 5, C_RCRC = 7,
                 C_SWITCH = 9, C_SHUTDOWN = 11, C_DESYNCH = 13;

  function automatic logic [31:0] t1w(int reg_addr, int wc);
    return {3'b001, 2'b10, 14'(reg_addr), 2'b00, 11'(wc)};
  endfunction

  function automatic logic [31:0] t1r(int reg_addr, int wc);
    return {3'b001, 2'b01, 14'(reg_addr), 2'b00, 11'(wc)};
  endfunction

  function automatic logic [31:0] t2w(int wc);
    return {3'b010, 2'b10, 27'(wc)};
  endfunction

  localparam logic [31:0] NOOP = 32'h2000_0000;

  // frame number -> FAR word (frame number in bits [26:9])
  function automatic logic [31:0] far_of(int frame);
    return 32'(frame) << 9;
  endfunction

  // stream up to and including the FDRI header for nframes frames,
  // starting at frame 'first'; use_type2 selects a type 2 word count
  function automatic wq_t preamble(int frame_words, int flr, int first,
                                   int nframes, bit use_type2);
    wq_t q;
    q.push_back(NOOP);
    q.push_back(t1w(R_CMD, 1));    q.push_back(32'(C_RCRC));
    q.push_back(NOOP);
    q.push_back(t1w(R_FLR, 1));    q.push_back(32'(flr));
    q.push_back(t1w(R_COR, 1));    q.push_back(32'h0000_3FE5);
    q.push_back(t1w(R_IDCODE, 1)); q.push_back(32'h0127_E093);
    q.push_back(t1r(R_FDRO, 0));   // read header, no payload in the input
    q.push_back(t1w(R_CMD, 1));    q.push_back(32'(C_WCFG));
    q.push_back(t1w(R_FAR, 1));    q.push_back(far_of(first));
    if (use_type2) begin
      q.push_back(t1w(R_FDRI, 0));
      q.push_back(t2w(nframes * frame_words));
    end else begin
      q.push_back(t1w(R_FDRI, nframes * frame_words));
    end
    return q;
  endfunction

  function automatic wq_t postamble();
    wq_t q;
    q.push_back(t1w(R_CMD, 1));  q.push_back(32'(C_LFRM));
    q.push_back(t1w(R_CMD, 1));  q.push_back(32'(C_START));
    q.push_back(t1w(R_CRC, 1));  q.push_back(32'h0000_1234);
    q.push_back(t1w(R_CMD, 1));  q.push_back(32'(C_DESYNCH));
    q.push_back(NOOP);           q.push_back(NOOP);
    return q;
  endfunction

endpackage

// tb_attestation_top: end-to-end testbench of the attestation module at its
// default parameters (206-word frames, region of frames 0x4000..0x4FFF,
// 128-word FIFO, 50 MHz ICAP clock, 100 MHz hash clock).
//
// A reconfiguration master sends byte streams onto the snooped ICAP bus, one
// byte per ICAP cycle, and stops while halt is high or once abort is high.
// Each stream is a random file header, the sync sequence and a packet stream
// built with bitgen_pkg. After the stream the host pulses read_hash, waits
// for ready, reads the status word (address 8) and the eight digest words,
// then applies the global reset.
//
// Checks for every stream: the abort code; the packet count (exact for legal
// streams, for aborted ones no larger than what was sent); the digest, equal
// to the reference SHA-256 compression over the first count words after the
// sync sequence, completed with zero words and without a length field; that
// abort rises before the ICAP could act on the offending word (before the
// whole next word has been sent); that the status read resets the ICAP-side
// counter. One legal stream runs with the hash clock slowed to 12.5 MHz so
// that the FIFO fills and halt throttles the master. Mechanisms counted and
// required at least once: halt, every abort code 1..7, zero completion of a
// partial last block, a stream that is a whole number of blocks, and the
// ICAP-side reset on the status read. At the nominal clocks a stream sent at
// one byte per cycle must never be halted.
module tb_attestation_top;
  import bitgen_pkg::*;
  import sha256_ref_pkg::*;

  localparam int FW = 206;

  logic        clk_icap = 1'b0, clk_hash = 1'b0;
  logic        global_reset;
  logic [7:0]  icap_data;
  logic        icap_write, icap_ce;
  logic        abort, halt, synced;
  logic        read_hash, rd_strobe;
  logic [3:0]  address;
  logic [31:0] data;
  logic        ready, busy_hash;

  int hash_half = 5;
  always #10 clk_icap = ~clk_icap;
  always #(hash_half) clk_hash = ~clk_hash;

  attestation_top dut (.*);

  int checks = 0, failures = 0;
  int n_halt = 0, n_zero_compl = 0, n_whole = 0, n_icap_reset = 0, n_in_time = 0;
  int n_abort [8];

  initial begin
    #20ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk_icap) if (halt) n_halt++;

  task automatic chk(input string what, input longint got, exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // everything after the sync sequence, as words
  logic [31:0] words [$];

  task automatic bus_read(input logic [3:0] a, output logic [31:0] d);
    @(posedge clk_hash); #1 address = a; rd_strobe = 1'b1;
    #1 d = data;
    @(posedge clk_hash); #1 rd_strobe = 1'b0;
  endtask

  // send a stream; bad = index of the offending word or -1
  task automatic run(input string name, input wq_t q, input int bad, input int code);
    logic [7:0]  bytes [$];
    logic [31:0] d, status;
    logic [255:0] h;
    logic [511:0] blk;
    int sent_bytes, abort_at, cnt, nb;

    words = q;
    // header: random bytes without FF so no false sync can form
    repeat ($urandom_range(5, 40)) bytes.push_back(8'($urandom_range(0, 254)));
    foreach (SYNC_BYTES[i]) bytes.push_back(SYNC_BYTES[i]);
    foreach (q[i]) for (int b = 3; b >= 0; b--) bytes.push_back(q[i][8*b +: 8]);

    global_reset = 1'b1;
    repeat (12) @(posedge clk_hash);
    #1 global_reset = 1'b0;
    repeat (4) @(posedge clk_icap);

    sent_bytes = 0;
    abort_at = -1;
    while (sent_bytes < bytes.size()) begin
      @(posedge clk_icap); #1;
      if (abort) begin
        abort_at = sent_bytes;
        break;
      end
      if (halt) begin
        icap_ce = 1'b0; icap_write = 1'b0;
      end else begin
        icap_ce = 1'b1; icap_write = 1'b1;
        icap_data = bytes[sent_bytes];
        sent_bytes++;
      end
    end
    @(posedge clk_icap); #1 icap_ce = 1'b0; icap_write = 1'b0;
    repeat (6) @(posedge clk_icap);
    if (abort && abort_at < 0) abort_at = sent_bytes;

    @(posedge clk_hash); #1 read_hash = 1'b1;
    @(posedge clk_hash); #1 read_hash = 1'b0;
    fork
      wait (ready);
      begin repeat (200000) @(posedge clk_hash); end
    join_any
    disable fork;
    checks++;
    if (!ready) begin failures++; $display("FAIL %s: ready never rose", name); end

    bus_read(4'd8, status);
    cnt = int'(status[27:0]);
    chk({name, ": abort code"}, status[31:28], code);
    chk({name, ": abort pin"}, abort, code != 0);
    if (code != 0) n_abort[code]++;
    if (bad < 0) begin
      chk({name, ": packet count"}, cnt, q.size());
    end else begin
      checks++;
      if (cnt < bad + 1 || cnt > q.size()) begin
        failures++;
        $display("FAIL %s: count %0d, offending word %0d", name, cnt, bad);
      end
      // header bytes + 8 sync bytes + whole words up to the offending one
      checks++;
      if (abort_at >= 0 && abort_at - (bytes.size() - 4 * q.size()) < 4 * (bad + 2)) n_in_time++;
      else begin
        failures++;
        $display("FAIL %s: abort too late (byte %0d)", name, abort_at);
      end
    end
    if (cnt % 16 == 0) n_whole++; else n_zero_compl++;

    // reference digest
    h = h0();
    nb = (cnt + 15) / 16;
    for (int b = 0; b < nb; b++) begin
      blk = '0;
      for (int j = 0; j < 16; j++)
        if (16 * b + j < cnt) blk[32*(15-j) +: 32] = q[16*b + j];
      h = compress(h, blk);
    end
    repeat (4) @(posedge clk_icap);
    #1;
    checks++;
    if (dut.u_counter.count == '0 && !abort) n_icap_reset++;
    else begin failures++; $display("FAIL %s: status read did not reset the ICAP side", name); end
    for (int i = 0; i < 8; i++) begin
      bus_read(4'(i), d);
      chk($sformatf("%s: digest word %0d", name, i), d, h[32*(7-i) +: 32]);
    end
  endtask

  localparam logic [7:0] SYNC_BYTES [8] = '{8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hAA, 8'h99, 8'h55, 8'h66};

  function automatic wq_t frames(int n);
    wq_t q;
    for (int i = 0; i < n * FW; i++)
      q.push_back((i % 7 == 3) ? t1w(R_CMD, 1) : (i % 7 == 4) ? 32'(C_SHUTDOWN) : $urandom);
    return q;
  endfunction

  initial begin
    wq_t q, p;
    int n;
    icap_data = '0; icap_write = 1'b0; icap_ce = 1'b0;
    read_hash = 1'b0; rd_strobe = 1'b0; address = '0;
    global_reset = 1'b1;
    foreach (n_abort[i]) n_abort[i] = 0;

    // legal partial reconfiguration, 3 frames
    q = preamble(FW, FW, 'h4000, 3, 1'b1); q = {q, frames(3), postamble()};
    run("legal", q, -1, 0);
    // at 50 MHz ICAP and 100 MHz hash clock the hash keeps up: no halt
    chk("no halt at full clock", n_halt, 0);

    // legal, padded with NOOPs to whole blocks, with a slow hash clock
    q = preamble(FW, FW, 'h4FFE, 2, 1'b0); q = {q, frames(2), postamble()};
    while (q.size() % 16 != 0) q.push_back(NOOP);
    hash_half = 40;
    run("legal slow hash", q, -1, 0);
    hash_half = 5;

    // frame outside the region
    p = preamble(FW, FW, 'h3FFF, 1, 1'b1); n = p.size();
    run("outside region", {p, frames(1), postamble()}, n, 1);
    // frames running past the region's end (0x4FFF fine, 0x5000 not)
    p = preamble(FW, FW, 'h4FFF, 2, 1'b1); n = p.size();
    run("past region end", {p, frames(2), postamble()}, n + FW, 1);
    // wrong frame length
    run("bad flr", {preamble(FW, FW - 1, 'h4000, 1, 1'b1), frames(1)}, 5, 2);
    // forbidden commands
    for (int k = 0; k < 3; k++) begin
      int cmd;
      cmd = (k == 0) ? C_SWITCH : (k == 1) ? C_SHUTDOWN : C_MFWR;
      p = preamble(FW, FW, 'h4000, 1, 1'b1); p = {p, frames(1)};
      p.push_back(t1w(R_CMD, 1)); n = p.size(); p.push_back(32'(cmd));
      run($sformatf("command %0d", cmd), {p, postamble()}, n, 3 + k);
    end
    // MFWR register
    p = preamble(FW, FW, 'h4000, 1, 1'b1); p = {p, frames(1)}; n = p.size();
    p.push_back(t1w(R_MFWR, 1)); p.push_back(0);
    run("mfwr register", {p, postamble()}, n, 6);
    // a word that is no packet header
    p = preamble(FW, FW, 'h4000, 1, 1'b1); p = {p, frames(1)}; n = p.size();
    p.push_back(32'hE000_0000);
    run("bad packet", {p, postamble()}, n, 7);

    // mechanisms
    chk("halt seen", n_halt > 0, 1);
    chk("zero completion seen", n_zero_compl > 0, 1);
    chk("whole-block stream seen", n_whole > 0, 1);
    chk("ICAP-side reset seen", n_icap_reset > 0, 1);
    for (int c = 1; c < 8; c++) chk($sformatf("abort code %0d seen", c), n_abort[c] > 0, 1);
    $display("mechanisms: halt cycles %0d, zero completion %0d, whole blocks %0d, icap resets %0d, aborts in time %0d",
             n_halt, n_zero_compl, n_whole, n_icap_reset, n_in_time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

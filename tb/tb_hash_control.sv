// tb_hash_control: self-checking testbench of the hash-domain control unit.
//
// The controller is wired to a dual-clock FIFO and a SHA-256 core, as in the
// attestation module. The testbench writes packet words into the FIFO on a
// 20 ns clock, the hash side runs on a 10 ns clock. For each message length
// (0, 16, 37 and 64 words) it pulses read_hash, waits for ready and reads the
// register bank. The digest must equal the reference model applied to the
// words completed with zero words to a whole number of 512-bit blocks, with
// no length field. Address 8 must return {abort code, count} as driven.
// busy_hash must be high while the digest is being concluded and low once
// ready. Reading address 8 must raise reset_icap, which must stay high until the
// eighth digest word has been read. With 64 words waiting, consecutive
// blocks must finish exactly 65 hash cycles apart.
module tb_hash_control;
  import sha256_ref_pkg::*;

  logic clk = 1'b0, wclk = 1'b0;
  logic rst, wrst;

  always #5  clk  = ~clk;
  always #10 wclk = ~wclk;

  int checks = 0, failures = 0;

  // FIFO
  logic        wr_en, full;
  logic [31:0] wr_data;
  logic [31:0] fifo_data;
  logic        fifo_rd_en, fifo_empty, fifo_block_avail;
  logic [7:0]  fifo_count;

  async_fifo u_fifo (
    .wr_clk(wclk), .wr_rst(wrst), .wr_en, .wr_data, .full,
    .rd_clk(clk), .rd_rst(rst), .rd_en(fifo_rd_en), .rd_data(fifo_data),
    .empty(fifo_empty), .rd_count(fifo_count), .block_avail(fifo_block_avail)
  );

  // core
  logic         core_start, core_start_ok, core_msg_req, core_done, core_busy;
  logic [31:0]  core_msg_word;
  logic [255:0] core_digest;

  sha256_core u_core (
    .clk, .rst, .start(core_start), .start_ok(core_start_ok),
    .msg_req(core_msg_req), .msg_word(core_msg_word), .busy(core_busy),
    .done(core_done), .digest(core_digest)
  );

  // host side
  logic [27:0] count;
  attest_pkg::abort_e abort_code;
  logic        read_hash, rd_strobe, ready, busy_hash, reset_icap;
  logic [3:0]  address;
  logic [31:0] data;

  hash_control dut (.*);

  initial begin
    #2ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // spacing of done pulses
  longint last_done = -1, cyc = 0;
  int     gaps_65 = 0, gaps_other = 0;
  bit     measure = 0;
  always @(posedge clk) begin
    cyc++;
    if (core_done) begin
      if (measure && last_done >= 0) begin
        if (cyc - last_done == 65) gaps_65++;
        else gaps_other++;
      end
      last_done = cyc;
    end
  end

  task automatic chk(input string what, input logic [31:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic write_words(input logic [31:0] w [$]);
    foreach (w[i]) begin
      @(posedge wclk);
      while (full) @(posedge wclk);
      #1 wr_en = 1'b1; wr_data = w[i];
      @(posedge wclk); #1 wr_en = 1'b0;
    end
  endtask

  task automatic bus_read(input logic [3:0] a, output logic [31:0] d);
    @(posedge clk); #1 address = a; rd_strobe = 1'b1;
    #2 d = data;
    @(posedge clk); #1 rd_strobe = 1'b0;
  endtask

  task automatic one_message(input int n);
    logic [31:0] w [$];
    logic [255:0] h;
    logic [511:0] blk;
    logic [31:0] d;
    int nb;

    // reset both sides
    rst = 1'b1; wrst = 1'b1;
    repeat (3) @(posedge wclk);
    #1 rst = 1'b0; wrst = 1'b0;

    for (int i = 0; i < n; i++) w.push_back($urandom);
    count      = 28'($urandom);
    abort_code = attest_pkg::abort_e'($urandom_range(0, 7));

    // reference: zero completion, no length
    h = h0();
    nb = (n + 15) / 16;
    for (int b = 0; b < nb; b++) begin
      blk = '0;
      for (int j = 0; j < 16; j++)
        if (16 * b + j < n) blk[32*(15-j) +: 32] = w[16*b + j];
      h = compress(h, blk);
    end

    measure = (n == 64);
    last_done = -1;
    write_words(w);
    @(posedge clk); #1 read_hash = 1'b1;
    @(posedge clk); #1 read_hash = 1'b0;
    checks++;
    if (ready) begin failures++; $display("FAIL ready too early"); end
    checks++;
    if (!busy_hash) begin failures++; $display("FAIL busy_hash low while concluding"); end
    fork
      wait (ready);
      begin repeat (2000) @(posedge clk); end
    join_any
    disable fork;
    checks++;
    if (!ready) begin failures++; $display("FAIL ready never rose (n=%0d)", n); end
    checks++;
    if (busy_hash) begin failures++; $display("FAIL busy_hash high after ready"); end
    measure = 0;

    bus_read(4'd8, d);
    chk("status", d, {abort_code, count});
    @(posedge clk); #1;
    checks++;
    if (!reset_icap) begin failures++; $display("FAIL reset_icap not raised by status read"); end
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (!reset_icap) begin failures++; $display("FAIL reset_icap dropped before word %0d", i); end
      bus_read(4'(i), d);
      chk($sformatf("digest word %0d, n=%0d", i, n), d, h[32*(7-i) +: 32]);
    end
    @(posedge clk); #1;
    checks++;
    if (reset_icap) begin failures++; $display("FAIL reset_icap still high after digest read"); end
    bus_read(4'd12, d);
    chk("unused address", d, 32'h0);
  endtask

  initial begin
    wr_en = 1'b0; wr_data = '0; read_hash = 1'b0; rd_strobe = 1'b0;
    address = '0; count = '0; abort_code = attest_pkg::ABT_NONE;
    one_message(37);
    one_message(16);
    one_message(0);
    one_message(64);
    checks++;
    if (gaps_65 != 3 || gaps_other != 0) begin
      failures++;
      $display("FAIL block spacing: %0d at 65 cycles, %0d otherwise", gaps_65, gaps_other);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

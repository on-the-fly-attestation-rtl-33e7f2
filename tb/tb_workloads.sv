// tb_workloads: the two bitstream sizes the design is meant for, streamed
// through the attestation module at the nominal clocks (ICAP 50 MHz, hash
// 100 MHz) with one byte per ICAP cycle.
//
// 1. A partial bitstream for about 10% of an XC2VP30: 1.4 Mbit, that is 213
//    frames of 206 words plus the packet overhead, into the default region.
// 2. A bitstream the size of a full XC2VP30 configuration, about 1.7 Mbyte
//    (2063 frames), on a second instance whose region covers every frame
//    number.
// For each: the load must never be halted (the ICAP time equals the number
// of bytes), abort must stay low, ready must follow read_hash within
// SETTLE + two blocks + a few cycles, and count and digest must match the
// reference model. The elapsed ICAP time is printed.
module tb_workloads;
  import bitgen_pkg::*;
  import sha256_ref_pkg::*;

  localparam int FW = 206;

  logic        clk_icap = 1'b0, clk_hash = 1'b0;
  always #10 clk_icap = ~clk_icap;
  always #5  clk_hash = ~clk_hash;

  int checks = 0, failures = 0;

  // instance 0: default parameters; instance 1: region = whole device
  logic        global_reset [2];
  logic [7:0]  icap_data [2];
  logic        icap_write [2], icap_ce [2];
  logic        abort [2], halt [2], synced [2];
  logic        read_hash [2], rd_strobe [2];
  logic [3:0]  address [2];
  logic [31:0] data [2];
  logic        ready [2], busy_hash [2];

  attestation_top u_part (
    .clk_icap, .clk_hash, .global_reset(global_reset[0]),
    .icap_data(icap_data[0]), .icap_write(icap_write[0]), .icap_ce(icap_ce[0]),
    .abort(abort[0]), .halt(halt[0]), .synced(synced[0]),
    .read_hash(read_hash[0]), .rd_strobe(rd_strobe[0]), .address(address[0]),
    .data(data[0]), .ready(ready[0]), .busy_hash(busy_hash[0]));

  attestation_top #(.REGION_FIRST(18'h0), .REGION_LAST(18'h3FFFF)) u_full (
    .clk_icap, .clk_hash, .global_reset(global_reset[1]),
    .icap_data(icap_data[1]), .icap_write(icap_write[1]), .icap_ce(icap_ce[1]),
    .abort(abort[1]), .halt(halt[1]), .synced(synced[1]),
    .read_hash(read_hash[1]), .rd_strobe(rd_strobe[1]), .address(address[1]),
    .data(data[1]), .ready(ready[1]), .busy_hash(busy_hash[1]));

  initial begin
    #60ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input longint got, exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d (%0h) expected %0d (%0h)", what, got, got, exp, exp);
    end
  endtask

  task automatic run(input int u, input string name, input int nframes, input int first);
    wq_t q;
    logic [31:0] st, d;
    logic [255:0] h;
    logic [511:0] blk;
    longint t0, icap_cycles, halt_cycles, wait_cycles;
    int nbytes;

    q = preamble(FW, FW, first, nframes, 1'b1);
    for (int i = 0; i < nframes * FW; i++) q.push_back($urandom);
    q = {q, postamble()};

    global_reset[u] = 1'b1;
    repeat (12) @(posedge clk_hash);
    #1 global_reset[u] = 1'b0;
    repeat (4) @(posedge clk_icap);

    // header byte, sync sequence, then the words; the master never waits
    // unless halt is high
    icap_cycles = 0; halt_cycles = 0;
    nbytes = 9 + 4 * q.size();
    for (int i = 0; i < nbytes; ) begin
      logic [7:0] b;
      if (i == 0) b = 8'h3C;
      else if (i <= 4) b = 8'hFF;
      else if (i <= 8) b = (i == 5) ? 8'hAA : (i == 6) ? 8'h99 : (i == 7) ? 8'h55 : 8'h66;
      else b = q[(i - 9) / 4][8*(3 - (i - 9) % 4) +: 8];
      @(posedge clk_icap); #1;
      icap_cycles++;
      if (halt[u]) begin
        halt_cycles++;
        icap_ce[u] = 1'b0; icap_write[u] = 1'b0;
      end else begin
        icap_ce[u] = 1'b1; icap_write[u] = 1'b1; icap_data[u] = b;
        i++;
      end
    end
    @(posedge clk_icap); #1 icap_ce[u] = 1'b0; icap_write[u] = 1'b0;

    @(posedge clk_hash); #1 read_hash[u] = 1'b1;
    @(posedge clk_hash); #1 read_hash[u] = 1'b0;
    wait_cycles = 1;
    while (!ready[u] && wait_cycles < 100000) begin
      @(posedge clk_hash); #1 wait_cycles++;
    end

    chk({name, ": halt cycles"}, halt_cycles, 0);
    chk({name, ": ICAP cycles equal bytes"}, icap_cycles, nbytes);
    chk({name, ": abort"}, abort[u], 0);
    checks++;
    if (!ready[u] || wait_cycles > 8 + 2 * 65 + 20) begin
      failures++;
      $display("FAIL %s: ready after %0d hash cycles", name, wait_cycles);
    end

    @(posedge clk_hash); #1 address[u] = 4'd8; rd_strobe[u] = 1'b1;
    #1 st = data[u];
    @(posedge clk_hash); #1 rd_strobe[u] = 1'b0;
    chk({name, ": packet count"}, st[27:0], q.size());
    chk({name, ": abort code"}, st[31:28], 0);

    h = h0();
    for (int b = 0; b < (q.size() + 15) / 16; b++) begin
      blk = '0;
      for (int j = 0; j < 16; j++)
        if (16 * b + j < q.size()) blk[32*(15-j) +: 32] = q[16*b + j];
      h = compress(h, blk);
    end
    for (int i = 0; i < 8; i++) begin
      @(posedge clk_hash); #1 address[u] = 4'(i); rd_strobe[u] = 1'b1;
      #1 d = data[u];
      @(posedge clk_hash); #1 rd_strobe[u] = 1'b0;
      chk($sformatf("%s: digest word %0d", name, i), d, h[32*(7-i) +: 32]);
    end
    $display("%s: %0d words (%0d bits), %0d ICAP cycles = %0.3f ms at 50 MHz, ready %0d hash cycles after read_hash",
             name, q.size(), 32 * q.size(), icap_cycles, real'(icap_cycles) * 20e-6, wait_cycles);
  endtask

  initial begin
    for (int u = 0; u < 2; u++) begin
      global_reset[u] = 1'b1; icap_data[u] = '0; icap_write[u] = 1'b0; icap_ce[u] = 1'b0;
      read_hash[u] = 1'b0; rd_strobe[u] = 1'b0; address[u] = '0;
    end
    run(0, "10% partial bitstream", 213, 'h4000);
    run(1, "full-device-size bitstream", 2063, 'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_region_delimiter: self-checking testbench of the region delimiter.
//
// Each scenario is a packet stream built with bitgen_pkg and the index of
// the word that must trigger the abort (or none) with its code. The words
// are fed with random gaps; after every word the testbench checks that abort
// is low before the offending word, rises in the cycle right after it with
// the right code, and then holds. Scenarios: a legal stream with type 2 and
// with type 1 frame data (data words that look like commands must be
// ignored), a FAR below and above the region, frame data running past the
// region's end, a wrong FLR, SWITCH, SHUTDOWN and MFWR commands, a write to
// the MFWR register, a word that is no packet header, and a read packet.
// Parameters are reduced: 8-word frames, region of frames 0x100..0x103.
module tb_region_delimiter;
  import bitgen_pkg::*;

  localparam int FW = 8;

  logic        clk = 1'b0;
  logic        rst;
  logic [31:0] word;
  logic        new_packet;
  logic        abort;
  attest_pkg::abort_e abort_code;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  region_delimiter #(
    .FRAME_WORDS (FW),
    .REGION_FIRST(18'h100),
    .REGION_LAST (18'h103)
  ) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic wq_t frames(int n);
    wq_t q;
    for (int i = 0; i < n * FW; i++) begin
      case (i % 5)
        1: q.push_back(t1w(R_CMD, 1));        // look-alike header
        2: q.push_back(32'(C_SHUTDOWN));      // look-alike command
        3: q.push_back(32'hFFFF_FFFF);
        default: q.push_back($urandom);
      endcase
    end
    return q;
  endfunction

  // run one stream; bad = index of the offending word or -1
  task automatic run(input string name, input wq_t q, input int bad, input int code);
    rst = 1'b1; new_packet = 1'b0;
    @(posedge clk); #1 rst = 1'b0;
    for (int i = 0; i < q.size(); i++) begin
      repeat ($urandom_range(0, 2)) begin @(posedge clk); #1; end
      word = q[i]; new_packet = 1'b1;
      @(posedge clk); #1 new_packet = 1'b0; word = $urandom;
      checks++;
      if (bad >= 0 && i >= bad) begin
        if (!abort || abort_code !== attest_pkg::abort_e'(code)) begin
          failures++;
          $display("FAIL %s: word %0d abort=%b code=%0d, expected code %0d",
                   name, i, abort, abort_code, code);
        end
      end else if (abort) begin
        failures++;
        $display("FAIL %s: abort code %0d at word %0d", name, abort_code, i);
      end
    end
  endtask

  initial begin
    wq_t q, p;
    int n;
    word = '0; new_packet = 1'b0;
    rst = 1'b1;
    repeat (2) @(posedge clk);

    // legal, type 2 count, whole region
    q = preamble(FW, FW, 'h100, 4, 1'b1); q = {q, frames(4), postamble()};
    run("legal type2", q, -1, 0);
    // legal, type 1 count
    q = preamble(FW, FW, 'h101, 2, 1'b0); q = {q, frames(2), postamble()};
    run("legal type1", q, -1, 0);
    // FAR below the region: abort at the first data word
    p = preamble(FW, FW, 'h0FF, 1, 1'b1); n = p.size();
    q = {p, frames(1), postamble()};
    run("far below", q, n, 1);
    // FAR above the region
    p = preamble(FW, FW, 'h104, 1, 1'b0); n = p.size();
    q = {p, frames(1), postamble()};
    run("far above", q, n, 1);
    // frames run past the end: frames 0x102, 0x103 fine, 0x104 not
    p = preamble(FW, FW, 'h102, 3, 1'b1); n = p.size();
    q = {p, frames(3), postamble()};
    run("overrun", q, n + 2 * FW, 1);
    // wrong frame length
    q = preamble(FW, FW + 1, 'h100, 1, 1'b1); q = {q, frames(1)};
    run("bad flr", q, 5, 2);
    // forbidden commands after a legal frame
    for (int k = 0; k < 3; k++) begin
      int cmd;
      cmd = (k == 0) ? C_SWITCH : (k == 1) ? C_SHUTDOWN : C_MFWR;
      p = preamble(FW, FW, 'h100, 1, 1'b1); p = {p, frames(1)};
      p.push_back(t1w(R_CMD, 1)); n = p.size(); p.push_back(32'(cmd));
      q = {p, postamble()};
      run($sformatf("cmd %0d", cmd), q, n, 3 + k);
    end
    // write to the MFWR register
    p = preamble(FW, FW, 'h100, 1, 1'b1); p = {p, frames(1)};
    n = p.size(); p.push_back(t1w(R_MFWR, 2)); p.push_back(0); p.push_back(0);
    run("mfwr reg", p, n, 6);
    // not a packet header
    p = preamble(FW, FW, 'h100, 1, 1'b1); p = {p, frames(1)};
    n = p.size(); p.push_back(32'hFFFF_FFFF); p.push_back(NOOP);
    run("bad packet", p, n, 7);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

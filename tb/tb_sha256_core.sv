// tb_sha256_core: self-checking testbench of the SHA-256 compression core.
//
// 1. The one-block message "abc" and the two-block message
//    "abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq" (standard
//    padding added here) must give the published SHA-256 digests; the two
//    blocks are fed back to back, starting the second in the final cycle of
//    the first.
// 2. Random blocks, with random idle gaps, are compared with the reference
//    model in sha256_ref_pkg.
// 3. Every block must take exactly 65 cycles from round 0 to done, and the
//    round constants of the design are compared with the generated ones.
module tb_sha256_core;
  import sha256_ref_pkg::*;

  logic         clk = 1'b0;
  logic         rst;
  logic         start, start_ok, msg_req, busy, done;
  logic [31:0]  msg_word;
  logic [255:0] digest;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sha256_core dut (.*);

  logic [511:0] blk;
  int           widx;
  int           cyc;

  // message words are driven from blk while the core asks for them
  assign msg_word = msg_req ? blk[32*(15-widx) +: 32] : 32'hDEAD_BEEF;

  always_ff @(posedge clk) begin
    if (start && start_ok) widx <= 0;
    else if (msg_req)      widx <= widx + 1;
  end

  task automatic check(input string what, input logic [255:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  // run one block; start is raised in the current cycle
  task automatic run_block(input logic [511:0] b);
    int n;
    while (!start_ok) @(posedge clk);
    blk   = b;
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    n = 1;
    while (!done) begin
      @(posedge clk);
      #1 n++;
    end
    checks++;
    if (n != 65) begin
      failures++;
      $display("FAIL block took %0d cycles, expected 65", n);
    end
  endtask

  localparam logic [511:0] ABC_BLK = {32'h61626380, {14{32'h0}}, 32'h00000018};
  localparam logic [255:0] ABC_DIG =
    256'hba7816bf_8f01cfea_414140de_5dae2223_b00361a3_96177a9c_b410ff61_f20015ad;
  localparam logic [511:0] TWO_BLK1 = {
    32'h61626364, 32'h62636465, 32'h63646566, 32'h64656667,
    32'h65666768, 32'h66676869, 32'h6768696a, 32'h68696a6b,
    32'h696a6b6c, 32'h6a6b6c6d, 32'h6b6c6d6e, 32'h6c6d6e6f,
    32'h6d6e6f70, 32'h6e6f7071, 32'h80000000, 32'h00000000};
  localparam logic [511:0] TWO_BLK2 = {{15{32'h0}}, 32'h000001c0};
  localparam logic [255:0] TWO_DIG =
    256'h248d6a61_d20638b8_e5c02693_0c3e6039_a33ce459_64ff2167_f6ecedd4_19db06c1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] h;
    logic [511:0] rb;
    start = 1'b0;
    blk   = '0;
    rst   = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // constants
    for (int t = 0; t < 64; t++) begin
      checks++;
      if (attest_pkg::sha256_k(6'(t)) !== k(t)) begin
        failures++;
        $display("FAIL K[%0d]", t);
      end
    end
    check("reset value", digest, h0());

    // "abc"
    run_block(ABC_BLK);
    @(posedge clk); #1;
    check("abc", digest, ABC_DIG);
    check("abc model", compress(h0(), ABC_BLK), ABC_DIG);

    // two-block message, back to back
    rst = 1'b1; @(posedge clk); #1 rst = 1'b0;
    run_block(TWO_BLK1);
    run_block(TWO_BLK2);
    @(posedge clk); #1;
    check("two-block", digest, TWO_DIG);

    // random chains against the model
    rst = 1'b1; @(posedge clk); #1 rst = 1'b0;
    h = h0();
    for (int i = 0; i < 12; i++) begin
      for (int j = 0; j < 16; j++) rb[32*j +: 32] = $urandom;
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1;
      run_block(rb);
      h = compress(h, rb);
      @(posedge clk); #1;
      check("random chain", digest, h);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

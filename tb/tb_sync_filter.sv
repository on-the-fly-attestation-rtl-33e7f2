// tb_sync_filter: self-checking testbench of the bitstream filter.
//
// Sends a header of random bytes with near misses of the sync sequence (only
// three FF bytes, a wrong last byte), then five FF bytes and AA 99 55 66, then
// random packet words byte by byte with random idle cycles (ce or write low).
// Every new_packet must carry the next expected word, one cycle after its
// fourth byte, and nothing may come out before the sync. A reset must drop
// the filter back to hunting, and a second stream must sync again.
module tb_sync_filter;

  logic        clk = 1'b0;
  logic        rst;
  logic [7:0]  in_data;
  logic        in_write, in_ce;
  logic [31:0] word;
  logic        new_packet, synced;

  int checks = 0, failures = 0;
  logic [31:0] expq [$];
  int          got_words;
  logic        expect_pulse;

  always #5 clk = ~clk;

  sync_filter dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor
  always @(posedge clk) begin
    if (!rst) begin
      if (new_packet !== expect_pulse) begin
        checks++; failures++;
        $display("FAIL new_packet=%b expected %b at %0t", new_packet, expect_pulse, $time);
      end
      if (new_packet) begin
        checks++;
        got_words++;
        if (expq.size() == 0) begin
          failures++;
          $display("FAIL unexpected word %h", word);
        end else begin
          logic [31:0] e;
          e = expq.pop_front();
          if (word !== e) begin
            failures++;
            $display("FAIL word %h expected %h", word, e);
          end
        end
      end
    end
  end

  logic [1:0] phase;   // byte position once synced
  logic       is_synced_model;

  task automatic send_byte(input logic [7:0] b);
    // random idle cycles first
    while ($urandom_range(0, 3) == 0) begin
      in_ce    = $urandom_range(0, 1);
      in_write = ~in_ce;
      in_data  = $urandom;
      @(posedge clk); #1 expect_pulse = 1'b0;
    end
    in_ce = 1'b1; in_write = 1'b1; in_data = b;
    @(posedge clk);
    #1 expect_pulse = is_synced_model && phase == 2'd3;
    if (is_synced_model) phase = phase + 2'd1;
    in_ce = 1'b0; in_write = 1'b0;
  endtask

  task automatic idle(input int n);
    repeat (n) begin
      @(posedge clk);
      #1 expect_pulse = 1'b0;
    end
  endtask

  task automatic send_word(input logic [31:0] w);
    expq.push_back(w);
    for (int i = 3; i >= 0; i--) send_byte(w[8*i +: 8]);
  endtask

  task automatic send_sync_and_data(input int nwords);
    // header with near misses
    for (int i = 0; i < 20; i++) send_byte(8'($urandom_range(0, 254)));
    send_byte(8'hFF); send_byte(8'hFF); send_byte(8'hFF);
    send_byte(8'hAA); send_byte(8'h99); send_byte(8'h55); send_byte(8'h66);
    send_byte(8'hFF); send_byte(8'hFF); send_byte(8'hFF); send_byte(8'hFF);
    send_byte(8'hAA); send_byte(8'h99); send_byte(8'h55); send_byte(8'h67);
    checks++;
    if (synced !== 1'b0) begin failures++; $display("FAIL synced on a near miss"); end
    send_byte(8'hFF);
    send_byte(8'hFF); send_byte(8'hFF); send_byte(8'hFF); send_byte(8'hFF);
    send_byte(8'hAA); send_byte(8'h99); send_byte(8'h55);
    send_byte(8'h66);
    is_synced_model = 1'b1;
    phase = 2'd0;
    checks++;
    if (synced !== 1'b1) begin failures++; $display("FAIL not synced after sync sequence"); end
    for (int i = 0; i < nwords; i++) send_word($urandom);
    // a sync pattern inside the data is just data
    send_word(32'hFFFF_FFFF);
    send_word(32'hAA99_5566);
  endtask

  initial begin
    in_data = '0; in_write = 1'b0; in_ce = 1'b0;
    expect_pulse = 1'b0; is_synced_model = 1'b0; phase = '0; got_words = 0;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    send_sync_and_data(40);
    idle(3);
    checks++;
    if (got_words != 42 || expq.size() != 0) begin
      failures++;
      $display("FAIL got %0d words, %0d still expected", got_words, expq.size());
    end

    // reset: back to hunting
    rst = 1'b1; @(posedge clk); #1 rst = 1'b0;
    is_synced_model = 1'b0; got_words = 0;
    checks++;
    if (synced !== 1'b0) begin failures++; $display("FAIL synced after reset"); end
    send_sync_and_data(25);
    idle(3);
    checks++;
    if (got_words != 27 || expq.size() != 0) begin
      failures++;
      $display("FAIL second stream: got %0d words", got_words);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

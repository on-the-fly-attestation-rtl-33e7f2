// tb_packet_counter: self-checking testbench of the packet counter.
//
// Two instances: one at the full 28-bit width, driven by random new_packet
// pulses and compared with a model count every cycle, and one at 4 bits
// driven past its maximum to check that it saturates instead of wrapping.
// Reset in the middle of counting must clear both.
module tb_packet_counter;

  logic        clk = 1'b0;
  logic        rst;
  logic        np_a, np_b;
  logic [27:0] count_a;
  logic [3:0]  count_b;

  int checks = 0, failures = 0;
  longint model_a, model_b;

  always #5 clk = ~clk;

  packet_counter              dut_a (.clk, .rst, .new_packet(np_a), .count(count_a));
  packet_counter #(.WIDTH(4)) dut_b (.clk, .rst, .new_packet(np_b), .count(count_b));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic a, b);
    np_a = a; np_b = b;
    @(posedge clk); #1;
    if (a) model_a++;
    if (b && model_b < 15) model_b++;
    checks++;
    if (count_a !== 28'(model_a) || count_b !== 4'(model_b)) begin
      failures++;
      $display("FAIL count %0d/%0d expected %0d/%0d", count_a, count_b, model_a, model_b);
    end
  endtask

  initial begin
    np_a = 0; np_b = 0; model_a = 0; model_b = 0;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 300; i++) step($urandom_range(0, 1), $urandom_range(0, 3) == 0);
    for (int i = 0; i < 40; i++) step(1'b1, 1'b1);
    rst = 1'b1; np_a = 1; np_b = 1;
    @(posedge clk); #1 rst = 1'b0;
    model_a = 0; model_b = 0;
    checks++;
    if (count_a !== '0 || count_b !== '0) begin
      failures++;
      $display("FAIL reset did not clear the count");
    end
    for (int i = 0; i < 50; i++) step(1'b1, $urandom_range(0, 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

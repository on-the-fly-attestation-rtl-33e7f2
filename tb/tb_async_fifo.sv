// tb_async_fifo: self-checking testbench of the dual-clock FIFO.
//
// The writer (20 ns clock) writes an incrementing-tag random sequence
// whenever it saw full low and a random choice allows it; the reader pops with a
// random probability on its own clock (7 ns or 31 ns, changed halfway so the
// FIFO runs both nearly empty and up against full). rd_en is also raised
// while the FIFO is empty, which must not pop anything. Checks: every word
// comes out once and in order, so the halt margin of full absorbs the one
// write a registered writer issues after full rises; rd_count never exceeds
// the words really in the FIFO; block_avail equals rd_count >= 16; full must rise in the
// slow-reader phase, and the writer never overruns it.
module tb_async_fifo;

  localparam int DEPTH = 128;

  logic        wr_clk = 1'b0, rd_clk = 1'b0;
  logic        wr_rst, rd_rst;
  logic        wr_en, rd_en;
  logic [31:0] wr_data, rd_data;
  logic        full, empty, block_avail;
  logic [7:0]  rd_count;

  int checks = 0, failures = 0;
  int rd_half = 3;               // half period of the read clock
  longint n_written = 0, n_read = 0, n_full = 0, n_empty_rd = 0;
  logic [31:0] sent [$];

  always #10 wr_clk = ~wr_clk;
  always #(rd_half) rd_clk = ~rd_clk;

  async_fifo dut (.*);

  initial begin
    #3ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] val(longint i);
    return {16'(i), 16'(i * 40503)};
  endfunction

  // writer
  int wr_prob = 90;
  always @(posedge wr_clk) begin
    if (wr_rst) begin
      wr_en <= 1'b0;
    end else begin
      if (wr_en) begin
        sent.push_back(wr_data);
        n_written++;
      end
      if (full) n_full++;
      // a registered writer: the write in the cycle full rises still lands
      if (!full && n_written + (wr_en ? 1 : 0) < 3000 && $urandom_range(0, 99) < wr_prob) begin
        wr_en   <= 1'b1;
        wr_data <= val(n_written + (wr_en ? 1 : 0));
      end else begin
        wr_en <= 1'b0;
      end
    end
  end

  // reader
  int rd_prob = 50;
  always @(posedge rd_clk) begin
    if (rd_rst) begin
      rd_en <= 1'b0;
    end else begin
      checks++;
      if (block_avail !== (rd_count >= 16)) begin
        failures++;
        $display("FAIL block_avail=%b with rd_count=%0d", block_avail, rd_count);
      end
      if (longint'(rd_count) > n_written - n_read + 1) begin
        failures++;
        $display("FAIL rd_count=%0d but only %0d words in flight", rd_count, n_written - n_read);
      end
      if (rd_en && !empty) begin
        checks++;
        if (sent.size() == 0 || rd_data !== sent[0]) begin
          failures++;
          $display("FAIL read %h expected %h", rd_data, sent.size() ? sent[0] : 32'hx);
        end
        if (sent.size()) void'(sent.pop_front());
        n_read++;
      end
      if (rd_en && empty) n_empty_rd++;
      rd_en <= ($urandom_range(0, 99) < rd_prob);
    end
  end

  initial begin
    wr_rst = 1'b1; rd_rst = 1'b1; wr_en = 1'b0; rd_en = 1'b0; wr_data = '0;
    #100;
    @(posedge wr_clk) wr_rst <= 1'b0;
    @(posedge rd_clk) rd_rst <= 1'b0;
    // phase 1: fast reader
    wait (n_written >= 1500);
    // phase 2: slow reader, FIFO fills up
    rd_half = 31; rd_prob = 30;
    wait (n_written >= 3000);
    rd_half = 3; rd_prob = 90;
    wait (n_read >= 3000);
    #500;
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL full never rose"); end
    checks++;
    if (n_empty_rd == 0) begin failures++; $display("FAIL never read while empty"); end
    checks++;
    if (sent.size() != 0 || !empty) begin
      failures++;
      $display("FAIL %0d words left over", sent.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

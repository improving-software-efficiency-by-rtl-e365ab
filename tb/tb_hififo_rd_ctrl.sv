// tb_hififo_rd_ctrl: checks the read pointer and output state machine of the
// header-inserting FIFO with a model memory (word i holds a pattern of i) and
// the two read registers built from the block's clock enables. The read limit is
// moved forward at random. Checked: words come out in order with no gaps or
// repeats, no word at or beyond the limit is ever loaded, empty is low exactly
// while a word is presented, a word below the limit appears three clocks after
// the limit passes it, and back-to-back reads give one word per clock.
`timescale 1ns/1ps
module tb_hififo_rd_ctrl;
  localparam int AW = 6;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  logic clk = 0, rst = 1;
  always #2 clk = ~clk;
  logic rd_en = 0, buf_ce, out_ce, empty;
  logic [AW-1:0] limit = '0, raddr, rd_data_count;
  hififo_rd_ctrl #(.AW(AW)) dut (.*);

  function automatic logic [31:0] pat(input int i);
    return 32'hA5000000 + i * 3;
  endfunction

  logic [31:0] buf_q, dout;
  int next_read = 0, issued = 0;
  always @(posedge clk) begin
    if (rst) begin buf_q <= '0; dout <= '0; end
    else begin
      if (buf_ce) begin
        buf_q <= pat(issued);
        issued = issued + 1;
      end
      if (out_ce) dout <= buf_q;
    end
  end

  // Checks at each clock edge, on the values that the edge samples.
  always @(negedge clk) begin
    if (!rst) begin
      if (buf_ce) check(raddr != limit, "memory read at the limit");
      check(rd_data_count == AW'(limit - raddr), "rd_data_count");
    end
  end
  always @(posedge clk) begin
    if (!rst && rd_en && !empty) begin
      check(dout == pat(next_read), $sformatf("read %0d: %h", next_read, dout));
      next_read++;
    end
  end

  int total = 0;   // words made available so far (absolute)
  task automatic advance(input int n);
    total += n;
    limit = AW'(total);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // Latency: one word into an empty FIFO.
    repeat (3) @(negedge clk);
    check(empty, "empty after reset");
    advance(1);
    @(negedge clk); check(empty, "not yet after one clock");
    @(negedge clk); check(empty, "not yet after two clocks");
    @(negedge clk); check(!empty, "word presented three clocks after the limit moved");
    rd_en = 1;
    @(negedge clk); rd_en = 0;
    check(empty, "empty again after the only word was read");
    // Throughput: 40 words waiting, read continuously.
    advance(40);
    repeat (4) @(negedge clk);
    begin
      int r0;
      r0 = next_read;
      rd_en = 1;
      repeat (40) @(negedge clk);
      rd_en = 0;
      check(next_read - r0 == 40, $sformatf("40 clocks gave %0d words", next_read - r0));
    end
    // Random limit moves and random reads.
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      rd_en = ($urandom % 3 != 0);
      if ($urandom % 3 == 0 && total - next_read < (1 << AW) - 4) advance(1 + $urandom % 3);
    end
    rd_en = 1;
    repeat (3 * (1 << AW)) @(negedge clk);
    check(next_read == total, $sformatf("all %0d words read (%0d)", total, next_read));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

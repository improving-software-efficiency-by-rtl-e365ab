// tb_gray_cdc: checks the Gray-code counter crossing.
//
// A source counter (11 bits, the default width) steps by one on random source
// clocks and wraps around; the destination clock is unrelated. On every
// destination clock the output must be a value the source held recently: never
// ahead of the source, never more than a few steps behind, never moving
// backwards. After the source stops, the output must equal it within
// STAGES + 2 destination clocks.
`timescale 1ns/1ps
module tb_gray_cdc;
  localparam int W = 11;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  logic src_clk = 0, dst_clk = 0, src_rst = 1, dst_rst = 1;
  logic [W-1:0] src_bin = '0, dst_bin, prev;
  bit run = 1'b1;
  always #3.7 src_clk = ~src_clk;
  always #2.3 dst_clk = ~dst_clk;

  gray_cdc #(.WIDTH(W)) dut (.*);

  always @(posedge src_clk) if (!src_rst && run && ($urandom % 4 != 0)) src_bin <= src_bin + 1'b1;

  always @(posedge dst_clk) begin
    if (!dst_rst) begin
      logic [W-1:0] lag, step;
      #0.1;
      lag  = src_bin - dst_bin;
      step = dst_bin - prev;
      check(lag <= 6, $sformatf("output %0d too far from source %0d", dst_bin, src_bin));
      check(step <= 2, $sformatf("output jumped from %0d to %0d", prev, dst_bin));
      prev = dst_bin;
    end
  end

  initial begin
    prev = '0;
    repeat (4) @(posedge src_clk);
    src_rst = 0;
    dst_rst = 0;
    repeat (6000) @(posedge src_clk);   // several wraps of the 11-bit counter
    run = 1'b0;
    repeat (5) @(posedge dst_clk);
    check(dst_bin == src_bin, "output settled to the source value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge dst_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dp_ram: checks the dual-clock memory with a 32-bit write port and a 128-bit
// read port (and the default 32/32 form). Words are written on one clock, read on
// another; each wide word must hold four consecutive written words, lowest
// address in the least significant bits. The two read registers are checked
// separately: the buffer register loads only with buf_ce, the output register
// only with out_ce, giving two clocks of latency.
`timescale 1ns/1ps
module tb_dp_ram;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  logic wr_clk = 0, rd_clk = 0, rd_rst = 1;
  always #3 wr_clk = ~wr_clk;
  always #2 rd_clk = ~rd_clk;

  logic we = 0, buf_ce = 0, out_ce = 0;
  logic [7:0] waddr = '0;
  logic [31:0] din = '0;
  logic [5:0] raddr = '0;
  logic [127:0] dout;
  logic [10:0] waddr1 = '0, raddr1 = '0;
  logic [31:0] dout1;
  logic we1 = 0;

  dp_ram #(.WR_WIDTH(32), .RD_WIDTH(128), .WR_DEPTH(256)) dut (.*);
  dp_ram u_def (.wr_clk, .we(we1), .waddr(waddr1), .din, .rd_clk, .rd_rst,
                .buf_ce, .raddr(raddr1), .out_ce, .dout(dout1));

  function automatic logic [31:0] pat(input int a);
    return 32'h5A000000 ^ (a * 32'h00010203);
  endfunction

  initial begin
    repeat (3) @(posedge rd_clk);
    rd_rst = 0;
    for (int a = 0; a < 256; a++) begin
      @(negedge wr_clk);
      we = 1; we1 = 1; waddr = 8'(a); waddr1 = 11'(a * 7); din = pat(a);
    end
    @(negedge wr_clk); we = 0; we1 = 0;
    for (int r = 0; r < 64; r++) begin
      logic [127:0] e;
      for (int k = 0; k < 4; k++) e[32*k +: 32] = pat(4*r + k);
      @(negedge rd_clk);
      raddr = 6'(r); raddr1 = 11'(r * 7); buf_ce = 1; out_ce = 0;
      @(negedge rd_clk);
      buf_ce = 0; out_ce = 0; raddr = 6'(r + 1);
      // The buffer holds word r, but the output register has not loaded yet.
      check(r == 0 || dout != e, "output register loaded without out_ce");
      @(negedge rd_clk);
      out_ce = 1;
      @(negedge rd_clk);
      out_ce = 0;
      check(dout == e, $sformatf("wide word %0d: %h expected %h", r, dout, e));
      check(dout1 == pat(r), $sformatf("default-size word %0d", r));
    end
    // Pipelined reads: both registers enabled every clock, two clocks of latency.
    @(negedge rd_clk);
    buf_ce = 1; out_ce = 1;
    for (int r = 0; r < 20; r++) begin
      raddr = 6'(r);
      @(negedge rd_clk);
      if (r >= 1) begin
        logic [127:0] e;
        for (int k = 0; k < 4; k++) e[32*k +: 32] = pat(4*(r-1) + k);
        check(dout == e, $sformatf("pipelined read %0d", r - 1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge rd_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_hififo_wr_ptr: checks the write-pointer logic against the reference write
// sequence A, B (new_chunk), C, H (set_header), D: memory addresses 0, 2, 3, 1, 4,
// each appearing on the pipelined write port one clock after the word is given.
// Then random sequences are compared with a reference model of the pointers,
// the header flag, full handling and the read limit, which must step by at
// most one per clock and reach its target.
`timescale 1ns/1ps
module tb_hififo_wr_ptr;
  localparam int D = 16;
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
  logic wr_en = 0, new_chunk = 0, set_header = 0, full = 0;
  logic [31:0] din = '0, mem_din;
  logic mem_we, header_set;
  logic [3:0] mem_waddr, wr_ptr, head_ptr, limit_ptr;

  hififo_wr_ptr #(.DEPTH(D)) dut (.*);

  // Reference model
  int m_wp = 0, m_hp = 0, m_lim = 0;
  bit m_hs = 1;
  int exp_addr; bit exp_we; logic [31:0] exp_din;

  task automatic step(input bit en, input bit nc, input bit sh, input bit fl, input logic [31:0] d);
    bit acc;
    @(negedge clk);
    wr_en = en; new_chunk = nc; set_header = sh; full = fl; din = d;
    acc = en && (sh || !fl);
    exp_we = acc;
    exp_addr = sh ? m_hp : (nc ? (m_wp + 1) % D : m_wp);
    exp_din = d;
    @(posedge clk); #0.1;
    if (acc) begin
      if (nc) begin m_hp = m_wp; m_wp = (m_wp + 2) % D; m_hs = 0; end
      else if (sh) m_hs = 1;
      else m_wp = (m_wp + 1) % D;
    end
    check(mem_we == exp_we, "write strobe");
    if (exp_we) check(int'(mem_waddr) == exp_addr && mem_din == exp_din,
                      $sformatf("write address %0d expected %0d", mem_waddr, exp_addr));
    check(int'(wr_ptr) == m_wp && int'(head_ptr) == m_hp && header_set == m_hs, "pointers");
    check(((int'(limit_ptr) - m_lim + D) % D) <= 1, $sformatf("read limit steps by at most one: %0d -> %0d", m_lim, limit_ptr));
    m_lim = int'(limit_ptr);
  endtask

  initial begin
    int addrs [5] = '{0, 2, 3, 1, 4};
    int got [$];
    repeat (3) @(posedge clk);
    #0.1 rst = 0;
    fork
      begin
        step(1, 0, 0, 0, 32'hA); step(1, 1, 0, 0, 32'hB); step(1, 0, 0, 0, 32'hC);
        step(1, 0, 1, 0, 32'hF00D); step(1, 0, 0, 0, 32'hD); step(0, 0, 0, 0, 0);
      end
      begin
        repeat (7) begin
          @(posedge clk); #0.05;
          if (mem_we) got.push_back(int'(mem_waddr));
        end
      end
    join
    m_lim = int'(limit_ptr);
    check(got.size() == 5, "five memory writes");
    for (int i = 0; i < 5 && i < got.size(); i++) check(got[i] == addrs[i], $sformatf("write %0d at %0d", i, got[i]));
    // Random sequences respecting the protocol.
    for (int n = 0; n < 3000; n++) begin
      int r;
      r = $urandom % 10;
      if (!m_hs && r < 2)      step(1, 0, 1, $urandom % 2, $urandom);
      else if (m_hs && r < 3)  step(1, 1, 0, $urandom % 4 == 0, $urandom);
      else                     step($urandom % 4 != 0, 0, 0, $urandom % 4 == 0, $urandom);
    end
    for (int n = 0; n < 2 * D; n++) step(0, 0, 0, 0, 0);
    check(int'(limit_ptr) == (m_hs ? m_wp : m_hp), "read limit reached its target");
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

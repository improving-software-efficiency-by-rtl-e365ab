// tb_block_mux: checks the block-level output multiplexer with three channels
// and 8-word blocks. Each channel is a first-word fall-through FIFO model
// filled with tagged words {channel, block number, word index}. Checked: every
// block leaves whole, in order and from one channel, m_sob/m_eob/m_ch mark it,
// channels with data are served in strict rotation, nothing is lost, and with
// m_ready always high a block takes BLOCK_WORDS + 1 clocks.
`timescale 1ns/1ps
module tb_block_mux;
  localparam int NCH = 3, BW = 8;
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
  logic [NCH-1:0][31:0] in_data;
  logic [NCH-1:0]       in_empty, in_rd_en;
  logic [31:0]          m_data;
  logic                 m_valid, m_ready = 0, m_sob, m_eob;
  logic [1:0]           m_ch;

  block_mux #(.NUM_CH(NCH), .WIDTH(32), .BLOCK_WORDS(BW)) dut (.*);

  logic [31:0] q [NCH][$];
  int next_blk [NCH];      // next block number to put
  int exp_blk  [NCH];      // next block number expected out
  always_comb begin
    for (int c = 0; c < NCH; c++) begin
      in_empty[c] = (q[c].size() == 0);
      in_data[c]  = in_empty[c] ? 32'h0 : q[c][0];
    end
  end

  task automatic put_block(input int c);
    for (int i = 0; i < BW; i++) q[c].push_back({8'(c), 16'(next_blk[c]), 8'(i)});
    next_blk[c]++;
  endtask

  int widx = 0, cur_ch = -1, last_ch = -1, blocks_out = 0, xfers = 0;
  bit all_busy_check = 0;
  always @(posedge clk) begin
    if (!rst && m_valid && m_ready) begin
      check(m_data[31:24] == 8'(m_ch), "data from the granted channel");
      check(int'(m_data[7:0]) == widx, $sformatf("word %0d of block, got %0d", widx, m_data[7:0]));
      check(m_sob == (widx == 0) && m_eob == (widx == BW - 1), "sob/eob");
      if (widx == 0) begin
        cur_ch = int'(m_ch);
        check(int'(m_data[23:8]) == exp_blk[cur_ch], "blocks of a channel in order");
        if (all_busy_check && last_ch >= 0) check(cur_ch == (last_ch + 1) % NCH, "round robin");
      end else check(int'(m_ch) == cur_ch, "channel held within a block");
      for (int c = 0; c < NCH; c++) if (in_rd_en[c]) void'(q[c].pop_front());
      check(in_rd_en == NCH'(1) << m_ch, "pop only the granted FIFO");
      xfers++;
      if (widx == BW - 1) begin
        exp_blk[cur_ch]++;
        last_ch = cur_ch;
        blocks_out++;
        widx = 0;
      end else widx++;
    end else if (!rst) check(in_rd_en == '0, "no pop without a transfer");
  end

  initial begin
    repeat (3) @(posedge clk);
    #0.1 rst = 0;
    // All channels full of blocks, m_ready high: rotation and rate.
    for (int k = 0; k < 4; k++) for (int c = 0; c < NCH; c++) put_block(c);
    all_busy_check = 1;
    m_ready = 1;
    begin
      int t0;
      wait (m_valid);
      t0 = blocks_out;
      repeat (3 * (BW + 1)) @(posedge clk);
      #0.1;
      check(blocks_out - t0 == 3, $sformatf("%0d blocks in %0d clocks", blocks_out - t0, 3 * (BW + 1)));
    end
    wait (blocks_out == 4 * NCH);
    all_busy_check = 0;
    // Random arrivals and random m_ready.
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      m_ready = ($urandom % 4 != 0);
      if ($urandom % 30 == 0) put_block($urandom % NCH);
    end
    m_ready = 1;
    repeat (2000) @(negedge clk);
    for (int c = 0; c < NCH; c++)
      check(exp_blk[c] == next_blk[c] && q[c].size() == 0, $sformatf("channel %0d drained", c));
    $display("blocks %0d", blocks_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

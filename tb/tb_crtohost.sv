// tb_crtohost: end-to-end test of the ToHost router at its default parameters
// (2 channels, 2048-word FIFOs, 32-bit in, 256-bit out, 1 KiB blocks).
//
// Channel 1 first sends 29 chunks of 32 bytes shaped like real FELIX emulator
// data; the first block it produces is compared word for word with the known
// reference block (block header c0ce0040, then 28 whole chunks with header
// 60000020, then a first subchunk with header 20000008). Channel 0 sends a
// 1012-byte chunk (leaves one word, forcing the NULL filler), 100-byte chunks,
// 2000-byte chunks (forcing FIRST/MIDDLE/LAST subchunks) and random lengths with
// random flags and partial last words. Channel 1 then sends 300 chunks of
// 34 bytes back to back, the chunk size of the GBT-mode test, and the time they
// take is checked against the rate needed for 889 000 chunks per second (the
// design must be far faster: at most 11 write clocks per chunk). The DMA side is
// held off at the start so the FIFOs fill up, then accepts with random gaps.
//
// Every block that leaves is parsed front to back in one pass, the way the host
// software does: block header fields and sequence numbers are checked, each
// (sub)chunk header gives the length to skip, the subchunks are joined and every
// chunk is compared byte for byte, with its flags, against what was sent. Each
// mechanism (split types, filler, FIFO full, header hold, channel switch,
// sequence wrap, partial words, back-pressure) must be seen at least once.
`timescale 1ns/1ps
module tb_crtohost;
  import felix_pkg::*;

  localparam int NCH = 2;

  logic                     wr_clk = 1'b0, rd_clk = 1'b0, rst = 1'b1;
  logic [NCH-1:0][31:0]     s_tdata = '0;
  logic [NCH-1:0][3:0]      s_tkeep = '0, s_tuser = '0;
  logic [NCH-1:0]           s_tlast = '0, s_tvalid = '0, s_tready;
  logic [255:0]             m_data;
  logic                     m_valid, m_ready = 1'b0, m_sob, m_eob;
  logic [0:0]               m_ch;

  crtohost dut (.*);

  always #2.083 wr_clk = ~wr_clk;   // 240 MHz
  always #2.000 rd_clk = ~rd_clk;   // 250 MHz

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Reference of what was sent, per channel.
  byte unsigned sent_bytes [NCH][$];
  int           sent_len   [NCH][$];
  logic [3:0]   sent_flags [NCH][$];
  int           n_real [NCH];
  int           n_recv [NCH];
  bit           done_sending [NCH];

  // Mechanism counters.
  int n_whole = 0, n_first = 0, n_middle = 0, n_last = 0, n_null = 0;
  int n_full = 0, n_hold = 0, n_switch = 0, n_wrap = 0, n_partial = 0, n_bp = 0;
  bit  no_gaps [NCH];
  real gbt_clocks_per_chunk = 0.0;

  task automatic send_chunk(input int ch, input int len, input logic [3:0] flags,
                            input bit listing, input int idx);
    byte unsigned b [];
    int nw;
    b = new[len];
    for (int i = 0; i < len; i++) b[i] = 8'($urandom);
    if (listing) begin
      // 001800aa, 10aabbNN, then bytes 00..17
      b[0] = 8'haa; b[1] = 8'h00; b[2] = 8'h18; b[3] = 8'h00;
      b[4] = 8'(idx); b[5] = 8'hbb; b[6] = 8'haa; b[7] = 8'h10;
      for (int i = 8; i < len; i++) b[i] = 8'(i - 8);
    end
    for (int i = 0; i < len; i++) sent_bytes[ch].push_back(b[i]);
    sent_len[ch].push_back(len);
    sent_flags[ch].push_back(flags);
    nw = (len + 3) / 4;
    for (int w = 0; w < nw; w++) begin
      logic [31:0] d;
      int nb;
      nb = (w == nw - 1) ? len - 4 * w : 4;
      d  = $urandom;
      for (int k = 0; k < nb; k++) d[8*k +: 8] = b[4*w + k];
      if (!listing && !no_gaps[ch] && ($urandom % 8 == 0)) begin
        s_tvalid[ch] = 1'b0;
        @(posedge wr_clk); #0.1;
      end
      s_tdata[ch]  = d;
      s_tkeep[ch]  = 4'((1 << nb) - 1);
      s_tlast[ch]  = (w == nw - 1);
      s_tuser[ch]  = (w == nw - 1) ? flags : 4'($urandom);
      s_tvalid[ch] = 1'b1;
      forever begin
        @(negedge wr_clk);
        if (s_tready[ch]) break;
      end
      @(posedge wr_clk); #0.1;
    end
    s_tvalid[ch] = 1'b0;
  endtask

  task automatic run_channel(input int ch);
    int len;
    if (ch == 1) begin
      for (int i = 0; i < 29; i++) send_chunk(1, 32, 4'b0000, 1'b1, i);
      for (int i = 0; i < 25; i++) begin
        len = 1 + $urandom % 1500;
        send_chunk(1, len, 4'($urandom), 1'b0, 0);
      end
      begin : gbt_rate
        realtime t0;
        no_gaps[1] = 1'b1;
        @(posedge wr_clk); #0.1;
        t0 = $realtime;
        for (int i = 0; i < 300; i++) send_chunk(1, 34, 4'($urandom), 1'b0, 0);
        gbt_clocks_per_chunk = ($realtime - t0) / 4.166 / 300.0;
        no_gaps[1] = 1'b0;
      end
    end else begin
      send_chunk(0, 1012, 4'b0000, 1'b0, 0);
      for (int i = 0; i < 40; i++) send_chunk(0, 100, 4'b0000, 1'b0, 0);
      for (int i = 0; i < 12; i++) send_chunk(0, 2000, 4'b0100, 1'b0, 0);
      for (int i = 0; i < 30; i++) begin
        len = 1 + $urandom % 3000;
        send_chunk(0, len, 4'($urandom), 1'b0, 0);
      end
    end
    n_real[ch] = sent_len[ch].size();
    done_sending[ch] = 1'b1;
    // Tail traffic pushes the last real chunks out of their unfinished block.
    forever send_chunk(ch, 1000, 4'b0000, 1'b0, 0);
  endtask

  // ---------------------------------------------------------------- receiver
  byte unsigned blk [1024];
  int           wcnt = 0;
  int           exp_seq [NCH];
  int           part_len [NCH];       // bytes of the chunk being joined
  bit           in_split [NCH];
  int           last_ch = -1;
  bit           listing_checked = 1'b0;

  function automatic logic [31:0] word_at(input int p);
    return {blk[p+3], blk[p+2], blk[p+1], blk[p]};
  endfunction

  task automatic finish_chunk(input int ch, input logic [3:0] flags);
    int len;
    if (sent_len[ch].size() == 0) begin
      check(0, $sformatf("ch%0d: chunk received but none sent", ch));
      return;
    end
    len = sent_len[ch].pop_front();
    check(len == part_len[ch], $sformatf("ch%0d chunk %0d: length %0d, sent %0d",
                                        ch, n_recv[ch], part_len[ch], len));
    check(flags == sent_flags[ch].pop_front(), $sformatf("ch%0d chunk %0d: flags", ch, n_recv[ch]));
    if (len % 4 != 0) n_partial++;
    n_recv[ch]++;
    part_len[ch] = 0;
  endtask

  task automatic parse_block(input int ch);
    block_header_t bh;
    chunk_header_t chh;
    int p, len;
    bh = word_at(0);
    check(bh.magic_hi == 4'hC && bh.magic_lo == 8'hCE && bh.size_m1 == 4'd0,
          $sformatf("block header constants %h", bh));
    check(bh.elink == 11'(ch << 6), $sformatf("block elink %h on channel %0d", bh.elink, ch));
    check(int'(bh.seq) == exp_seq[ch], $sformatf("ch%0d seq %0d expected %0d", ch, bh.seq, exp_seq[ch]));
    if (exp_seq[ch] == 31) n_wrap++;
    exp_seq[ch] = (int'(bh.seq) + 1) % 32;
    // Reference block of channel 1 (the first block, 32-byte chunks).
    if (ch == 1 && !listing_checked) begin
      listing_checked = 1'b1;
      check(word_at(0) == 32'hc0ce0040, "reference block: block header");
      for (int k = 0; k < 28; k++) begin
        check(word_at(4 + 36*k) == 32'h60000020, $sformatf("reference block: header of chunk %0d", k));
        check(word_at(8 + 36*k) == 32'h001800aa && word_at(12 + 36*k) == (32'h10aabb00 | k),
              $sformatf("reference block: data of chunk %0d", k));
      end
      check(word_at(1012) == 32'h20000008, "reference block: final subchunk header");
      check(word_at(1016) == 32'h001800aa && word_at(1020) == 32'h10aabb1c, "reference block: final data");
    end
    p = 4;
    while (p < 1024) begin
      chh = word_at(p);
      len = int'(chh.length);
      if (chh.ctype == CH_NULL) begin
        n_null++;
        check(p == 1020 && len == 0, $sformatf("NULL filler at %0d len %0d", p, len));
        p += 4;
        continue;
      end
      check(p + 4 + len <= 1024 && len > 0, $sformatf("subchunk at %0d length %0d overruns", p, len));
      if (p + 4 + len > 1024) break;
      unique case (chh.ctype)
        CH_WHOLE:  begin n_whole++;  check(!in_split[ch], "WHOLE inside a split chunk"); end
        CH_FIRST:  begin n_first++;  check(!in_split[ch], "FIRST inside a split chunk"); in_split[ch] = 1; end
        CH_MIDDLE: begin n_middle++; check(in_split[ch], "MIDDLE outside a split chunk"); end
        CH_LAST:   begin n_last++;   check(in_split[ch], "LAST outside a split chunk"); in_split[ch] = 0; end
        default:   check(0, $sformatf("bad chunk type %0d", chh.ctype));
      endcase
      if (chh.ctype inside {CH_FIRST, CH_MIDDLE})
        check(p + 4 + len == 1024, "non-final subchunk does not reach the end of the block");
      for (int i = 0; i < len; i++) begin
        byte unsigned e;
        if (sent_bytes[ch].size() == 0) begin
          check(0, "more data than sent");
          break;
        end
        e = sent_bytes[ch].pop_front();
        if (blk[p + 4 + i] != e) begin
          check(0, $sformatf("ch%0d chunk %0d byte %0d: %h expected %h", ch, n_recv[ch],
                             part_len[ch] + i, blk[p + 4 + i], e));
          break;
        end
      end
      checks++;
      part_len[ch] += len;
      if (chh.ctype inside {CH_WHOLE, CH_LAST}) finish_chunk(ch, {chh.trunc, chh.err, chh.crcerr, chh.busy});
      p += 4 + ((len + 3) / 4) * 4;
    end
    check(p == 1024, $sformatf("block parse ended at %0d", p));
  endtask

  always @(posedge rd_clk) begin
    if (m_valid && !m_ready) n_bp++;
    if (m_valid && m_ready) begin
      check(m_sob == (wcnt == 0) && m_eob == (wcnt == 31), "sob/eob position");
      for (int i = 0; i < 32; i++) blk[wcnt*32 + i] = m_data[8*i +: 8];
      if (wcnt == 31) begin
        if (last_ch >= 0 && last_ch != int'(m_ch)) n_switch++;
        last_ch = int'(m_ch);
        parse_block(int'(m_ch));
        wcnt = 0;
      end else begin
        wcnt++;
      end
    end
  end

  // Back-pressure from the DMA side: off until a FIFO has been full for a while.
  int full_cycles = 0;
  always @(posedge rd_clk) begin
    if (full_cycles < 200) m_ready <= 1'b0;
    else                   m_ready <= ($urandom % 5 != 0);
  end

  always @(posedge wr_clk) begin
    if (!rst) begin
      if (dut.g_ch[0].full || dut.g_ch[1].full) begin
        n_full++;
        full_cycles++;
      end
      // Reader held at an unwritten header while data lies beyond it.
      if (!dut.g_ch[0].u_fifo.u_wr.header_set &&
          dut.g_ch[0].u_fifo.u_wr.limit_ptr == dut.g_ch[0].u_fifo.u_wr.head_ptr &&
          11'(dut.g_ch[0].u_fifo.u_wr.wr_ptr - dut.g_ch[0].u_fifo.u_wr.head_ptr) > 11'd9)
        n_hold++;
    end
  end

  initial begin
    repeat (10) @(posedge wr_clk);
    #0.1 rst = 1'b0;
    repeat (10) @(posedge rd_clk);
    fork
      run_channel(0);
      run_channel(1);
    join_none
    wait (done_sending[0] && done_sending[1] && n_recv[0] >= n_real[0] && n_recv[1] >= n_real[1]);
    repeat (10) @(posedge rd_clk);
    check(listing_checked, "reference block seen");
    check(n_whole > 0,  "mechanism: whole chunks");
    check(n_first > 0,  "mechanism: first subchunks");
    check(n_middle > 0, "mechanism: middle subchunks");
    check(n_last > 0,   "mechanism: last subchunks");
    check(n_null > 0,   "mechanism: NULL filler word");
    check(n_full > 0,   "mechanism: FIFO full");
    check(n_hold > 0,   "mechanism: reader held at unwritten header");
    check(n_switch > 0, "mechanism: channel switch in the output multiplexer");
    check(n_wrap > 0,   "mechanism: block sequence wrap");
    check(n_partial > 0,"mechanism: partial last word");
    check(n_bp > 0,     "mechanism: DMA back-pressure");
    // 889 000 chunks/s at 240 MHz would allow 270 clocks per chunk.
    check(gbt_clocks_per_chunk > 0.0 && gbt_clocks_per_chunk <= 11.0,
          $sformatf("34-byte chunks take %0.2f write clocks each", gbt_clocks_per_chunk));
    $display("chunks ch0=%0d ch1=%0d whole=%0d first=%0d middle=%0d last=%0d null=%0d full=%0d hold=%0d switch=%0d wrap=%0d partial=%0d bp=%0d",
             n_recv[0], n_recv[1], n_whole, n_first, n_middle, n_last, n_null, n_full, n_hold,
             n_switch, n_wrap, n_partial, n_bp);
    $display("34-byte chunks: %0.2f write clocks each, %0.1f M chunks/s at 240 MHz",
             gbt_clocks_per_chunk, 240.0 / gbt_clocks_per_chunk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge rd_clk);
    failures++;
    $display("FAIL: watchdog, chunks received ch0=%0d/%0d ch1=%0d/%0d", n_recv[0], n_real[0], n_recv[1], n_real[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

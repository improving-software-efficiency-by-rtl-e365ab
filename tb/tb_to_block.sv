// tb_to_block: checks the block builder on its own.
//
// A model of the header-inserting FIFO turns the controller's writes into the
// final word stream (a word written with set_header goes to the position
// reserved by the last new_chunk). The stream is cut into 256-word blocks and
// parsed front to back as the host software does; every chunk is compared with
// what was sent, with its flags and byte length. The first block, made of
// 32-byte chunks, is compared word for word with the reference FELIX block
// (c0ce0040, 28 x 60000020 chunks, then a 20000008 first subchunk). Also
// checked: one FIFO write per clock when input is always valid (256 writes per
// block), no write except set_header while full, and that split chunks, the
// NULL filler and partial last words all occur.
`timescale 1ns/1ps
module tb_to_block;
  import felix_pkg::*;
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
  logic [31:0] s_tdata = '0, fifo_din;
  logic [3:0]  s_tkeep = '0, s_tuser = '0;
  logic        s_tlast = 0, s_tvalid = 0, s_tready;
  logic        fifo_wr_en, fifo_new_chunk, fifo_set_header, fifo_full = 0;

  to_block dut (.*);

  // FIFO model
  logic [31:0] img [$];
  int rsv = -1;
  int n_full_hdr = 0;
  always @(posedge clk) begin
    if (!rst && fifo_wr_en) begin
      if (fifo_full) check(fifo_set_header, "write while full");
      if (fifo_full && fifo_set_header) n_full_hdr++;
      if (fifo_new_chunk) begin rsv = img.size(); img.push_back(32'hBAD0BAD0); end
      if (fifo_set_header) img[rsv] = fifo_din;
      else img.push_back(fifo_din);
    end
  end

  byte unsigned sent_bytes [$];
  int           sent_len [$];
  logic [3:0]   sent_flags [$];
  bit           random_gaps = 0;

  task automatic send_chunk(input int len, input logic [3:0] flags, input bit listing, input int idx);
    byte unsigned b [];
    int nw;
    b = new[len];
    for (int i = 0; i < len; i++) b[i] = 8'($urandom);
    if (listing) begin
      b[0] = 8'haa; b[1] = 8'h00; b[2] = 8'h18; b[3] = 8'h00;
      b[4] = 8'(idx); b[5] = 8'hbb; b[6] = 8'haa; b[7] = 8'h10;
      for (int i = 8; i < len; i++) b[i] = 8'(i - 8);
    end
    for (int i = 0; i < len; i++) sent_bytes.push_back(b[i]);
    sent_len.push_back(len);
    sent_flags.push_back(flags);
    nw = (len + 3) / 4;
    for (int w = 0; w < nw; w++) begin
      logic [31:0] d;
      int nb;
      nb = (w == nw - 1) ? len - 4 * w : 4;
      d = $urandom;
      for (int k = 0; k < nb; k++) d[8*k +: 8] = b[4*w + k];
      if (random_gaps && $urandom % 6 == 0) begin
        s_tvalid = 0;
        @(posedge clk); #0.1;
      end
      s_tdata = d; s_tkeep = 4'((1 << nb) - 1); s_tlast = (w == nw - 1);
      s_tuser = (w == nw - 1) ? flags : 4'($urandom); s_tvalid = 1;
      forever begin
        @(negedge clk);
        if (s_tready) break;
      end
      @(posedge clk); #0.1;
    end
    s_tvalid = 0;
  endtask

  int n_types [8];
  int n_partial = 0, n_chunks = 0;

  task automatic parse(input int nblocks);
    int part;
    bit split;
    part = 0; split = 0;
    for (int bi = 0; bi < nblocks; bi++) begin
      int base, p;
      block_header_t bh;
      base = bi * 256;
      bh = img[base];
      check(bh.magic_hi == 4'hC && bh.magic_lo == 8'hCE && bh.size_m1 == 0 && bh.elink == 11'h040,
            $sformatf("block %0d header %h", bi, img[base]));
      check(int'(bh.seq) == bi % 32, $sformatf("block %0d sequence %0d", bi, bh.seq));
      p = 1;
      while (p < 256) begin
        chunk_header_t h;
        int len;
        h = img[base + p];
        len = int'(h.length);
        n_types[h.ctype]++;
        if (h.ctype == CH_NULL) begin
          check(p == 255 && len == 0, "NULL filler only in the last word");
          p++;
          continue;
        end
        check(len > 0 && p + 1 + (len + 3) / 4 <= 256, $sformatf("block %0d: bad length %0d at %0d", bi, len, p));
        if (!(len > 0 && p + 1 + (len + 3) / 4 <= 256)) return;
        check((h.ctype inside {CH_WHOLE, CH_FIRST}) == !split, $sformatf("type %0d out of order", h.ctype));
        if (h.ctype inside {CH_FIRST, CH_MIDDLE}) begin
          check(p + 1 + len / 4 == 256 && len % 4 == 0, "non-final subchunk must fill the block");
          split = 1;
        end
        for (int i = 0; i < len; i++) begin
          logic [31:0] w;
          w = img[base + p + 1 + i / 4];
          if (w[8*(i%4) +: 8] != sent_bytes[0]) begin
            check(0, $sformatf("chunk %0d byte %0d", n_chunks, part + i));
            break;
          end
          void'(sent_bytes.pop_front());
        end
        part += len;
        if (h.ctype inside {CH_WHOLE, CH_LAST}) begin
          check(part == sent_len[0], $sformatf("chunk %0d length %0d, sent %0d", n_chunks, part, sent_len[0]));
          check({h.trunc, h.err, h.crcerr, h.busy} == sent_flags[0], "flags");
          if (part % 4 != 0) n_partial++;
          void'(sent_len.pop_front());
          void'(sent_flags.pop_front());
          n_chunks++;
          part = 0;
          split = 0;
        end
        p += 1 + (len + 3) / 4;
      end
      check(p == 256, "block fully used");
    end
  endtask

  initial begin
    int nb;
    repeat (3) @(posedge clk);
    #0.1 rst = 0;
    // Reference block, input always valid: one write per clock.
    fork
      for (int i = 0; i < 29; i++) send_chunk(32, 4'b0000, 1, i);
      begin
        int busy;
        busy = 0;
        wait (fifo_wr_en);
        repeat (256) begin
          @(negedge clk);
          if (fifo_wr_en) busy++;
        end
        check(busy == 256, $sformatf("block took %0d writes in 256 clocks", busy));
      end
    join
    check(img.size() >= 256, "first block complete");
    check(img[0] == 32'hc0ce0040, $sformatf("reference block header %h", img[0]));
    for (int k = 0; k < 28; k++)
      check(img[1 + 9*k] == 32'h60000020 && img[2 + 9*k] == 32'h001800aa && img[3 + 9*k] == (32'h10aabb00 | k),
            $sformatf("reference chunk %0d", k));
    check(img[253] == 32'h20000008 && img[254] == 32'h001800aa && img[255] == 32'h10aabb1c, "reference final subchunk");
    // Random traffic with a FIFO that is full now and then.
    random_gaps = 1;
    fork
      begin
        send_chunk(8, 4'b0000, 0, 0);          // closes the split chunk, block 1 now at word 8
        send_chunk(984, 4'b1010, 0, 0);        // leaves exactly one word: NULL filler
        for (int i = 0; i < 60; i++) send_chunk(1 + $urandom % 2500, 4'($urandom), 0, 0);
        for (int i = 0; i < 3; i++) send_chunk(1016, 4'b0000, 0, 0);   // tail to close the last block
      end
      begin
        repeat (30000) begin
          @(posedge clk); #0.2;
          fifo_full = ($urandom % 10 == 0);
        end
        fifo_full = 0;
      end
    join_any
    fifo_full = 0;
    repeat (10) @(posedge clk);
    nb = img.size() / 256;
    parse(nb);
    check(n_chunks >= 90, $sformatf("%0d chunks recovered", n_chunks));
    check(n_types[CH_NULL] > 0 && n_types[CH_FIRST] > 0 && n_types[CH_MIDDLE] > 0 && n_types[CH_LAST] > 0,
          "all (sub)chunk types seen");
    check(n_partial > 0, "partial last words seen");
    $display("blocks %0d chunks %0d whole %0d first %0d middle %0d last %0d null %0d",
             nb, n_chunks, n_types[CH_WHOLE], n_types[CH_FIRST], n_types[CH_MIDDLE], n_types[CH_LAST], n_types[CH_NULL]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

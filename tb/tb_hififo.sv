// tb_hififo: self-checking test of the header-inserting FIFO.
//
// Two configurations run side by side: the default (2048 x 32 bit in and out)
// and a small, widening one (64 x 32 bit in, 128 bit out) that fills up often.
// A writer sends random chunks: the first word with new_chunk, then data, then
// the header with set_header, with random plain words and idle cycles between
// chunks. A model keeps every word at the position it must leave the FIFO in,
// the header in front of its chunk. A reader with random rd_en compares every
// word read with the model; reading an unwritten header, or past the written
// data, shows up as a mismatch. It also checks the write count never exceeds the
// depth, that full is reached, that the reader is held at an outstanding
// header, the latency from a write into an empty FIFO to empty going low, and
// one word per read clock when data is waiting.
`timescale 1ns/1ps
module tb_hififo;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  logic wr_clk = 1'b0, rd_clk = 1'b0, rst = 1'b1;
  always #3.1 wr_clk = ~wr_clk;
  always #2.0 rd_clk = ~rd_clk;

  int n_done = 0;

  for (genvar g = 0; g < 2; g++) begin : g_cfg
    localparam int D  = g ? 64 : 2048;
    localparam int RW = g ? 128 : 32;
    localparam int R  = RW / 32;
    localparam int WAW = $clog2(D);

    logic          wr_en = 0, new_chunk = 0, set_header = 0, rd_en = 0;
    logic [31:0]   din = '0;
    logic          full, prog_full, empty;
    logic [RW-1:0] dout;
    logic [WAW-1:0] wr_data_count;
    logic [WAW-$clog2(R)-1:0] rd_data_count;

    hififo #(.FIFO_WRITE_DEPTH(D), .READ_DATA_WIDTH(RW)) dut (.*);

    logic [31:0] model [200000];
    int          wr_idx = 0;     // next model position
    int          rsv    = -1;    // reserved header position
    int          rd_idx = 0;     // next model word to read
    int          n_full = 0, n_hold = 0;
    bit          reading = 1'b0, stream_mode = 1'b0;

    // Write one word; waits while full (set_header needs no free word).
    task automatic put(input logic [31:0] w, input bit nc, input bit sh);
      if (!sh) begin
        forever begin
          @(negedge wr_clk);
          if (!full) break;
        end
      end else @(negedge wr_clk);
      wr_en = 1; din = w; new_chunk = nc; set_header = sh;
      @(posedge wr_clk); #0.1;
      wr_en = 0; new_chunk = 0; set_header = 0;
      if (nc) begin
        rsv = wr_idx;
        model[wr_idx] = 32'hDEAD0000;
        wr_idx += 1;
      end
      if (sh) model[rsv] = w;
      else begin
        model[wr_idx] = w;
        wr_idx += 1;
      end
      check(wr_idx - rd_idx * R <= D + 2 * R, "more words stored than memory and output registers hold");
    endtask

    task automatic put_chunk(input int len, input int id);
      for (int i = 0; i < len; i++) begin
        put($urandom, i == 0, 1'b0);
        if ($urandom % 6 == 0) repeat ($urandom % 3) @(posedge wr_clk);
      end
      put(32'hC0DE0000 | id, 1'b0, 1'b1);
    endtask

    // Reader: random rd_en, compare with model.
    always @(negedge rd_clk) rd_en <= stream_mode ? 1'b1 : (reading && ($urandom % 3 != 0));
    always @(posedge rd_clk) begin
      if (!rst && rd_en && !empty) begin
        logic [RW-1:0] e;
        for (int k = 0; k < R; k++) e[32*k +: 32] = model[rd_idx*R + k];
        check((rd_idx + 1) * R <= wr_idx, "read past written data");
        check(dout == e, $sformatf("cfg%0d word %0d: %h expected %h", g, rd_idx, dout, e));
        rd_idx++;
      end
    end
    always @(posedge wr_clk) begin
      if (!rst && full) n_full++;
      if (!rst && !dut.u_wr.header_set && dut.u_wr.limit_ptr == dut.u_wr.head_ptr && empty) n_hold++;
    end

    initial begin
      int t0, lat;
      wait (!rst);
      repeat (5) @(posedge wr_clk);
      // Latency: one chunk written into the empty FIFO, header set at once.
      put(32'h0000_0001, 1'b1, 1'b0);
      for (int i = 2; i < R; i++) put(32'h100 + i, 1'b0, 1'b0);
      put(32'hC0DE_FFFF, 1'b0, 1'b1);
      t0 = $time;
      wait (!empty);
      lat = int'(($time - t0) / 4.0);
      check(lat >= 3 && lat <= 6 + 2 * R, $sformatf("cfg%0d: empty cleared after %0d read clocks", g, lat));
      reading = 1'b1;
      wait (wr_idx - rd_idx * R < R);
      reading = 1'b0;
      // Fill without reading: full must rise; chunks stay whole.
      for (int c = 0; wr_idx < D - 40; c++) put_chunk(8, c);
      fork
        begin
          for (int c = 0; c < 12; c++) put_chunk(10, 100 + c);
        end
        begin
          repeat (4000) @(posedge rd_clk);
          reading = 1'b1;
        end
      join
      // Throughput: with data waiting, one word per read clock.
      wait (wr_idx - rd_idx * R < R);
      reading = 1'b0;
      for (int c = 0; c < 4; c++) put_chunk(15, 200 + c);
      repeat (50) @(posedge rd_clk);
      begin
        int r0, cyc;
        @(negedge rd_clk);
        r0 = rd_idx;
        stream_mode = 1'b1;
        cyc = 0;
        while (wr_idx - rd_idx * R >= R) begin
          @(posedge rd_clk); #0.1;
          cyc++;
        end
        stream_mode = 1'b0;
        check(cyc - 1 <= rd_idx - r0 && rd_idx - r0 <= cyc,
              $sformatf("cfg%0d: %0d words in %0d read clocks", g, rd_idx - r0, cyc));
      end
      // Random traffic with a slow header and a concurrent reader.
      reading = 1'b1;
      for (int c = 0; c < 300; c++) begin
        if ($urandom % 4 == 0) put($urandom, 1'b0, 1'b0);   // plain word
        put_chunk(1 + $urandom % 30, 300 + c);
      end
      wait (wr_idx - rd_idx * R < R);
      check(n_full > 0, $sformatf("cfg%0d: full never asserted", g));
      check(n_hold > 0, $sformatf("cfg%0d: reader never held at a header", g));
      $display("cfg%0d: %0d words, full cycles %0d, header holds %0d", g, wr_idx, n_full, n_hold);
      n_done++;
    end
  end

  initial begin
    repeat (20) @(posedge wr_clk);
    #0.1 rst = 1'b0;
    wait (n_done == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge wr_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// hififo: header-inserting dual-clock FIFO with first-word fall-through.
//
// Used as a normal FIFO, it stores din on every wr_clk edge with wr_en high and
// presents the oldest word on dout whenever empty is low; rd_en takes it. Its
// extra feature is the chunk header reservation. A write with new_chunk high
// stores din one word further on, leaving a reserved word in front of it. A
// later write with set_header high stores din into that reserved word instead
// of at the end. The reader is held at the reserved word until it is filled,
// so a chunk leaves the FIFO with its header in front of it although the header
// was written last. Only one header can be outstanding at a time.
//
// Structure: hififo_wr_ptr (write/header pointers, write pipeline, read limit),
// dp_ram (write port WRITE_DATA_WIDTH, read port READ_DATA_WIDTH, two read
// registers), hififo_rd_ctrl (read pointer and output state machine), two
// Gray-code crossings (read limit to rd_clk, read pointer to wr_clk) and a reset
// synchroniser. READ_DATA_WIDTH must be a power-of-two multiple of
// WRITE_DATA_WIDTH; a wide read word becomes readable when all of its parts are
// written and no outstanding header lies inside it.
//
// Flags: full is high while fewer than two words are free, so a new_chunk write
// (two words) always fits; it is also high during reset. prog_full is a
// registered wr_data_count >= PROG_FULL_THRESH, or full. wr_data_count counts
// words in use including a reserved header, as seen from the write side;
// rd_data_count counts complete read words still in memory (excluding the two
// output registers). Both lag the other domain by the synchroniser delay, which
// can only make full late to clear and empty late to clear, never late to set.
//
// rst is synchronous to wr_clk and is carried to rd_clk internally. Defaults
// follow the published FIFO (2048 x 32 bit, threshold 10).
module hififo #(
  parameter int FIFO_WRITE_DEPTH = 2048,
  parameter int WRITE_DATA_WIDTH = 32,
  parameter int READ_DATA_WIDTH  = 32,
  parameter int PROG_FULL_THRESH = 10,
  localparam int RATIO = READ_DATA_WIDTH / WRITE_DATA_WIDTH,
  localparam int LW    = $clog2(RATIO),
  localparam int WAW   = $clog2(FIFO_WRITE_DEPTH),
  localparam int RAW   = WAW - LW
) (
  input  logic                        rst,
  input  logic                        wr_clk,
  input  logic                        wr_en,
  input  logic [WRITE_DATA_WIDTH-1:0] din,
  input  logic                        new_chunk,
  input  logic                        set_header,
  output logic                        full,
  output logic                        prog_full,
  output logic [WAW-1:0]              wr_data_count,
  input  logic                        rd_clk,
  input  logic                        rd_en,
  output logic [READ_DATA_WIDTH-1:0]  dout,
  output logic                        empty,
  output logic [RAW-1:0]              rd_data_count
);
  logic                        rst_rd;
  logic                        mem_we;
  logic [WAW-1:0]              mem_waddr;
  logic [WRITE_DATA_WIDTH-1:0] mem_din;
  logic [WAW-1:0]              wr_ptr, limit_ptr, limit_rd;
  logic [RAW-1:0]              rd_ptr, rd_ptr_wr;
  logic [WAW-1:0]              rd_ptr_wr_full, used;
  logic                        buf_ce, out_ce;

  rst_sync u_rst_rd (.clk(rd_clk), .rst_in(rst), .rst_out(rst_rd));

  hififo_wr_ptr #(.DEPTH(FIFO_WRITE_DEPTH), .WIDTH(WRITE_DATA_WIDTH)) u_wr (
    .clk(wr_clk), .rst(rst), .wr_en(wr_en), .new_chunk(new_chunk),
    .set_header(set_header), .din(din), .full(full),
    .mem_we(mem_we), .mem_waddr(mem_waddr), .mem_din(mem_din),
    .wr_ptr(wr_ptr), .head_ptr(), .header_set(),
    .limit_ptr(limit_ptr));

  dp_ram #(.WR_WIDTH(WRITE_DATA_WIDTH), .RD_WIDTH(READ_DATA_WIDTH),
           .WR_DEPTH(FIFO_WRITE_DEPTH)) u_mem (
    .wr_clk(wr_clk), .we(mem_we), .waddr(mem_waddr), .din(mem_din),
    .rd_clk(rd_clk), .rd_rst(rst_rd), .buf_ce(buf_ce), .raddr(rd_ptr),
    .out_ce(out_ce), .dout(dout));

  // Read limit to the read clock, read pointer to the write clock.
  gray_cdc #(.WIDTH(WAW)) u_limit_cdc (
    .src_clk(wr_clk), .src_rst(rst), .src_bin(limit_ptr),
    .dst_clk(rd_clk), .dst_rst(rst_rd), .dst_bin(limit_rd));

  gray_cdc #(.WIDTH(RAW)) u_rdptr_cdc (
    .src_clk(rd_clk), .src_rst(rst_rd), .src_bin(rd_ptr),
    .dst_clk(wr_clk), .dst_rst(rst), .dst_bin(rd_ptr_wr));

  hififo_rd_ctrl #(.AW(RAW)) u_rd (
    .clk(rd_clk), .rst(rst_rd), .rd_en(rd_en), .limit(limit_rd[WAW-1:LW]),
    .raddr(rd_ptr), .buf_ce(buf_ce), .out_ce(out_ce), .empty(empty),
    .rd_data_count(rd_data_count));

  // Write-side occupancy and flags.
  assign rd_ptr_wr_full = WAW'({rd_ptr_wr, {LW{1'b0}}});
  assign used           = wr_ptr - rd_ptr_wr_full;
  assign full           = rst || (used >= WAW'(FIFO_WRITE_DEPTH - 2));

  always_ff @(posedge wr_clk) begin
    if (rst) begin
      wr_data_count <= '0;
      prog_full     <= 1'b1;
    end else begin
      wr_data_count <= used;
      prog_full     <= full || (used >= WAW'(PROG_FULL_THRESH));
    end
  end

  initial begin
    assert (FIFO_WRITE_DEPTH == (1 << WAW))
      else $error("hififo: FIFO_WRITE_DEPTH must be a power of two");
  end
endmodule

// crtohost: ToHost central router with chunk headers.
//
// Each of NUM_CH E-Link channels has a to_block controller that packs its
// AXI-stream chunks into BLOCK_BYTES blocks and a header-inserting FIFO (hififo)
// that puts each (sub)chunk's header, known only when the (sub)chunk ends, in
// front of the (sub)chunk. The FIFOs also cross from the front-end clock
// (wr_clk, a multiple of the 40 MHz LHC clock) to the PCIe clock (rd_clk,
// 250 MHz) and widen words from 32 bits to RD_WIDTH bits. block_mux then sends
// whole blocks, one channel at a time, to the DMA engine through the m_* stream.
// The result is the ToHost block format with chunk headers instead of chunk
// trailers, so host software can parse a block front to back in one pass.
//
// Channel c carries E-Link id {GBT id = c, AXI stream id = 0} in its block
// headers. NUM_CH and RD_WIDTH (the DMA word width) are this design's choices;
// the FIFO depth, word width and block size follow the published design.
// rst is synchronous to wr_clk and is synchronised to rd_clk internally. The
// s_* ports are per-channel arrays; m_data carries the block bytes with the
// first byte in bits 7:0.
module crtohost #(
  parameter int NUM_CH      = 2,
  parameter int WR_WIDTH    = 32,
  parameter int RD_WIDTH    = 256,
  parameter int FIFO_DEPTH  = 2048,
  parameter int BLOCK_BYTES = 1024,
  localparam int CW = (NUM_CH > 1) ? $clog2(NUM_CH) : 1
) (
  input  logic                            wr_clk,
  input  logic                            rd_clk,
  input  logic                            rst,
  input  logic [NUM_CH-1:0][WR_WIDTH-1:0] s_tdata,
  input  logic [NUM_CH-1:0][3:0]          s_tkeep,
  input  logic [NUM_CH-1:0]               s_tlast,
  input  logic [NUM_CH-1:0][3:0]          s_tuser,
  input  logic [NUM_CH-1:0]               s_tvalid,
  output logic [NUM_CH-1:0]               s_tready,
  output logic [RD_WIDTH-1:0]             m_data,
  output logic                            m_valid,
  input  logic                            m_ready,
  output logic [CW-1:0]                   m_ch,
  output logic                            m_sob,
  output logic                            m_eob
);
  localparam int BLOCK_RD_WORDS = BLOCK_BYTES * 8 / RD_WIDTH;

  logic                            rst_rd;
  logic [NUM_CH-1:0][RD_WIDTH-1:0] f_dout;
  logic [NUM_CH-1:0]               f_empty, f_rd_en;

  rst_sync u_rst_rd (.clk(rd_clk), .rst_in(rst), .rst_out(rst_rd));

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    logic [WR_WIDTH-1:0] din;
    logic                wr_en, new_chunk, set_header, full;

    to_block #(.BLOCK_BYTES(BLOCK_BYTES), .ELINK_ID(11'(c << 6))) u_to_block (
      .clk(wr_clk), .rst(rst),
      .s_tdata(s_tdata[c]), .s_tkeep(s_tkeep[c]), .s_tlast(s_tlast[c]),
      .s_tuser(s_tuser[c]), .s_tvalid(s_tvalid[c]), .s_tready(s_tready[c]),
      .fifo_din(din), .fifo_wr_en(wr_en), .fifo_new_chunk(new_chunk),
      .fifo_set_header(set_header), .fifo_full(full));

    hififo #(.FIFO_WRITE_DEPTH(FIFO_DEPTH), .WRITE_DATA_WIDTH(WR_WIDTH),
             .READ_DATA_WIDTH(RD_WIDTH)) u_fifo (
      .rst(rst), .wr_clk(wr_clk), .wr_en(wr_en), .din(din),
      .new_chunk(new_chunk), .set_header(set_header), .full(full),
      .prog_full(), .wr_data_count(),
      .rd_clk(rd_clk), .rd_en(f_rd_en[c]), .dout(f_dout[c]), .empty(f_empty[c]),
      .rd_data_count());
  end

  block_mux #(.NUM_CH(NUM_CH), .WIDTH(RD_WIDTH), .BLOCK_WORDS(BLOCK_RD_WORDS)) u_mux (
    .clk(rd_clk), .rst(rst_rd),
    .in_data(f_dout), .in_empty(f_empty), .in_rd_en(f_rd_en),
    .m_data(m_data), .m_valid(m_valid), .m_ready(m_ready), .m_ch(m_ch),
    .m_sob(m_sob), .m_eob(m_eob));
endmodule

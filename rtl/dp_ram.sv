// dp_ram: dual-clock block memory with a narrow write port and a wide read port.
//
// The write port stores one WR_WIDTH word per wr_clk edge at word address
// waddr. The read port returns RD_WIDTH = RATIO * WR_WIDTH bits; read word n
// holds write words n*RATIO .. n*RATIO+RATIO-1, the lowest address in the least
// significant bits, so bytes leave in the order they were written on a
// little-endian host. The read side has two registers, like a block RAM with
// its optional output register: the buffer register loads the addressed word
// when buf_ce is high, and the output register loads the buffer register when
// out_ce is high. Read latency is therefore two clocks. Both read registers
// clear on rd_rst. No read-during-write protection is needed: the FIFO never
// reads a word that is still being written.
module dp_ram #(
  parameter int WR_WIDTH = 32,
  parameter int RD_WIDTH = 32,
  parameter int WR_DEPTH = 2048,
  localparam int RATIO   = RD_WIDTH / WR_WIDTH,
  localparam int RD_DEPTH = WR_DEPTH / RATIO,
  localparam int WAW     = $clog2(WR_DEPTH),
  localparam int RAW     = $clog2(RD_DEPTH)
) (
  input  logic                wr_clk,
  input  logic                we,
  input  logic [WAW-1:0]      waddr,
  input  logic [WR_WIDTH-1:0] din,
  input  logic                rd_clk,
  input  logic                rd_rst,
  input  logic                buf_ce,
  input  logic [RAW-1:0]      raddr,
  input  logic                out_ce,
  output logic [RD_WIDTH-1:0] dout
);
  logic [RATIO-1:0][WR_WIDTH-1:0] mem [RD_DEPTH];
  logic [RD_WIDTH-1:0]            buf_q;

  if (RATIO == 1) begin : g_same
    always_ff @(posedge wr_clk) begin
      if (we) mem[waddr][0] <= din;
    end
  end else begin : g_wide
    localparam int LW = $clog2(RATIO);
    always_ff @(posedge wr_clk) begin
      if (we) mem[waddr[WAW-1:LW]][waddr[LW-1:0]] <= din;
    end
  end

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      buf_q <= '0;
      dout  <= '0;
    end else begin
      if (buf_ce) buf_q <= mem[raddr];
      if (out_ce) dout  <= buf_q;
    end
  end

  initial begin
    assert (RD_WIDTH % WR_WIDTH == 0 && (RATIO & (RATIO - 1)) == 0)
      else $error("dp_ram: RD_WIDTH must be a power-of-two multiple of WR_WIDTH");
  end
endmodule

// gray_cdc: moves a counter value from one clock domain to another.
//
// Binary to Gray code in the source domain, one source register, STAGES
// synchronising registers in the destination domain, and Gray back to binary.
// Because successive Gray codes differ in one bit, a sample taken while the
// source changes is either the old or the new value, never a mixture, provided
// the source value only ever steps by one (modulo 2**WIDTH) per source cycle.
// The destination value lags by one source cycle plus STAGES destination cycles.
// Each side has its own synchronous reset, which clears its registers to zero.
module gray_cdc #(
  parameter int WIDTH  = 11,
  parameter int STAGES = 2
) (
  input  logic             src_clk,
  input  logic             src_rst,
  input  logic [WIDTH-1:0] src_bin,
  input  logic             dst_clk,
  input  logic             dst_rst,
  output logic [WIDTH-1:0] dst_bin
);
  logic [WIDTH-1:0] src_gray_q;
  logic [WIDTH-1:0] sync_q [STAGES];

  always_ff @(posedge src_clk) begin
    if (src_rst) src_gray_q <= '0;
    else         src_gray_q <= src_bin ^ (src_bin >> 1);
  end

  always_ff @(posedge dst_clk) begin
    if (dst_rst) begin
      for (int i = 0; i < STAGES; i++) sync_q[i] <= '0;
    end else begin
      sync_q[0] <= src_gray_q;
      for (int i = 1; i < STAGES; i++) sync_q[i] <= sync_q[i-1];
    end
  end

  // Gray to binary: each bit is the XOR of all Gray bits at and above it.
  always_comb begin
    dst_bin[WIDTH-1] = sync_q[STAGES-1][WIDTH-1];
    for (int i = WIDTH - 2; i >= 0; i--)
      dst_bin[i] = dst_bin[i+1] ^ sync_q[STAGES-1][i];
  end
endmodule

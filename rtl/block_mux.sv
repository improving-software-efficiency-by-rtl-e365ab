// block_mux: output multiplexer of the ToHost router.
//
// Each channel FIFO holds a stream of complete blocks. The multiplexer grants
// one channel at a time and forwards exactly BLOCK_WORDS read words (one block)
// from it before choosing again, so blocks of different E-Links are never
// interleaved. Channels are served round robin, starting after the one served
// last; a channel is eligible when its FIFO is not empty.
//
// Inputs are first-word fall-through FIFO outputs (data, empty, rd_en). The
// output is a valid/ready stream: m_valid is the granted FIFO's data present,
// a word moves when m_valid and m_ready are both high, and that also pops the
// FIFO. m_sob and m_eob mark the first and last word of a block, m_ch the
// channel. Choosing a channel takes one idle clock between blocks. The
// arbitration policy is this design's choice.
module block_mux #(
  parameter int NUM_CH      = 2,
  parameter int WIDTH       = 256,
  parameter int BLOCK_WORDS = 32,
  localparam int CW = (NUM_CH > 1) ? $clog2(NUM_CH) : 1,
  localparam int BW = (BLOCK_WORDS > 1) ? $clog2(BLOCK_WORDS) : 1
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic [NUM_CH-1:0][WIDTH-1:0] in_data,
  input  logic [NUM_CH-1:0]            in_empty,
  output logic [NUM_CH-1:0]            in_rd_en,
  output logic [WIDTH-1:0]             m_data,
  output logic                         m_valid,
  input  logic                         m_ready,
  output logic [CW-1:0]                m_ch,
  output logic                         m_sob,
  output logic                         m_eob
);
  logic          locked;
  logic [CW-1:0] sel, pick;
  logic          pick_ok;
  logic [BW-1:0] cnt;
  logic          xfer;

  // Round-robin choice among non-empty channels, starting after sel.
  always_comb begin
    pick    = sel;
    pick_ok = 1'b0;
    for (int k = 1; k <= NUM_CH; k++) begin
      if (!pick_ok && !in_empty[(int'(sel) + k) % NUM_CH]) begin
        pick    = CW'((int'(sel) + k) % NUM_CH);
        pick_ok = 1'b1;
      end
    end
  end

  assign m_ch    = sel;
  assign m_data  = in_data[sel];
  assign m_valid = locked && !in_empty[sel];
  assign xfer    = m_valid && m_ready;
  assign m_sob   = m_valid && (cnt == '0);
  assign m_eob   = m_valid && (cnt == BW'(BLOCK_WORDS - 1));

  always_comb begin
    in_rd_en      = '0;
    in_rd_en[sel] = xfer;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      locked <= 1'b0;
      sel    <= CW'(NUM_CH - 1);
      cnt    <= '0;
    end else if (!locked) begin
      if (pick_ok) begin
        sel    <= pick;
        locked <= 1'b1;
        cnt    <= '0;
      end
    end else if (xfer) begin
      if (cnt == BW'(BLOCK_WORDS - 1)) begin
        locked <= 1'b0;
        cnt    <= '0;
      end else begin
        cnt <= cnt + BW'(1);
      end
    end
  end

  // A granted channel is never switched in the middle of a block.
  property p_hold_grant;
    @(posedge clk) disable iff (rst) (locked && !m_eob) |=> (locked && $stable(sel));
  endproperty
  a_hold_grant: assert property (p_hold_grant);
endmodule

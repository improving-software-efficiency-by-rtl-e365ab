// to_block: packs one E-Link's chunk stream into fixed-size ToHost blocks with
// chunk headers, writing them into a header-inserting FIFO (hififo).
//
// Input is an AXI stream of 32-bit words: one packet per chunk, s_tlast on its
// last word, s_tkeep giving the valid bytes of that last word (contiguous from
// byte 0, the first byte in bits 7:0), s_tuser the chunk flags {T,E,C,B} valid
// with s_tlast. Output is a word stream into the FIFO with the new_chunk and
// set_header qualifiers.
//
// A block is BLOCK_BYTES/4 words: a block header (0xC, size in KiB - 1, 0xCE,
// 5-bit block sequence number, E-Link id), then (sub)chunks. The first data word
// of every (sub)chunk is written with new_chunk, so the FIFO reserves the word in
// front of it. The words are counted while they pass; when the chunk ends, or
// the block is full, the (sub)chunk header (type, flags, length in bytes) is
// written with set_header and lands in the reserved word. A chunk that meets
// the end of the block is cut: the part in this block becomes a FIRST or
// MIDDLE subchunk, and the rest continues after the next block header as a
// MIDDLE or LAST subchunk; a chunk that fits is WHOLE. A partial last word is
// padded to 32 bits (the pad bytes are whatever the stream carried). When a
// (sub)chunk leaves exactly one free word in the block, too few for a header
// and data, that word is filled with a zero-length NULL header; this filler, the
// type codes other than FIRST and WHOLE, and flags being zero on all subchunks
// but the last are this design's choices. A new block is only started when data
// arrives; a partly filled block waits for more data.
//
// Timing: one FIFO write per clock. Input is stalled for one clock at each
// block header, each set_header write and each filler word, and while the FIFO
// is full (set_header writes go ahead regardless, their word being reserved).
// With chunks of 8 words, a 256-word block takes 256 clocks of output.
module to_block
  import felix_pkg::*;
#(
  parameter int          BLOCK_BYTES = 1024,
  parameter logic [10:0] ELINK_ID    = 11'h040,
  localparam int BLOCK_WORDS = BLOCK_BYTES / 4,
  localparam int PW          = $clog2(BLOCK_WORDS + 1)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] s_tdata,
  input  logic [3:0]  s_tkeep,
  input  logic        s_tlast,
  input  logic [3:0]  s_tuser,
  input  logic        s_tvalid,
  output logic        s_tready,
  output logic [31:0] fifo_din,
  output logic        fifo_wr_en,
  output logic        fifo_new_chunk,
  output logic        fifo_set_header,
  input  logic        fifo_full
);
  localparam logic [3:0] SIZE_M1 = 4'(BLOCK_BYTES / 1024 - 1);

  typedef enum logic [2:0] {
    ACT_IDLE, ACT_HEADER, ACT_PAD, ACT_BLOCK_HDR, ACT_DATA
  } action_e;

  logic [PW-1:0] pos;          // words of the block in use, reserved header included
  logic [PW-1:0] sc_words;     // data words in the open subchunk
  logic [4:0]    seq;
  logic          in_chunk;     // a subchunk header is reserved and open
  logic          first_sc;     // next subchunk is the first of its chunk
  logic          hdr_pending;
  logic          pad_pending;
  logic [31:0]   hdr_word;

  action_e       act;
  logic [PW-1:0] pos_n, sc_n;
  logic [15:0]   last_len;

  always_comb begin
    act = ACT_IDLE;
    if (hdr_pending)                  act = ACT_HEADER;
    else if (fifo_full)               act = ACT_IDLE;
    else if (pad_pending)             act = ACT_PAD;
    else if (s_tvalid && pos == '0)   act = ACT_BLOCK_HDR;
    else if (s_tvalid)                act = ACT_DATA;
  end

  always_comb begin
    fifo_wr_en      = (act != ACT_IDLE);
    fifo_set_header = (act == ACT_HEADER);
    fifo_new_chunk  = (act == ACT_DATA) && !in_chunk;
    s_tready        = (act == ACT_DATA);
    unique case (act)
      ACT_HEADER:    fifo_din = hdr_word;
      ACT_PAD:       fifo_din = make_chunk_header(CH_NULL, 4'b0000, 16'd0);
      ACT_BLOCK_HDR: fifo_din = make_block_header(SIZE_M1, seq, ELINK_ID);
      ACT_DATA:      fifo_din = s_tdata;
      default:       fifo_din = '0;
    endcase
  end

  assign pos_n    = pos + (in_chunk ? PW'(1) : PW'(2));
  assign sc_n     = in_chunk ? sc_words + PW'(1) : PW'(1);
  assign last_len = (16'(sc_n) - 16'd1) * 16'd4 + 16'($countones(s_tkeep));

  always_ff @(posedge clk) begin
    if (rst) begin
      pos         <= '0;
      sc_words    <= '0;
      seq         <= '0;
      in_chunk    <= 1'b0;
      first_sc    <= 1'b1;
      hdr_pending <= 1'b0;
      pad_pending <= 1'b0;
      hdr_word    <= '0;
    end else begin
      unique case (act)
        ACT_HEADER: begin
          hdr_pending <= 1'b0;
          if (pos == PW'(BLOCK_WORDS)) begin
            pos <= '0;
            seq <= seq + 5'd1;
          end else if (pos == PW'(BLOCK_WORDS - 1)) begin
            pad_pending <= 1'b1;
          end
        end
        ACT_PAD: begin
          pad_pending <= 1'b0;
          pos         <= '0;
          seq         <= seq + 5'd1;
        end
        ACT_BLOCK_HDR: pos <= PW'(1);
        ACT_DATA: begin
          pos      <= pos_n;
          sc_words <= sc_n;
          in_chunk <= 1'b1;
          if (s_tlast) begin
            hdr_pending <= 1'b1;
            hdr_word    <= make_chunk_header(first_sc ? CH_WHOLE : CH_LAST, s_tuser, last_len);
            in_chunk    <= 1'b0;
            first_sc    <= 1'b1;
          end else if (pos_n == PW'(BLOCK_WORDS)) begin
            hdr_pending <= 1'b1;
            hdr_word    <= make_chunk_header(first_sc ? CH_FIRST : CH_MIDDLE, 4'b0000,
                                             16'(sc_n) * 16'd4);
            in_chunk    <= 1'b0;
            first_sc    <= 1'b0;
          end
        end
        default: ;
      endcase
    end
  end

  initial begin
    assert (BLOCK_BYTES % 1024 == 0 && BLOCK_BYTES <= 16384)
      else $error("to_block: BLOCK_BYTES must be 1..16 KiB in whole KiB");
  end
endmodule

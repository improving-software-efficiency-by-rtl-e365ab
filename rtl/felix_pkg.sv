// felix_pkg: shared formats of the ToHost block stream.
//
// A block is a fixed number of 32-bit words. Its first word is the block header;
// every (sub)chunk that follows starts with a 32-bit chunk header carrying the
// (sub)chunk length in bytes, its type and four flags, and its data is padded to
// a whole number of 32-bit words. The field layouts of the block header and of
// the chunk header (the former chunk trailer, moved to the front) follow the
// FELIX ToHost format. The numeric type codes other than FIRST (1) and WHOLE (3),
// which are visible in real FELIX output, are this design's choice, as is the
// null type used to fill a single leftover word at the end of a block.
package felix_pkg;

  // Chunk (sub)types, bits 31:29 of the chunk header.
  typedef enum logic [2:0] {
    CH_NULL   = 3'd0,  // filler: zero length, closes the block
    CH_FIRST  = 3'd1,  // first subchunk of a split chunk
    CH_LAST   = 3'd2,  // final subchunk of a split chunk
    CH_WHOLE  = 3'd3,  // complete chunk
    CH_MIDDLE = 3'd4   // middle subchunk of a split chunk
  } chunk_type_e;

  // Chunk header: type, flags T (truncated), E (error), C (CRC error), B (busy),
  // 9 reserved bits, 16-bit length in bytes.
  typedef struct packed {
    chunk_type_e ctype;
    logic        trunc;
    logic        err;
    logic        crcerr;
    logic        busy;
    logic [8:0]  reserved;
    logic [15:0] length;
  } chunk_header_t;

  // Block header: 0xC, block size in KiB minus one, 0xCE, 5-bit block sequence
  // number, 5-bit GBT link id and 6-bit AXI stream id (together the E-Link id).
  typedef struct packed {
    logic [3:0]  magic_hi;
    logic [3:0]  size_m1;
    logic [7:0]  magic_lo;
    logic [4:0]  seq;
    logic [10:0] elink;
  } block_header_t;

  localparam logic [3:0] BLK_MAGIC_HI = 4'hC;
  localparam logic [7:0] BLK_MAGIC_LO = 8'hCE;

  function automatic logic [31:0] make_block_header(input logic [3:0] size_m1,
                                                    input logic [4:0] seq,
                                                    input logic [10:0] elink);
    block_header_t h;
    h.magic_hi = BLK_MAGIC_HI;
    h.size_m1  = size_m1;
    h.magic_lo = BLK_MAGIC_LO;
    h.seq      = seq;
    h.elink    = elink;
    return h;
  endfunction

  function automatic logic [31:0] make_chunk_header(input chunk_type_e t,
                                                    input logic [3:0] flags,
                                                    input logic [15:0] len);
    chunk_header_t h;
    h.ctype    = t;
    {h.trunc, h.err, h.crcerr, h.busy} = flags;
    h.reserved = '0;
    h.length   = len;
    return h;
  endfunction

endpackage

// hififo_wr_ptr: write-side pointer logic of the header-inserting FIFO.
//
// The write counter advances by one per accepted word, by two when new_chunk is
// asserted (the word written is placed one address further on, leaving a hole
// for the chunk header), and not at all when set_header is asserted. The address
// of the hole is kept in the header pointer register, loaded on new_chunk; a
// word written with set_header goes to that address. The memory write strobe,
// address and data pass through one register stage (the timing pipeline), so a
// word reaches the memory one clock after it is accepted.
//
// This block also produces the read limit: the first word the reader may not
// yet read. It is the write pointer while no header is outstanding, and the
// header pointer while one is. The limit only moves forward, but it jumps when a
// header is set; limit_ptr follows it one step per clock so that it can be sent
// to the read clock through a Gray-code synchroniser, which tolerates only
// single steps. Computing this one limit on the write side and crossing it as a
// single value is this design's choice; it keeps the reader from seeing a new
// write pointer before the matching header state.
//
// new_chunk and set_header are single-cycle qualifiers of wr_en and must not be
// asserted together. A write with new_chunk is dropped when full is high; a
// set_header write is always accepted, as its word is already reserved.
module hififo_wr_ptr #(
  parameter int DEPTH = 2048,
  parameter int WIDTH = 32,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic             new_chunk,
  input  logic             set_header,
  input  logic [WIDTH-1:0] din,
  input  logic             full,
  output logic             mem_we,
  output logic [AW-1:0]    mem_waddr,
  output logic [WIDTH-1:0] mem_din,
  output logic [AW-1:0]    wr_ptr,
  output logic [AW-1:0]    head_ptr,
  output logic             header_set,
  output logic [AW-1:0]    limit_ptr
);
  logic          accept;
  logic [AW-1:0] wr_ptr_p1, new_addr, addr;
  logic [AW-1:0] limit_target;

  assign accept    = wr_en && (set_header || !full);
  assign wr_ptr_p1 = wr_ptr + AW'(1);
  // Write one address ahead as soon as new_chunk is seen, not a clock later.
  assign new_addr  = new_chunk  ? wr_ptr_p1 : wr_ptr;
  assign addr      = set_header ? head_ptr  : new_addr;

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr     <= '0;
      head_ptr   <= '0;
      header_set <= 1'b1;
    end else if (accept) begin
      if (new_chunk) begin
        head_ptr   <= wr_ptr;
        wr_ptr     <= wr_ptr + AW'(2);
        header_set <= 1'b0;
      end else if (set_header) begin
        header_set <= 1'b1;
      end else begin
        wr_ptr <= wr_ptr_p1;
      end
    end
  end

  // Pipeline register on the memory write signals.
  always_ff @(posedge clk) begin
    if (rst) begin
      mem_we    <= 1'b0;
      mem_waddr <= '0;
      mem_din   <= '0;
    end else begin
      mem_we    <= accept;
      mem_waddr <= addr;
      mem_din   <= din;
    end
  end

  // Read limit, stepped by one per clock towards its target.
  assign limit_target = header_set ? wr_ptr : head_ptr;

  always_ff @(posedge clk) begin
    if (rst)                          limit_ptr <= '0;
    else if (limit_ptr != limit_target) limit_ptr <= limit_ptr + AW'(1);
  end

  // The header must be set before the next chunk starts.
  property p_no_nested_chunk;
    @(posedge clk) disable iff (rst) (wr_en && new_chunk) |-> header_set;
  endproperty
  a_no_nested_chunk: assert property (p_no_nested_chunk);

  property p_exclusive_qualifiers;
    @(posedge clk) disable iff (rst) !(new_chunk && set_header);
  endproperty
  a_exclusive_qualifiers: assert property (p_exclusive_qualifiers);

  property p_set_needs_reservation;
    @(posedge clk) disable iff (rst) (wr_en && set_header) |-> !header_set;
  endproperty
  a_set_needs_reservation: assert property (p_set_needs_reservation);
endmodule

// hififo_rd_ctrl: read side of the header-inserting FIFO (first-word fall-through).
//
// The memory has two registers on its read path: a buffer register next to the
// memory and an output register that drives dout. A four-state machine records
// which of them hold a valid word: none_ready, buffer_ready, output_ready and
// both_ready. Each clock it
//   - moves the buffer word into the output register when the output register
//     is free or is being read (out_ce),
//   - loads the buffer register from the memory and advances the read pointer
//     when a complete word is available and the buffer is free or being emptied
//     (buf_ce),
// so the next word is already waiting when rd_en takes the current one, and
// back-to-back reads run at one word per clock. empty is low exactly when the
// output register holds a word (output_ready or both_ready); rd_en while empty
// is ignored.
//
// Whether the memory holds a word at the read pointer is kept in a register
// (the inverse of a registered "memory empty" flag), so that no comparator sits
// in front of the memory's read enable. It is computed one clock ahead from the
// next read pointer and the crossed read limit: the limit only moves forward,
// so a word found available stays available. A word written to an empty FIFO
// appears on dout three clocks after limit moves past it.
//
// The state names, the register arrangement, the registered empty flag and the
// rule for when each register loads follow the header-inserting FIFO as
// published; the exact logic equations are this design's own.
module hififo_rd_ctrl #(
  parameter int AW = 11
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          rd_en,
  input  logic [AW-1:0] limit,
  output logic [AW-1:0] raddr,
  output logic          buf_ce,
  output logic          out_ce,
  output logic          empty,
  output logic [AW-1:0] rd_data_count
);
  typedef enum logic [1:0] {
    NONE_READY   = 2'b00,
    BUFFER_READY = 2'b10,
    OUTPUT_READY = 2'b01,
    BOTH_READY   = 2'b11
  } out_state_e;

  out_state_e state, next_state;
  logic          buf_valid, out_valid, avail, pop;
  logic          buf_valid_n, out_valid_n;
  logic [AW-1:0] raddr_n;

  assign buf_valid = state[1];
  assign out_valid = state[0];
  assign pop       = rd_en && out_valid;
  assign out_ce    = buf_valid && (!out_valid || pop);
  assign buf_ce    = avail && (!buf_valid || out_ce);

  always_comb begin
    buf_valid_n = buf_ce || (buf_valid && !out_ce);
    out_valid_n = out_ce || (out_valid && !pop);
    next_state  = out_state_e'({buf_valid_n, out_valid_n});
  end

  assign raddr_n = buf_ce ? raddr + AW'(1) : raddr;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= NONE_READY;
      raddr <= '0;
      avail <= 1'b0;
    end else begin
      state <= next_state;
      raddr <= raddr_n;
      avail <= (raddr_n != limit);
    end
  end

  assign empty         = !out_valid;
  assign rd_data_count = limit - raddr;

  // The memory is never read at or beyond the limit.
  property p_no_read_past_limit;
    @(posedge clk) disable iff (rst) buf_ce |-> (raddr != limit);
  endproperty
  a_no_read_past_limit: assert property (p_no_read_past_limit);

  // buffer_ready always moves its word on at the next clock.
  property p_buffer_ready_transient;
    @(posedge clk) disable iff (rst) (state == BUFFER_READY) |=> out_valid;
  endproperty
  a_buffer_ready_transient: assert property (p_buffer_ready_transient);
endmodule

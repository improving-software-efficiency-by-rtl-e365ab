// rst_sync: carries a reset into another clock domain.
//
// The source reset is asynchronous to clk. It asserts the output at once and
// releases it only after STAGES rising edges of clk without reset, so the
// release is synchronous to the destination clock. Active high on both sides.
module rst_sync #(
  parameter int STAGES = 2
) (
  input  logic clk,
  input  logic rst_in,
  output logic rst_out
);
  logic [STAGES-1:0] sync_q;

  always_ff @(posedge clk or posedge rst_in) begin
    if (rst_in) sync_q <= '1;
    else        sync_q <= {sync_q[STAGES-2:0], 1'b0};
  end

  assign rst_out = sync_q[STAGES-1];
endmodule

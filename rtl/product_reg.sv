// product_reg: pipeline stage 3, the product register.
//
// Stores the 2N-bit sum of the partial product rows (64 bits for N = 32) and
// a valid flag on every rising clock edge. Synchronous, active-high reset.
// One cycle of latency; with the two earlier stages the product appears three
// clock edges after the operands are presented.
//
// The final result register follows the design description; its 2N-bit
// width, the valid flag and the reset are choices of this design.
module product_reg #(
  parameter int unsigned N = 32
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           in_valid,
  input  logic [2*N-1:0] p_d,
  output logic           valid_q,
  output logic [2*N-1:0] p_q
);

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_q <= 1'b0;
      p_q     <= '0;
    end else begin
      valid_q <= in_valid;
      p_q     <= p_d;
    end
  end

endmodule

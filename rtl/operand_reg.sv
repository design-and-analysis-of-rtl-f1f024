// operand_reg: pipeline stage 1, the operand register.
//
// On each rising clock edge it stores the multiplicand X and the multiplier Y
// (2N D flip-flops, 64 for N = 32) together with a valid flag. Synchronous,
// active-high reset clears all of them. Output follows the inputs by one
// cycle.
//
// The 2N-bit operand store follows the design description; the valid flag and
// the synchronous reset are choices of this design.
module operand_reg #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [N-1:0] x_in,      // multiplicand
  input  logic [N-1:0] y_in,      // multiplier
  output logic         valid_q,
  output logic [N-1:0] x_q,
  output logic [N-1:0] y_q
);

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_q <= 1'b0;
      x_q     <= '0;
      y_q     <= '0;
    end else begin
      valid_q <= in_valid;
      x_q     <= x_in;
      y_q     <= y_in;
    end
  end

endmodule

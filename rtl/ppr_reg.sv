// ppr_reg: pipeline stage 2, the partial product row register.
//
// Stores the R partial product rows of W bits each (11 x 35 = 385 D
// flip-flops for N = 32) and a valid flag on every rising clock edge.
// Synchronous, active-high reset clears everything. One cycle of latency.
//
// The 385-bit row store follows the design description; the valid flag and
// the reset are choices of this design.
module ppr_reg
  import radix8_pkg::*;
#(
  parameter int unsigned N  = 32,
  localparam int unsigned W = ppr_width(N),
  localparam int unsigned R = num_ppr(N)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [W-1:0] ppr_d [R],
  output logic         valid_q,
  output logic [W-1:0] ppr_q [R]
);

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_q <= 1'b0;
      for (int k = 0; k < int'(R); k++) ppr_q[k] <= '0;
    end else begin
      valid_q <= in_valid;
      for (int k = 0; k < int'(R); k++) ppr_q[k] <= ppr_d[k];
    end
  end

endmodule

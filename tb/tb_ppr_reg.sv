// tb_ppr_reg: checks that all 11 rows of 35 bits and the valid flag are
// captured on a rising edge, held for one cycle and cleared by reset.
module tb_ppr_reg;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int W = 35, R = 11;
  logic         rst, in_valid, valid_q;
  logic [W-1:0] ppr_d [R];
  logic [W-1:0] ppr_q [R];
  logic [W-1:0] exp_r [R];

  ppr_reg dut (.*);

  initial begin
    logic ev;
    rst = 1'b1; in_valid = 1'b1;
    for (int k = 0; k < R; k++) ppr_d[k] = '1;
    @(posedge clk); #1;
    checks++;
    if (valid_q !== 1'b0) begin failures++; $display("FAIL valid after reset"); end
    for (int k = 0; k < R; k++) begin
      checks++;
      if (ppr_q[k] !== '0) begin failures++; $display("FAIL row %0d after reset", k); end
    end
    rst = 1'b0;
    for (int i = 0; i < 300; i++) begin
      ev = 1'($urandom);
      in_valid = ev;
      for (int k = 0; k < R; k++) begin
        exp_r[k] = {3'($urandom), $urandom};
        ppr_d[k] = exp_r[k];
      end
      @(posedge clk); #1;
      for (int k = 0; k < R; k++) ppr_d[k] = ~exp_r[k];
      in_valid = ~ev;
      #2;
      checks++;
      if (valid_q !== ev) begin failures++; $display("FAIL valid cycle %0d", i); end
      for (int k = 0; k < R; k++) begin
        checks++;
        if (ppr_q[k] !== exp_r[k]) begin
          failures++;
          $display("FAIL cycle %0d row %0d got %h exp %h", i, k, ppr_q[k], exp_r[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

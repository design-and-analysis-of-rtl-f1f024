// tb_product_reg: checks that the 64-bit product and the valid flag are
// captured on a rising edge, held for one cycle and cleared by reset.
module tb_product_reg;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        rst, in_valid, valid_q;
  logic [63:0] p_d, p_q;

  product_reg dut (.*);

  initial begin
    logic [63:0] ep;
    logic        ev;
    rst = 1'b1; in_valid = 1'b1; p_d = '1;
    @(posedge clk); #1;
    checks++;
    if (valid_q !== 1'b0 || p_q !== '0) begin failures++; $display("FAIL reset"); end
    rst = 1'b0;
    for (int i = 0; i < 500; i++) begin
      ep = {$urandom, $urandom}; ev = 1'($urandom);
      p_d = ep; in_valid = ev;
      @(posedge clk); #1;
      p_d = ~ep; in_valid = ~ev;
      #2;
      checks++;
      if (p_q !== ep || valid_q !== ev) begin
        failures++;
        $display("FAIL cycle %0d got %h %b exp %h %b", i, p_q, valid_q, ep, ev);
      end
    end
    // reset in the middle of operation
    rst = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (valid_q !== 1'b0 || p_q !== '0) begin failures++; $display("FAIL late reset"); end
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

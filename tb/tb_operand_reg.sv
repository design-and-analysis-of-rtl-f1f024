// tb_operand_reg: checks that the operand register captures multiplicand,
// multiplier and valid on each rising edge, holds them for one cycle, and
// clears them under synchronous reset.
module tb_operand_reg;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        rst, in_valid, valid_q;
  logic [31:0] x_in, y_in, x_q, y_q;

  operand_reg dut (.*);

  initial begin
    logic [31:0] ex, ey;
    logic        ev;
    rst = 1'b1; in_valid = 1'b1; x_in = '1; y_in = '1;
    @(posedge clk); #1;
    checks++;
    if (valid_q !== 1'b0 || x_q !== '0 || y_q !== '0) begin
      failures++; $display("FAIL reset not clearing");
    end
    rst = 1'b0;
    for (int i = 0; i < 500; i++) begin
      ex = $urandom; ey = $urandom; ev = 1'($urandom);
      x_in = ex; y_in = ey; in_valid = ev;
      @(posedge clk); #1;
      x_in = ~ex; y_in = ~ey; in_valid = ~ev;   // change after the edge
      #2;
      checks++;
      if (x_q !== ex || y_q !== ey || valid_q !== ev) begin
        failures++;
        $display("FAIL cycle %0d got %h %h %b exp %h %h %b", i, x_q, y_q, valid_q, ex, ey, ev);
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

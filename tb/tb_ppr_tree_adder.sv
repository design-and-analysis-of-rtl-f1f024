// tb_ppr_tree_adder: checks the tree of carry look-ahead adders that sums the
// partial product rows. Eleven 35-bit rows (random, all-ones, the most
// negative row, single rows) are fed in; the 64-bit result must equal
// sum over k of signed(row k) * 8^k, worked out here modulo 2^64.
module tb_ppr_tree_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int W = 35, R = 11;
  logic [W-1:0] ppr [R];
  logic [63:0]  product;

  ppr_tree_adder dut (.ppr(ppr), .product(product));

  task automatic check_once(string what);
    logic [63:0] e;
    #1;
    e = '0;
    for (int k = 0; k < R; k++) e += 64'(longint'($signed(ppr[k]))) << (3 * k);
    checks++;
    if (product !== e) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, product, e);
    end
  endtask

  initial begin
    for (int k = 0; k < R; k++) ppr[k] = '1;
    check_once("all -1");
    for (int k = 0; k < R; k++) ppr[k] = {1'b1, 34'd0};
    check_once("all most negative");
    for (int k = 0; k < R; k++) ppr[k] = {1'b0, {34{1'b1}}};
    check_once("all most positive");
    for (int j = 0; j < R; j++) begin
      for (int k = 0; k < R; k++) ppr[k] = '0;
      ppr[j] = {3'($urandom), $urandom};
      check_once("single row");
    end
    for (int i = 0; i < 3000; i++) begin
      for (int k = 0; k < R; k++) ppr[k] = {3'($urandom), $urandom};
      check_once("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

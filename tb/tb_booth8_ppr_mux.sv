// tb_booth8_ppr_mux: drives every one of the 16 select codes with random
// multiples and checks that the row equals digit * X, where the digit is
// worked out here from the code as -4*s3 + 2*s2 + s1 + s0.
module tb_booth8_ppr_mux;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int W = 35;
  logic [3:0]   sel;
  logic [W-1:0] pos1, pos2, pos3, pos4, neg1, neg2, neg3, neg4, ppr;

  booth8_ppr_mux #(.W(W)) dut (.*);

  initial begin
    longint x, d, e;
    for (int i = 0; i < 200; i++) begin
      x = longint'($signed($urandom));
      if (i == 0) x = 1;
      pos1 = W'(x);     neg1 = W'(-x);
      pos2 = W'(2 * x); neg2 = W'(-2 * x);
      pos3 = W'(3 * x); neg3 = W'(-3 * x);
      pos4 = W'(4 * x); neg4 = W'(-4 * x);
      for (int s = 0; s < 16; s++) begin
        sel = 4'(s);
        d = -4 * s[3] + 2 * s[2] + s[1] + s[0];
        e = d * x;
        #1;
        checks++;
        if (ppr !== W'(e)) begin
          failures++;
          $display("FAIL sel=%b x=%0d got %h exp %h", sel, x, ppr, W'(e));
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

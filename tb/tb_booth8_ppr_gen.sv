// tb_booth8_ppr_gen: checks the radix-8 row generator in both operand modes.
// For each row k the expected value digit_k * X is worked out here from the
// multiplier bits (y[3k+2], y[3k+1], y[3k], y[3k-1]) with 64-bit integer
// arithmetic; the weighted sum of the rows, sum ppr[k] * 8^k, must also equal
// X * Y. Eleven rows of 35 bits are expected for 32-bit operands.
module tb_booth8_ppr_gen;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int N = 32, W = 35, R = 11;
  logic [N-1:0] x, y;
  logic [W-1:0] ppr_s [R];
  logic [W-1:0] ppr_u [R];

  booth8_ppr_gen                     dut_s (.x(x), .y(y), .ppr(ppr_s));
  booth8_ppr_gen #(.SIGNED(1'b0))    dut_u (.x(x), .y(y), .ppr(ppr_u));

  task automatic check_mode(bit sgn);
    longint xv, yv, d, e, acc;
    logic [34:0] ye;   // {ext, ext, y, 0}
    logic [W-1:0] row;
    xv = sgn ? longint'($signed(x)) : longint'({32'd0, x});
    yv = sgn ? longint'($signed(y)) : longint'({32'd0, y});
    ye = sgn ? {{2{y[N-1]}}, y, 1'b0} : {2'b00, y, 1'b0};
    acc = 0;
    for (int k = 0; k < R; k++) begin
      d = -4 * ye[3*k+3] + 2 * ye[3*k+2] + ye[3*k+1] + ye[3*k];
      e = d * xv;
      row = sgn ? ppr_s[k] : ppr_u[k];
      checks++;
      if (row !== W'(e)) begin
        failures++;
        $display("FAIL signed=%0d row %0d x=%h y=%h got %h exp %h", sgn, k, x, y, row, W'(e));
      end
      acc += longint'($signed(row)) <<< (3 * k);
    end
    checks++;
    if (acc !== xv * yv) begin
      failures++;
      $display("FAIL signed=%0d sum x=%h y=%h got %0d exp %0d", sgn, x, y, acc, xv * yv);
    end
  endtask

  initial begin
    static logic [N-1:0] corners [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'hAAAA_AAAA};
    foreach (corners[i]) foreach (corners[j]) begin
      x = corners[i]; y = corners[j]; #1;
      check_mode(1'b1); check_mode(1'b0);
    end
    for (int i = 0; i < 3000; i++) begin
      x = $urandom; y = $urandom; #1;
      check_mode(1'b1); check_mode(1'b0);
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

// tb_cla_adder: self-checking test of the carry look-ahead adder.
// Two instances, a 64-bit one and a 13-bit one (width not a multiple of the
// 4-bit group), get corner patterns (all ones plus carry-in, alternating
// bits) and random operands; {cout, sum} is compared with a + b + cin worked
// out by the simulator's own arithmetic.
module tb_cla_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [63:0] a64, b64, s64;
  logic        c64, co64;
  logic [12:0] a13, b13, s13;
  logic        c13, co13;

  cla_adder #(.W(64)) dut64 (.a(a64), .b(b64), .cin(c64), .sum(s64), .cout(co64));
  cla_adder #(.W(13)) dut13 (.a(a13), .b(b13), .cin(c13), .sum(s13), .cout(co13));

  task automatic check_once();
    logic [64:0] e64;
    logic [13:0] e13;
    #1;
    e64 = {1'b0, a64} + {1'b0, b64} + 65'(c64);
    e13 = {1'b0, a13} + {1'b0, b13} + 14'(c13);
    checks += 2;
    if ({co64, s64} !== e64) begin
      failures++;
      $display("FAIL W=64 a=%h b=%h cin=%0d got %h exp %h", a64, b64, c64, {co64, s64}, e64);
    end
    if ({co13, s13} !== e13) begin
      failures++;
      $display("FAIL W=13 a=%h b=%h cin=%0d got %h exp %h", a13, b13, c13, {co13, s13}, e13);
    end
  endtask

  initial begin
    // corners
    a64 = '1; b64 = '0; c64 = 1'b1; a13 = '1; b13 = '0; c13 = 1'b1; check_once();
    a64 = '1; b64 = '1; c64 = 1'b1; a13 = '1; b13 = '1; c13 = 1'b1; check_once();
    a64 = 64'h5555_5555_5555_5555; b64 = 64'hAAAA_AAAA_AAAA_AAAA; c64 = 1'b1;
    a13 = 13'h0AAA; b13 = 13'h1555; c13 = 1'b1; check_once();
    a64 = '0; b64 = '0; c64 = 1'b0; a13 = '0; b13 = '0; c13 = 1'b0; check_once();
    for (int i = 0; i < 5000; i++) begin
      a64 = {$urandom, $urandom};
      b64 = {$urandom, $urandom};
      c64 = 1'($urandom);
      a13 = 13'($urandom);
      b13 = 13'($urandom);
      c13 = 1'($urandom);
      if (i % 7 == 0) b64 = ~a64;  // long propagate chains
      if (i % 11 == 0) b13 = ~a13;
      check_once();
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

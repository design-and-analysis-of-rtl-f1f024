// tb_radix8_full: the multiplier at its default configuration (32-bit signed
// operands, tree addition), with no parameter overridden. It runs one
// complete operation, 0x80000000 * 0x80000000 = 2^62, checks that the
// product arrives exactly three rising edges after issue, then streams
// 20000 random operand pairs at one per cycle and checks every product
// against 64-bit integer arithmetic.
module tb_radix8_full;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        rst, in_valid, out_valid;
  logic [31:0] multiplicand, multiplier;
  logic [63:0] product;

  radix8_pipelined_mult dut (.*);

  logic [63:0] exp_q [$];

  initial begin
    int lat;
    rst = 1'b1; in_valid = 1'b0; multiplicand = '0; multiplier = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    in_valid <= 1'b1; multiplicand <= 32'h8000_0000; multiplier <= 32'h8000_0000;
    @(posedge clk);
    in_valid <= 1'b0;
    #1;
    lat = 1;   // rising edges since the operands were captured
    while (!out_valid && lat < 10) begin
      @(posedge clk);
      #1;
      lat++;
    end
    checks += 2;
    if (lat != 3) begin failures++; $display("FAIL latency %0d, expected 3", lat); end
    if (product !== 64'h4000_0000_0000_0000) begin
      failures++; $display("FAIL product %h", product);
    end
    @(posedge clk);
    // streamed operation
    fork
      begin
        for (int i = 0; i < 20000; i++) begin
          logic [31:0] x, y;
          x = $urandom; y = $urandom;
          in_valid <= 1'b1; multiplicand <= x; multiplier <= y;
          exp_q.push_back(64'(longint'($signed(x)) * longint'($signed(y))));
          @(posedge clk);
        end
        in_valid <= 1'b0;
      end
      begin
        automatic int got = 0;
        while (got < 20000) begin
          @(negedge clk);
          if (out_valid) begin
            checks++;
            got++;
            if (exp_q.size() == 0 || product !== exp_q.pop_front()) begin
              failures++;
              if (failures < 10) $display("FAIL stream result %0d: %h", got, product);
            end
          end
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

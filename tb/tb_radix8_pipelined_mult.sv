// tb_radix8_pipelined_mult: end-to-end test of the pipelined multiplier.
//
// Three multipliers run side by side from the same stimulus: the default one
// (signed operands, tree addition), an unsigned one and one with the chained
// (sequential) addition. A scoreboard queue per instance holds the product
// expected three rising edges after each valid input, worked out with 64-bit
// integer arithmetic. The stimulus mixes back-to-back operands (one new pair
// per cycle), idle cycles, corner operands and a reset in mid-stream.
//
// Mechanisms counted, each of which must occur at least once:
//   - every one of the 16 Booth select codes in the multiplier groups
//   - the hard multiple (+-3X) and negative multiples
//   - full-rate issue: a new pair on every cycle for 3+ cycles
//   - a bubble (idle cycle) inside the stream
//   - a reset flushing operations in flight
//   - a negative signed product
module tb_radix8_pipelined_mult;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        rst, in_valid;
  logic [31:0] a, b;
  logic        v_s, v_u, v_q;
  logic [63:0] p_s, p_u, p_q;

  radix8_pipelined_mult dut_s (
    .clk, .rst, .in_valid, .multiplicand(a), .multiplier(b),
    .out_valid(v_s), .product(p_s));
  radix8_pipelined_mult #(.SIGNED(1'b0)) dut_u (
    .clk, .rst, .in_valid, .multiplicand(a), .multiplier(b),
    .out_valid(v_u), .product(p_u));
  radix8_pipelined_mult #(.TREE(1'b0)) dut_q (
    .clk, .rst, .in_valid, .multiplicand(a), .multiplier(b),
    .out_valid(v_q), .product(p_q));

  // expected outputs per cycle, pipelined 3 deep
  logic        ev [4];
  logic [63:0] es [4];
  logic [63:0] eu [4];

  int code_seen [16];
  int n_fullrate = 0, n_bubble = 0, n_reset_flush = 0, n_neg = 0;
  int run = 0;
  int n_results = 0;

  // scoreboard: shift expected values on every edge, compare after the edge
  always @(posedge clk) begin
    logic [63:0] s_e, u_e;
    s_e = 64'(longint'($signed(a)) * longint'($signed(b)));
    u_e = {32'd0, a} * {32'd0, b};
    if (rst) begin
      if (ev[1] || ev[2] || ev[3]) n_reset_flush++;
      for (int i = 0; i < 4; i++) ev[i] <= 1'b0;
    end else begin
      ev[1] <= in_valid; es[1] <= s_e; eu[1] <= u_e;
      ev[2] <= ev[1];    es[2] <= es[1]; eu[2] <= eu[1];
      ev[3] <= ev[2];    es[3] <= es[2]; eu[3] <= eu[2];
      if (in_valid) begin
        run++;
        if (run == 3) n_fullrate++;
        for (int k = 0; k < 11; k++) begin
          logic [34:0] ye;
          ye = {{2{b[31]}}, b, 1'b0};
          code_seen[ye[3*k +: 4]]++;
        end
        if ($signed(s_e) < 0) n_neg++;
      end else begin
        if (run > 0 && (ev[1] || ev[2])) n_bubble++;
        run = 0;
      end
    end
  end

  always @(negedge clk) begin
    checks++;
    if (v_s !== ev[3] || v_u !== ev[3] || v_q !== ev[3]) begin
      failures++;
      $display("FAIL valid timing: got %b%b%b exp %b", v_s, v_u, v_q, ev[3]);
    end
    if (ev[3]) begin
      n_results++;
      checks += 3;
      if (p_s !== es[3]) begin failures++; $display("FAIL signed got %h exp %h", p_s, es[3]); end
      if (p_u !== eu[3]) begin failures++; $display("FAIL unsigned got %h exp %h", p_u, eu[3]); end
      if (p_q !== es[3]) begin failures++; $display("FAIL chained got %h exp %h", p_q, es[3]); end
    end
  end

  task automatic drive(logic v, logic [31:0] x, logic [31:0] y);
    in_valid <= v; a <= x; b <= y;
    @(posedge clk);
  endtask

  initial begin
    static logic [31:0] corners [8] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000,
                                 32'h7FFF_FFFF, 32'h0000_000C, 32'h5555_5555, 32'hDB6D_B6DB};
    for (int i = 0; i < 4; i++) ev[i] = 1'b0;
    foreach (code_seen[i]) code_seen[i] = 0;
    rst = 1'b1; in_valid = 1'b0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    // single operation, then a check of latency: output must appear 3 edges later
    drive(1'b1, 32'd12, 32'd12);
    drive(1'b0, 32'd0, 32'd0);
    drive(1'b0, 32'd0, 32'd0);
    #1;
    checks++;
    if (!(v_s && p_s == 64'd144)) begin
      failures++; $display("FAIL 12*12 not ready 3 edges after issue: v=%b p=%0d", v_s, p_s);
    end
    @(posedge clk);
    // corners back to back
    foreach (corners[i]) foreach (corners[j]) drive(1'b1, corners[i], corners[j]);
    // random stream with bubbles
    for (int i = 0; i < 4000; i++) begin
      drive(($urandom % 5) != 0, $urandom, $urandom);
    end
    // reset while operations are in flight
    drive(1'b1, $urandom, $urandom);
    drive(1'b1, $urandom, $urandom);
    rst <= 1'b1;
    drive(1'b0, 32'd0, 32'd0);
    rst <= 1'b0;
    drive(1'b0, 32'd0, 32'd0);
    for (int i = 0; i < 200; i++) drive(1'b1, $urandom, $urandom);
    repeat (5) drive(1'b0, 32'd0, 32'd0);

    // mechanism coverage
    for (int c = 0; c < 16; c++) begin
      checks++;
      if (code_seen[c] == 0) begin failures++; $display("FAIL Booth code %b never used", 4'(c)); end
    end
    checks += 4;
    if (n_fullrate == 0)    begin failures++; $display("FAIL no full-rate run"); end
    if (n_bubble == 0)      begin failures++; $display("FAIL no bubble"); end
    if (n_reset_flush == 0) begin failures++; $display("FAIL no reset flush"); end
    if (n_neg == 0)         begin failures++; $display("FAIL no negative product"); end
    $display("results=%0d fullrate_runs=%0d bubbles=%0d reset_flushes=%0d negative=%0d",
             n_results, n_fullrate, n_bubble, n_reset_flush, n_neg);
    for (int c = 0; c < 16; c++) $display("booth code %b used %0d times", 4'(c), code_seen[c]);
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

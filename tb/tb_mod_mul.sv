// tb_mod_mul: self-checking test of the modular multiplier.
//
// Multiplies random 255-bit operands and the corner cases 0, 1, p-1, p, p+1 and
// 2^255-1 and compares the product with (a * b) mod p computed here with wide
// arithmetic. Each product is checked for the 3 * 15 + 3 = 48-cycle latency. A
// second phase starts a new product whenever the unit is ready, so that stage 1
// and both halves of stage 2 work on three products at once, and checks every
// result in order and that results then come out every 16 cycles. A watchdog
// ends the run with a failure if results stop.
`timescale 1ns/1ps
module tb_mod_mul;
  import c25519_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, ready, done;
  fe_t  a = '0, b = '0, c;
  int   checks = 0, failures = 0;
  int   overlapped = 0;

  always #5 clk = ~clk;

  mod_mul dut (.clk, .rst_n, .start, .a, .b, .ready, .done, .c);

  function automatic fe_t rand_fe();
    fe_t r;
    for (int i = 0; i < 8; i++) r[i*32 +: 32] = $urandom;
    return r;
  endfunction

  function automatic fe_t ref_mul(input fe_t x, input fe_t y);
    logic [509:0] t;
    t = 510'(x) * 510'(y);
    return fe_t'(t % 510'(P_MOD));
  endfunction

  task automatic run(input fe_t x, input fe_t y);
    int cyc;
    @(negedge clk);
    while (!ready) @(negedge clk);
    a = x; b = y; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (c !== ref_mul(x, y)) begin
      failures++;
      $display("FAIL a=%h b=%h got %h exp %h", x, y, c, ref_mul(x, y));
    end
    checks++;
    if (cyc != 48) begin
      failures++;
      $display("FAIL latency %0d, expected 48", cyc);
    end
  endtask

  // Back-to-back phase: a queue of expected results, filled at start, drained at done.
  fe_t expq [$];
  bit  stream = 1'b0;
  int  cyc_now = 0, last_done = -1, max_gap = 0;
  always @(posedge clk) begin
    cyc_now++;
    if (stream && done) begin
      if (last_done >= 0 && cyc_now - last_done > max_gap) max_gap = cyc_now - last_done;
      last_done = cyc_now;
      checks++;
      if (expq.size() == 0 || c !== expq[0]) begin
        failures++;
        $display("FAIL streamed result %h exp %h left %0d", c, (expq.size() != 0) ? expq[0] : fe_t'(0), expq.size());
      end
      if (expq.size() != 0) void'(expq.pop_front());
    end
  end

  initial begin
    fe_t corner [6];
    fe_t x, y;
    corner[0] = '0; corner[1] = fe_t'(1); corner[2] = P_MOD - 1;
    corner[3] = P_MOD; corner[4] = P_MOD + 1; corner[5] = '1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (corner[i]) foreach (corner[j]) run(corner[i], corner[j]);
    repeat (300) run(rand_fe(), rand_fe());
    repeat (50) begin x = rand_fe(); run(x, x); end
    // streaming
    @(negedge clk);
    stream = 1'b1;
    repeat (40) begin
      @(negedge clk);
      while (!ready) @(negedge clk);
      x = rand_fe(); y = rand_fe();
      a = x; b = y; start = 1'b1;
      expq.push_back(ref_mul(x, y));
      @(negedge clk);
      start = 1'b0;
      if (dut.s2a_busy && dut.s2b_busy) overlapped++;
    end
    while (expq.size() != 0) @(negedge clk);
    checks++;
    if (overlapped == 0) begin
      failures++;
      $display("FAIL stages never overlapped");
    end
    // one result every NLIMB + 1 cycles when products are fed back to back
    checks++;
    if (max_gap != 16) begin
      failures++;
      $display("FAIL streamed results %0d cycles apart, expected 16", max_gap);
    end
    $display("streamed products with both stages busy: %0d, results every %0d cycles", overlapped, max_gap);
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

// tb_scalar_blinder: self-checking test of the scalar blinding unit.
//
// Computes k + r * #E here with wide arithmetic for random clamped scalars and
// random 24-bit r (plus r = 0 and r = 2^24 - 1) and compares with the unit,
// also checking the 18-cycle latency from start to done.
`timescale 1ns/1ps
module tb_scalar_blinder;
  import c25519_pkg::*;

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0, done;
  logic [255:0] k = '0;
  logic [23:0]  r = '0;
  logic [279:0] kb;
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  scalar_blinder dut (.clk, .rst_n, .start, .k, .r, .done, .kb);

  task automatic run(input logic [255:0] kk, input logic [23:0] rr);
    int cyc;
    logic [279:0] exp;
    exp = 280'(kk) + 280'(rr) * 280'(GROUP_ORDER);
    @(negedge clk);
    k = kk; r = rr; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (kb !== exp) begin
      failures++;
      $display("FAIL k=%h r=%h got %h exp %h", kk, rr, kb, exp);
    end
    checks++;
    if (cyc != 18) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  function automatic logic [255:0] rand_k();
    logic [255:0] x;
    for (int i = 0; i < 8; i++) x[i*32 +: 32] = $urandom;
    x[2:0] = 3'b000; x[255] = 1'b0; x[254] = 1'b1;
    return x;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(rand_k(), 24'd0);
    run(rand_k(), 24'hffffff);
    run({1'b0, {255{1'b1}}}, 24'hffffff);
    repeat (300) run(rand_k(), 24'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

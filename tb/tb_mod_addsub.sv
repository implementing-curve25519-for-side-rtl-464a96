// tb_mod_addsub: self-checking test of the modular adder/subtractor.
//
// Drives random reduced operands plus the corner cases 0, 1, p-1 and p-2 in both
// modes and compares the result with (a +/- b) mod p computed here with wide
// arithmetic. It also checks the fixed latency of NDIGITS + 1 = 9 cycles from
// start to done. A watchdog ends the run with a failure if done never comes.
`timescale 1ns/1ps
module tb_mod_addsub;
  import c25519_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, op = 1'b0, ready, done;
  fe_t  a = '0, b = '0, c;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  mod_addsub dut (.clk, .rst_n, .start, .op, .a, .b, .ready, .done, .c);

  function automatic fe_t rand_fe();
    logic [255:0] r;
    for (int i = 0; i < 8; i++) r[i*32 +: 32] = $urandom;
    return fe_t'(r % 256'(P_MOD));
  endfunction

  function automatic fe_t ref_op(input logic sub, input fe_t x, input fe_t y);
    logic [256:0] t;
    if (sub) t = {2'b00, x} + {2'b00, P_MOD} - {2'b00, y};
    else     t = {2'b00, x} + {2'b00, y};
    return fe_t'(t % 257'(P_MOD));
  endfunction

  task automatic run(input logic sub, input fe_t x, input fe_t y);
    int cyc = 0;
    @(negedge clk);
    while (!ready) @(negedge clk);
    a = x; b = y; op = sub; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (c !== ref_op(sub, x, y)) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h got %h exp %h", sub, x, y, c, ref_op(sub, x, y));
    end
    checks++;
    if (cyc != 9) begin
      failures++;
      $display("FAIL latency %0d, expected 9", cyc);
    end
  endtask

  initial begin
    fe_t corner [4];
    corner[0] = '0; corner[1] = fe_t'(1); corner[2] = P_MOD - 1; corner[3] = P_MOD - 2;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (corner[i]) foreach (corner[j]) begin
      run(1'b0, corner[i], corner[j]);
      run(1'b1, corner[i], corner[j]);
    end
    repeat (400) begin
      run(1'b0, rand_fe(), rand_fe());
      run(1'b1, rand_fe(), rand_fe());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

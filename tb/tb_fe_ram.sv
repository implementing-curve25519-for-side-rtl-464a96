// tb_fe_ram: self-checking test of the dual-port field-element memory.
//
// Writes random words through both ports, reads them back through the other
// port and checks the one-cycle read latency, the read-before-write behaviour of
// a port that reads and writes one address in the same cycle, and random mixed
// traffic against a model array kept here.
`timescale 1ns/1ps
module tb_fe_ram;
  import c25519_pkg::*;

  logic  clk = 1'b0;
  addr_t addr_a = '0, addr_b = '0;
  logic  we_a = 1'b0, we_b = 1'b0;
  fe_t   wdata_a = '0, wdata_b = '0, rdata_a, rdata_b;
  fe_t   model [64];
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  fe_ram dut (.clk, .addr_a, .we_a, .wdata_a, .rdata_a, .addr_b, .we_b, .wdata_b, .rdata_b);

  function automatic fe_t rand_fe();
    fe_t r;
    for (int i = 0; i < 8; i++) r[i*32 +: 32] = $urandom;
    return r;
  endfunction

  task automatic check(input fe_t got, input fe_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    // Fill: even addresses through port A, odd through port B.
    for (int i = 0; i < 64; i += 2) begin
      @(negedge clk);
      model[i] = rand_fe(); model[i+1] = rand_fe();
      addr_a = addr_t'(i); we_a = 1'b1; wdata_a = model[i];
      addr_b = addr_t'(i+1); we_b = 1'b1; wdata_b = model[i+1];
    end
    @(negedge clk);
    we_a = 1'b0; we_b = 1'b0;
    // Cross read: A reads odd, B reads even; data appears one cycle later.
    for (int i = 0; i < 64; i += 2) begin
      addr_a = addr_t'(i+1); addr_b = addr_t'(i);
      @(negedge clk);
      check(rdata_a, model[i+1], "port A read");
      check(rdata_b, model[i],   "port B read");
    end
    // Read during write on the same port returns the old word.
    addr_a = 6'd5; we_a = 1'b1; wdata_a = ~model[5];
    @(negedge clk);
    we_a = 1'b0;
    check(rdata_a, model[5], "read-before-write");
    model[5] = ~model[5];
    @(negedge clk);
    check(rdata_a, model[5], "new word");
    // Random traffic.
    repeat (2000) begin
      addr_t xa, xb;
      xa = addr_t'($urandom); xb = addr_t'($urandom);
      addr_a = xa; addr_b = xb;
      we_a = $urandom_range(0, 1); we_b = (xa != xb) && $urandom_range(0, 1);
      wdata_a = rand_fe(); wdata_b = rand_fe();
      @(negedge clk);
      check(rdata_a, model[xa], "random A");
      check(rdata_b, model[xb], "random B");
      if (we_a) model[xa] = wdata_a;
      if (we_b) model[xb] = wdata_b;
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

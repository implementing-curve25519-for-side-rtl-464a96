// tb_addr_scrambler: self-checking test of the memory-address scrambler.
//
// For a series of random seeds it checks the 22-cycle initialisation, that the
// address mapping is a permutation of all 64 addresses on both ports, that the
// mask follows an LFSR model kept here, and that the mask changes from run to
// run (the point of the countermeasure).
`timescale 1ns/1ps
module tb_addr_scrambler;
  import c25519_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  logic [5:0]  seed = '0, mask;
  addr_t       log_a = '0, log_b = '0, phys_a, phys_b;
  int          checks = 0, failures = 0, changes = 0;
  logic [5:0]  model = 6'd1, prev_mask;

  always #5 clk = ~clk;

  addr_scrambler dut (.clk, .rst_n, .start, .seed, .busy, .done, .mask,
                      .log_a, .log_b, .phys_a, .phys_b);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    prev_mask = mask;
    for (int run = 0; run < 40; run++) begin
      int cyc;
      bit [63:0] seen_a, seen_b;
      seed = 6'($urandom);
      model = model ^ seed;
      if (model == 0) model = 6'd1;
      repeat (21) model = {model[4:0], model[5] ^ model[4]};
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      check(cyc == 22, $sformatf("init latency %0d", cyc));
      check(mask == model, $sformatf("mask %h model %h", mask, model));
      if (mask != prev_mask) changes++;
      prev_mask = mask;
      seen_a = '0; seen_b = '0;
      for (int i = 0; i < 64; i++) begin
        log_a = addr_t'(i); log_b = addr_t'(63 - i);
        #1;
        seen_a[phys_a] = 1'b1; seen_b[phys_b] = 1'b1;
      end
      check(&seen_a && &seen_b, "mapping is a permutation");
      repeat ($urandom_range(0, 5)) @(negedge clk);
    end
    check(changes > 30, $sformatf("mask changed only %0d times", changes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

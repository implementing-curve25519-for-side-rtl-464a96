// tb_arith_ctrl: self-checking test of the arithmetic controller.
//
// The controller runs here against the real multiplier, adder/subtractor and
// memory (without address scrambling). The testbench preloads the memory, then
//  - runs the coordinate-randomization program and checks R1 = (lambda*x1 : lambda),
//  - runs 24 ladder steps with random scalar bits and after each one compares
//    R0 and R1 with the reference ladder, and checks that a step takes the same
//    number of cycles for bit 0 and bit 1, at most 254, and starts 10 products
//    and 8 sums,
//  - runs the inversion program and checks X * Z^(p-2), the count of 266
//    products (254 squarings, 11 multiplications, 1 final product) and its
//    cycle count.
`timescale 1ns/1ps
module tb_arith_ctrl;
  import c25519_pkg::*;
  import x25519_ref_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  start = 1'b0, bit_i = 1'b0, busy, done;
  prog_e prog = PRG_INIT;

  addr_t c_addr_a, c_addr_b, addr_a, addr_b;
  logic  c_we_a, c_we_b, we_a, we_b;
  fe_t   c_wdata_a, c_wdata_b, wdata_a, wdata_b, rdata_a, rdata_b;
  logic  mul_start, mul_done, mul_ready, add_start, add_done, add_op, add_ready;
  fe_t   mul_a, mul_b, mul_c, add_a, add_b, add_c;

  // testbench access to memory port A while the controller is idle
  logic  tb_own = 1'b1, tb_we = 1'b0;
  addr_t tb_addr = '0;
  fe_t   tb_wdata = '0;

  int checks = 0, failures = 0;
  int n_mul = 0, n_add = 0;

  always #5 clk = ~clk;

  arith_ctrl dut (.clk, .rst_n, .start, .prog, .bit_i, .busy, .done,
    .addr_a(c_addr_a), .we_a(c_we_a), .wdata_a(c_wdata_a), .rdata_a,
    .addr_b(c_addr_b), .we_b(c_we_b), .wdata_b(c_wdata_b), .rdata_b,
    .mul_start, .mul_a, .mul_b, .mul_ready, .mul_done, .mul_c,
    .add_start, .add_op, .add_a, .add_b, .add_ready, .add_done, .add_c);

  mod_mul    u_mul (.clk, .rst_n, .start(mul_start), .a(mul_a), .b(mul_b),
                    .ready(mul_ready), .done(mul_done), .c(mul_c));
  mod_addsub u_add (.clk, .rst_n, .start(add_start), .op(add_op), .a(add_a), .b(add_b),
                    .ready(add_ready), .done(add_done), .c(add_c));

  assign addr_a  = tb_own ? tb_addr  : c_addr_a;
  assign we_a    = tb_own ? tb_we    : c_we_a;
  assign wdata_a = tb_own ? tb_wdata : c_wdata_a;
  assign addr_b  = c_addr_b;
  assign we_b    = tb_own ? 1'b0 : c_we_b;
  assign wdata_b = c_wdata_b;

  fe_ram u_ram (.clk, .addr_a, .we_a, .wdata_a, .rdata_a, .addr_b, .we_b, .wdata_b, .rdata_b);

  always @(posedge clk) begin
    if (mul_start) n_mul++;
    if (add_start) n_add++;
  end

  function automatic fe_t rand_fe();
    fe_t r;
    for (int i = 0; i < 8; i++) r[i*32 +: 32] = $urandom;
    return r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input addr_t ad, input fe_t v);
    @(negedge clk);
    tb_addr = ad; tb_we = 1'b1; tb_wdata = v;
    @(negedge clk);
    tb_we = 1'b0;
  endtask

  task automatic run(input prog_e p, input logic b, output int cycles);
    @(negedge clk);
    tb_own = 1'b0;
    prog = p; bit_i = b; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    tb_own = 1'b1;
  endtask

  initial begin
    fe_t u, lam;
    ladder_t q;
    int cyc, cyc0, cyc1, m0, a0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    u   = rand_fe() % P_MOD;
    lam = rand_fe();
    wr(AD_R0X, fe_t'(1)); wr(AD_R0Z, '0); wr(AD_X1, u); wr(AD_A24, A24);
    wr(AD_LAM, lam); wr(AD_ZER, '0);
    run(PRG_INIT, 1'b0, cyc);
    q.x2 = fe_t'(1); q.z2 = '0; q.x3 = fmul(u, lam); q.z3 = fe_t'(lam % P_MOD);
    check(u_ram.mem[AD_R1X] == q.x3, "init R1X");
    check(u_ram.mem[AD_R1Z] == q.z3, "init R1Z");
    for (int i = 0; i < 24; i++) begin
      logic b;
      b = (i == 0) ? 1'b1 : (i == 1) ? 1'b0 : 1'($urandom);
      m0 = n_mul; a0 = n_add;
      run(PRG_LADDER, b, cyc);
      q = step(q, u, b);
      check(n_mul - m0 == 10 && n_add - a0 == 8,
            $sformatf("ladder step unit calls %0d/%0d", n_mul - m0, n_add - a0));
      if (b) cyc1 = cyc; else cyc0 = cyc;
      check(u_ram.mem[AD_R0X] == q.x2 && u_ram.mem[AD_R0Z] == q.z2 &&
            u_ram.mem[AD_R1X] == q.x3 && u_ram.mem[AD_R1Z] == q.z3,
            $sformatf("ladder step %0d bit %0d", i, b));
    end
    check(cyc0 == cyc1 && cyc0 > 0, $sformatf("step cycles bit0 %0d bit1 %0d", cyc0, cyc1));
    check(cyc0 <= 254, $sformatf("ladder step within 254 cycles (%0d)", cyc0));
    $display("ladder step: %0d cycles", cyc0);
    m0 = n_mul;
    run(PRG_INVERT, 1'b0, cyc);
    $display("inversion: %0d cycles, %0d products", cyc, n_mul - m0);
    check(n_mul - m0 == 266, $sformatf("inversion products %0d", n_mul - m0));
    check(u_ram.mem[AD_OUT] == fmul(q.x2, finv(q.z2)), "inversion result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

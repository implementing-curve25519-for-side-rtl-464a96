// tb_curve25519_core: end-to-end test of the X25519 core at its default size.
//
// Runs complete scalar multiplications through the command/response interface
// and checks each result against the reference model and, where they apply,
// against the published RFC 7748 test vectors (Alice's and Bob's key pairs and
// their shared secret). Every run gets fresh random r, lambda and seed. The test
// also checks that:
//  - a RUN takes the same number of cycles for every key and random input,
//  - the same key and point with other random inputs give the same result
//    while the blinded scalar, the address mask and the starting Z of R1 differ,
//  - a run with r = 0 (no blinding) gives the same result in the same time,
//  - an unknown command is answered with RSP_ERROR,
//  - a response is held while rsp_ready is low.
// It counts how often each mechanism occurred (ladder steps with bit 0 and with
// bit 1, blinded scalars differing from the clamped key, address masks in use,
// randomized R1, cycles with multiplier and adder busy together, inversions,
// error responses, response back-pressure) and fails any that never did.
`timescale 1ns/1ps
module tb_curve25519_core;
  import c25519_pkg::*;
  import x25519_ref_pkg::*;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         cmd_valid = 1'b0, cmd_ready;
  cmd_e         cmd_op = CMD_LOAD_K;
  logic [255:0] cmd_data = '0;
  logic         rsp_valid, rsp_ready = 1'b0;
  rsp_e         rsp_op;
  fe_t          rsp_data;
  logic [23:0]  rnd_r = '0;
  fe_t          rnd_lambda = '0;
  logic [5:0]   rnd_seed = '0;
  logic         busy;

  int checks = 0, failures = 0;
  int n_bit0 = 0, n_bit1 = 0, n_blinded = 0, n_masked = 0, n_randz = 0;
  int n_parallel = 0, n_inv = 0, n_err = 0, n_backpressure = 0, n_unblinded = 0;
  bit no_blind = 1'b0;
  int run_cycles = -1;

  always #5 clk = ~clk;

  curve25519_core dut (.clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_op, .cmd_data,
                       .rsp_valid, .rsp_ready, .rsp_op, .rsp_data,
                       .rnd_r, .rnd_lambda, .rnd_seed, .busy);

  // Blinded scalar, address mask and R1's Z, captured as the first ladder step starts.
  logic [279:0] cap_kb;
  logic [5:0]   cap_mask;
  fe_t          cap_r1z;
  always @(posedge clk) begin
    if (dut.ac_start && dut.ac_prog == PRG_LADDER && dut.u_core.idx == 9'd279) begin
      cap_kb   = dut.u_core.kb_q;
      cap_mask = dut.sc_mask;
      cap_r1z  = dut.u_ram.mem[AD_R1Z ^ dut.sc_mask];
    end
  end

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (dut.ac_start && dut.ac_prog == PRG_LADDER) begin
      if (dut.ac_bit) n_bit1++; else n_bit0++;
    end
    if (dut.ac_start && dut.ac_prog == PRG_INVERT) n_inv++;
    if (dut.u_mul.s1_busy && !dut.u_add.ready) n_parallel++;
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

  // One command; the response is taken after a random delay.
  task automatic command(input cmd_e op, input logic [255:0] data,
                         output rsp_e rop, output fe_t rdata, output int cycles);
    int wait_cyc;
    @(negedge clk);
    cmd_op = op; cmd_data = data; cmd_valid = 1'b1;
    while (!cmd_ready) @(negedge clk);
    @(negedge clk);
    cmd_valid = 1'b0;
    cycles = 1;
    while (!rsp_valid) begin @(negedge clk); cycles++; end
    wait_cyc = $urandom_range(0, 3);
    if (wait_cyc > 0) n_backpressure++;
    repeat (wait_cyc) begin
      fe_t held;
      held = rsp_data;
      @(negedge clk);
      check(rsp_valid && rsp_data == held, "response held under back-pressure");
    end
    rop = rsp_op; rdata = rsp_data;
    rsp_ready = 1'b1;
    @(negedge clk);
    rsp_ready = 1'b0;
  endtask

  // Full scalar multiplication; returns the result and the blinded scalar used.
  task automatic scalarmult_dut(input logic [255:0] k, input logic [255:0] u,
                                output fe_t res, output logic [279:0] kb,
                                output logic [5:0] mask, output fe_t r1z);
    rsp_e op; fe_t d; int cyc;
    command(CMD_LOAD_K, k, op, d, cyc);
    check(op == RSP_ACK, "LOAD_K acknowledged");
    command(CMD_LOAD_U, u, op, d, cyc);
    check(op == RSP_ACK, "LOAD_U acknowledged");
    rnd_r = no_blind ? 24'd0 : (24'($urandom) | 24'd1);
    rnd_lambda = rand_fe();
    rnd_seed = 6'($urandom);
    command(CMD_RUN, '0, op, res, cyc);
    kb = cap_kb; mask = cap_mask; r1z = cap_r1z;
    check(op == RSP_RESULT, "RUN answered with a result");
    check(kb == 280'(clamp(k)) + 280'(rnd_r) * 280'(GROUP_ORDER), "blinded scalar");
    if (kb != 280'(clamp(k))) n_blinded++; else n_unblinded++;
    if (mask != 0) n_masked++;
    if (r1z != fe_t'(1)) n_randz++;
    check(r1z == fe_t'(rnd_lambda % P_MOD), "R1 starts at Z = lambda");
    if (run_cycles < 0) run_cycles = cyc;
    check(cyc == run_cycles, $sformatf("RUN took %0d cycles, first run %0d", cyc, run_cycles));
    $display("RUN: %0d cycles, mask %h, r %h", cyc, mask, rnd_r);
  endtask

  initial begin
    logic [255:0] ka, kbob, k9, pa_exp, pb_exp, ss_exp, k_rand;
    fe_t res, res2, pa, pb, r1z_a, r1z_b;
    logic [279:0] kb1, kb2;
    logic [5:0] m1, m2;
    rsp_e op; fe_t d; int cyc;

    ka     = le_bytes(256'h77076d0a7318a57d3c16c17251b26645df4c2f87ebc0992ab177fba51db92c2a);
    pa_exp = le_bytes(256'h8520f0098930a754748b7ddcb43ef75a0dbf3a0d26381af4eba4a98eaa9b4e6a);
    kbob   = le_bytes(256'h5dab087e624a8a4b79e17f8b83800ee66f3bb1292618b6fd1c2f8b27ff88e0eb);
    pb_exp = le_bytes(256'hde9edb7d7b7dc1b4d35b61c2ece435373f8343c85b78674dadfc7e146f882b4f);
    ss_exp = le_bytes(256'h4a5d9d5ba4ce2de1728e3bf480350f25e07e21c947d19e3376f09b3c1e161742);
    k9 = 256'd9;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // unknown command
    command(cmd_e'(2'd3), '0, op, d, cyc);
    check(op == RSP_ERROR, "unknown command answered with an error");
    if (op == RSP_ERROR) n_err++;

    // reference model against the RFC vectors
    check(x25519(ka, k9) == fe_t'(pa_exp), "reference model: Alice's public key");

    // Alice's public key, twice with different random inputs
    scalarmult_dut(ka, k9, pa, kb1, m1, r1z_a);
    check(pa == fe_t'(pa_exp), $sformatf("Alice's public key %h", pa));
    scalarmult_dut(ka, k9, res2, kb2, m2, r1z_b);
    check(res2 == pa, "same key and point, other randomness: same result");
    check(kb1 != kb2 && r1z_a != r1z_b, "blinded scalar and R1 differ between runs");
    // Bob's public key and the shared secret from both sides
    scalarmult_dut(kbob, k9, pb, kb1, m1, r1z_a);
    check(pb == fe_t'(pb_exp), $sformatf("Bob's public key %h", pb));
    scalarmult_dut(ka, 256'(pb), res, kb1, m1, r1z_a);
    check(res == fe_t'(ss_exp), $sformatf("shared secret (Alice) %h", res));
    scalarmult_dut(kbob, 256'(pa), res2, kb1, m1, r1z_a);
    check(res2 == fe_t'(ss_exp), "shared secret (Bob)");
    // random key on a point of the curve, against the reference model
    k_rand = {rand_fe(), 1'b0};
    scalarmult_dut(k_rand, 256'(pa), res, kb1, m1, r1z_a);
    check(res == x25519(k_rand, 256'(pa)), "random key against the reference model");
    // the same key without blinding (r = 0): same result, same run time
    no_blind = 1'b1;
    scalarmult_dut(k_rand, 256'(pa), res2, kb1, m1, r1z_a);
    no_blind = 1'b0;
    check(res2 == res, "unblinded run (r = 0) gives the same result");

    check(n_bit0 > 0,         "ladder steps with bit 0 seen");
    check(n_bit1 > 0,         "ladder steps with bit 1 seen");
    check(n_blinded > 0,      "blinded scalars seen");
    check(n_masked > 0,       "non-zero address masks seen");
    check(n_randz > 0,        "randomized R1 seen");
    check(n_parallel > 0,     "multiplier and adder busy together");
    check(n_unblinded == 1,   "one unblinded run");
    check(n_inv == 7,         "one inversion per run");
    check(n_err > 0,          "error response seen");
    check(n_backpressure > 0, "response back-pressure seen");
    $display("mechanisms: bit0 %0d bit1 %0d blinded %0d masked %0d randomZ %0d parallel %0d inversions %0d errors %0d backpressure %0d",
             n_bit0, n_bit1, n_blinded, n_masked, n_randz, n_parallel, n_inv, n_err, n_backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

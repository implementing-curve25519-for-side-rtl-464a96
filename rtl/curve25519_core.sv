// curve25519_core: side-channel-protected X25519 scalar multiplication core.
//
// Computes the Curve25519 Diffie-Hellman function x(k * P) over
// p = 2^255 - 19 with the x-only Montgomery ladder, in three layers:
//   field     mod_mul (15 x 17-bit limbs, pipelined) and mod_addsub
//             (8 x 34-bit digits), both reading and writing the dual-port
//             field-element memory fe_ram;
//   group     arith_ctrl runs the ladder step, the Fermat inversion and the
//             coordinate randomization as microcode, issuing operations in
//             order so that the multiplier pipeline and the adder overlap;
//   scalar    core_ctrl handles commands and calls one ladder step per scalar
//             bit and the inversion at the end.
// Three countermeasures against differential power analysis sit on top of the
// constant-time ladder: scalar_blinder replaces k by k + r * #E (24-bit r),
// arith_ctrl starts R1 at (lambda * x : lambda) for a random lambda, and
// addr_scrambler XORs a fresh LFSR-derived mask onto every memory address.
//
// Interface: the command/response ports of core_ctrl (see there) and the random
// inputs, which come from an external true random number generator and are
// sampled when a RUN command is accepted.
// Timing at the defaults: one RUN takes 81,784 cycles whatever the key and the
// random inputs (280 ladder steps of 244 cycles plus 2 cycles to call each, an
// inversion of 12,816 cycles and 88 cycles of set-up and read-out).
//
// The partitioning into these units, their wiring and the countermeasures
// follow the design description; the issue rules and the operation order are
// this design's own.
module curve25519_core
  import c25519_pkg::*;
#(
  parameter int unsigned R_W      = 24,
  parameter int unsigned SCALAR_W = 256 + R_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cmd_valid,
  output logic               cmd_ready,
  input  cmd_e               cmd_op,
  input  logic [255:0]       cmd_data,
  output logic               rsp_valid,
  input  logic               rsp_ready,
  output rsp_e               rsp_op,
  output fe_t                rsp_data,
  input  logic [R_W-1:0]     rnd_r,
  input  fe_t                rnd_lambda,
  input  logic [ADDR_W-1:0]  rnd_seed,
  output logic               busy
);

  // core controller <-> helpers
  logic                bl_start, bl_done;
  logic [255:0]        bl_k;
  logic [R_W-1:0]      bl_r;
  logic [SCALAR_W-1:0] bl_kb;
  logic                sc_start, sc_done, sc_busy;
  logic [ADDR_W-1:0]   sc_seed, sc_mask;
  logic                ac_start, ac_bit, ac_done, ac_busy;
  prog_e               ac_prog;
  logic                cc_own, cc_we;
  addr_t               cc_addr;
  fe_t                 cc_wdata;

  // arithmetic controller <-> units and memory
  addr_t ac_addr_a, ac_addr_b;
  logic  ac_we_a, ac_we_b;
  fe_t   ac_wdata_a, ac_wdata_b;
  logic  mul_start, mul_ready, mul_done;
  fe_t   mul_a, mul_b, mul_c;
  logic  add_start, add_op, add_ready, add_done;
  fe_t   add_a, add_b, add_c;

  // memory
  addr_t log_a, phys_a, phys_b;
  logic  we_a;
  fe_t   wdata_a, rdata_a, rdata_b;

  core_ctrl #(.R_W(R_W), .SCALAR_W(SCALAR_W)) u_core (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd_op, .cmd_data,
    .rsp_valid, .rsp_ready, .rsp_op, .rsp_data,
    .rnd_r, .rnd_lambda, .rnd_seed, .busy,
    .bl_start, .bl_k, .bl_r, .bl_done, .bl_kb,
    .sc_start, .sc_seed, .sc_done,
    .ac_start, .ac_prog, .ac_bit, .ac_done,
    .mem_own(cc_own), .mem_addr(cc_addr), .mem_we(cc_we), .mem_wdata(cc_wdata),
    .mem_rdata(rdata_a)
  );

  scalar_blinder #(.R_W(R_W), .SCALAR_W(SCALAR_W)) u_blind (
    .clk, .rst_n, .start(bl_start), .k(bl_k), .r(bl_r), .done(bl_done), .kb(bl_kb)
  );

  addr_scrambler u_scr (
    .clk, .rst_n, .start(sc_start), .seed(sc_seed), .busy(sc_busy), .done(sc_done),
    .mask(sc_mask), .log_a, .log_b(ac_addr_b), .phys_a, .phys_b
  );

  arith_ctrl u_arith (
    .clk, .rst_n, .start(ac_start), .prog(ac_prog), .bit_i(ac_bit),
    .busy(ac_busy), .done(ac_done),
    .addr_a(ac_addr_a), .we_a(ac_we_a), .wdata_a(ac_wdata_a), .rdata_a,
    .addr_b(ac_addr_b), .we_b(ac_we_b), .wdata_b(ac_wdata_b), .rdata_b,
    .mul_start, .mul_a, .mul_b, .mul_ready, .mul_done, .mul_c,
    .add_start, .add_op, .add_a, .add_b, .add_ready, .add_done, .add_c
  );

  mod_mul u_mul (
    .clk, .rst_n, .start(mul_start), .a(mul_a), .b(mul_b),
    .ready(mul_ready), .done(mul_done), .c(mul_c)
  );

  mod_addsub u_add (
    .clk, .rst_n, .start(add_start), .op(add_op), .a(add_a), .b(add_b),
    .ready(add_ready), .done(add_done), .c(add_c)
  );

  // Port A belongs to the core controller while it loads or reads back,
  // otherwise to the arithmetic controller; port B always to the latter.
  assign log_a   = cc_own ? cc_addr  : ac_addr_a;
  assign we_a    = cc_own ? cc_we    : ac_we_a;
  assign wdata_a = cc_own ? cc_wdata : ac_wdata_a;

  fe_ram u_ram (
    .clk,
    .addr_a(phys_a), .we_a, .wdata_a, .rdata_a,
    .addr_b(phys_b), .we_b(ac_we_b), .wdata_b(ac_wdata_b), .rdata_b
  );

  // The two owners of port A never overlap, and the units are only started idle.
  a_port_a_owner: assert property (@(posedge clk) disable iff (!rst_n) !(cc_own && ac_busy))
    else $error("curve25519_core: port A claimed twice");
  a_mul_idle: assert property (@(posedge clk) disable iff (!rst_n) mul_start |-> mul_ready)
    else $error("curve25519_core: multiplier started busy");
  a_add_idle: assert property (@(posedge clk) disable iff (!rst_n) add_start |-> add_ready)
    else $error("curve25519_core: adder started busy");
  a_mask_stable: assert property (@(posedge clk) disable iff (!rst_n)
      ac_busy |-> (!sc_busy && $stable(sc_mask)))
    else $error("curve25519_core: address mask changed during a program");

endmodule

// tb_core_ctrl: self-checking test of the core controller on its own.
//
// The blinder, scrambler, arithmetic controller and memory are replaced by
// small models here that answer after random delays. The test checks the
// command/response protocol (acknowledgements, error code, one response per
// command), the clamping of the scalar, that the random inputs reach the
// blinder and scrambler, the six start values written to memory, the program
// order (one INIT, 280 ladder steps whose bits are the blinded scalar from the
// most significant bit down, one INVERT) and that the response carries the word
// the inversion left at the result address.
`timescale 1ns/1ps
module tb_core_ctrl;
  import c25519_pkg::*;

  localparam int SW = 280;

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
  logic         bl_start, bl_done = 1'b0;
  logic [255:0] bl_k;
  logic [23:0]  bl_r;
  logic [SW-1:0] bl_kb = '0;
  logic         sc_start, sc_done = 1'b0;
  logic [5:0]   sc_seed;
  logic         ac_start, ac_bit, ac_done = 1'b0;
  prog_e        ac_prog;
  logic         mem_own, mem_we;
  addr_t        mem_addr;
  fe_t          mem_wdata, mem_rdata = '0;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  core_ctrl dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic fe_t rand_fe();
    fe_t r;
    for (int i = 0; i < 8; i++) r[i*32 +: 32] = $urandom;
    return r;
  endfunction

  // ---- models of the blocks around the controller
  fe_t           mem [64];
  logic [SW-1:0] kb_model;
  fe_t           result_word;
  prog_e         progs [$];
  logic          bits  [$];
  int            n_writes = 0;

  always @(posedge clk) begin
    if (mem_own && mem_we) begin mem[mem_addr] <= mem_wdata; n_writes++; end
    if (mem_own) mem_rdata <= mem[mem_addr];
  end

  initial forever begin
    @(posedge clk);
    if (bl_start) begin
      repeat ($urandom_range(1, 20)) @(posedge clk);
      bl_kb <= kb_model; bl_done <= 1'b1;
      @(posedge clk);
      bl_done <= 1'b0;
    end
  end

  initial forever begin
    @(posedge clk);
    if (sc_start) begin
      repeat ($urandom_range(1, 20)) @(posedge clk);
      sc_done <= 1'b1;
      @(posedge clk);
      sc_done <= 1'b0;
    end
  end

  initial forever begin
    @(posedge clk);
    if (ac_start) begin
      progs.push_back(ac_prog);
      if (ac_prog == PRG_LADDER) bits.push_back(ac_bit);
      repeat ($urandom_range(1, 4)) @(posedge clk);
      if (ac_prog == PRG_INVERT) mem[AD_OUT] = result_word;
      ac_done <= 1'b1;
      @(posedge clk);
      ac_done <= 1'b0;
    end
  end

  task automatic command(input cmd_e op, input logic [255:0] data,
                         output rsp_e rop, output fe_t rdata);
    @(negedge clk);
    cmd_op = op; cmd_data = data; cmd_valid = 1'b1;
    while (!cmd_ready) @(negedge clk);
    @(negedge clk);
    cmd_valid = 1'b0;
    while (!rsp_valid) @(negedge clk);
    repeat ($urandom_range(0, 2)) @(negedge clk);
    rop = rsp_op; rdata = rsp_data;
    rsp_ready = 1'b1;
    @(negedge clk);
    rsp_ready = 1'b0;
    check(!rsp_valid, "one response per command");
  endtask

  initial begin
    rsp_e op; fe_t d;
    logic [255:0] k, u, kc;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    command(cmd_e'(2'd3), '0, op, d);
    check(op == RSP_ERROR, "unknown command gives RSP_ERROR");
    for (int run = 0; run < 3; run++) begin
      k = {rand_fe(), 1'($urandom)};
      u = {rand_fe(), 1'b1};
      kc = k; kc[2:0] = 3'b000; kc[255] = 1'b0; kc[254] = 1'b1;
      for (int i = 0; i < SW; i += 32) kb_model[i +: 32] = $urandom;
      kb_model[SW-1] = (run == 0);
      result_word = rand_fe();
      rnd_r = 24'($urandom); rnd_lambda = rand_fe(); rnd_seed = 6'($urandom);
      progs.delete(); bits.delete(); n_writes = 0;
      command(CMD_LOAD_K, k, op, d);
      check(op == RSP_ACK, "LOAD_K ack");
      command(CMD_LOAD_U, u, op, d);
      check(op == RSP_ACK, "LOAD_U ack");
      command(CMD_RUN, '0, op, d);
      check(op == RSP_RESULT, "RUN gives RSP_RESULT");
      check(d == result_word, "result read from the result address");
      check(bl_k == kc, "scalar clamped");
      check(bl_r == rnd_r && sc_seed == rnd_seed, "random inputs passed on");
      check(n_writes == 6, $sformatf("%0d start values written", n_writes));
      check(mem[AD_R0X] == fe_t'(1) && mem[AD_R0Z] == '0 && mem[AD_ZER] == '0,
            "R0 = (1:0) and constant 0");
      check(mem[AD_X1] == fe_t'(u) && mem[AD_A24] == A24 && mem[AD_LAM] == rnd_lambda,
            "x1, a24 and lambda written");
      check(progs.size() == SW + 2 && progs[0] == PRG_INIT && progs[SW+1] == PRG_INVERT,
            $sformatf("program sequence of %0d calls", progs.size()));
      begin
        int bad = 0;
        for (int i = 0; i < SW; i++) begin
          if (progs[i+1] != PRG_LADDER) bad++;
          if (bits[i] != kb_model[SW-1-i]) bad++;
        end
        check(bad == 0, $sformatf("ladder bits in order (%0d mismatches)", bad));
      end
    end
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

// core_ctrl: core controller of the Curve25519 scalar-multiplication engine.
//
// Talks to the outside world through a command/response protocol and runs one
// scalar multiplication x(k * P) per RUN command:
//   1. clamps k as X25519 does (bits 0..2 and 255 cleared, bit 254 set), starts
//      the scalar blinder (k' = k + r * #E) and re-seeds the address scrambler,
//      both with fresh random inputs, and waits for both;
//   2. writes the start values into memory: R0 = (1 : 0), the input x (top bit
//      ignored), the ladder constant, the random lambda and the constant 0;
//   3. calls the arithmetic controller's randomization program, which sets
//      R1 = (lambda * x : lambda);
//   4. calls one ladder step per bit of k', most significant first, SCALAR_W in
//      all, whatever the value of the bits;
//   5. calls the inversion program and reads the affine result back from memory.
//
// Commands (cmd_valid/cmd_ready handshake, cmd_op/cmd_data):
//   CMD_LOAD_K  store the 256-bit scalar (answered with RSP_ACK)
//   CMD_LOAD_U  store the x coordinate of the point (answered with RSP_ACK)
//   CMD_RUN     run; answered with RSP_RESULT and x(kP) in rsp_data
// Any other code is answered with RSP_ERROR. Each command gets exactly one
// response (rsp_valid/rsp_ready); no new command is taken while a response waits.
// The random inputs rnd_r, rnd_lambda and rnd_seed are sampled when CMD_RUN is
// accepted; they must come from a true random source.
//
// Calling the ladder and the inversion and the command/response style follow
// the design description; the command set, the encodings and the memory
// loading sequence are this design's own.
module core_ctrl
  import c25519_pkg::*;
#(
  parameter int unsigned R_W      = 24,
  parameter int unsigned SCALAR_W = 256 + R_W
) (
  input  logic                clk,
  input  logic                rst_n,
  // command / response
  input  logic                cmd_valid,
  output logic                cmd_ready,
  input  cmd_e                cmd_op,
  input  logic [255:0]        cmd_data,
  output logic                rsp_valid,
  input  logic                rsp_ready,
  output rsp_e                rsp_op,
  output fe_t                 rsp_data,
  // randomness
  input  logic [R_W-1:0]      rnd_r,
  input  fe_t                 rnd_lambda,
  input  logic [ADDR_W-1:0]   rnd_seed,
  output logic                busy,
  // scalar blinder
  output logic                bl_start,
  output logic [255:0]        bl_k,
  output logic [R_W-1:0]      bl_r,
  input  logic                bl_done,
  input  logic [SCALAR_W-1:0] bl_kb,
  // address scrambler
  output logic                sc_start,
  output logic [ADDR_W-1:0]   sc_seed,
  input  logic                sc_done,
  // arithmetic controller
  output logic                ac_start,
  output prog_e               ac_prog,
  output logic                ac_bit,
  input  logic                ac_done,
  // memory port used while the arithmetic controller is idle (logical address)
  output logic                mem_own,
  output addr_t               mem_addr,
  output logic                mem_we,
  output fe_t                 mem_wdata,
  input  fe_t                 mem_rdata
);

  typedef enum logic [3:0] {
    S_IDLE, S_PREP, S_LOAD, S_INIT, S_LADDER, S_LADDER_W, S_INV, S_INV_W,
    S_READ, S_READ_W, S_RESP
  } state_e;

  state_e                        st;
  logic [255:0]                  k_q;
  fe_t                           u_q;
  fe_t                           lam_q;
  logic [SCALAR_W-1:0]           kb_q;
  logic [$clog2(SCALAR_W)-1:0]   idx;
  logic [2:0]                    ld_cnt;
  logic                          bl_ok, sc_ok;

  function automatic logic [255:0] clamp(input logic [255:0] k);
    logic [255:0] c;
    c = k;
    c[2:0] = 3'b000;
    c[255] = 1'b0;
    c[254] = 1'b1;
    return c;
  endfunction

  assign cmd_ready = (st == S_IDLE) && !rsp_valid;
  assign busy      = (st != S_IDLE);
  assign mem_own   = (st == S_LOAD) || (st == S_READ) || (st == S_READ_W);
  assign ac_bit    = kb_q[idx];

  // Start values written in S_LOAD, one per cycle.
  always_comb begin
    mem_we    = (st == S_LOAD);
    mem_addr  = AD_OUT;
    mem_wdata = '0;
    if (st == S_LOAD) begin
      unique case (ld_cnt)
        3'd0:    begin mem_addr = AD_R0X; mem_wdata = fe_t'(1); end
        3'd1:    begin mem_addr = AD_R0Z; mem_wdata = '0;       end
        3'd2:    begin mem_addr = AD_X1;  mem_wdata = u_q;      end
        3'd3:    begin mem_addr = AD_A24; mem_wdata = A24;      end
        3'd4:    begin mem_addr = AD_LAM; mem_wdata = lam_q;    end
        default: begin mem_addr = AD_ZER; mem_wdata = '0;       end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      k_q       <= '0;
      u_q       <= '0;
      lam_q     <= '0;
      kb_q      <= '0;
      idx       <= '0;
      ld_cnt    <= '0;
      bl_ok     <= 1'b0;
      sc_ok     <= 1'b0;
      rsp_valid <= 1'b0;
      rsp_op    <= RSP_ACK;
      rsp_data  <= '0;
      bl_start  <= 1'b0;
      bl_k      <= '0;
      bl_r      <= '0;
      sc_start  <= 1'b0;
      sc_seed   <= '0;
      ac_start  <= 1'b0;
      ac_prog   <= PRG_INIT;
    end else begin
      bl_start <= 1'b0;
      sc_start <= 1'b0;
      ac_start <= 1'b0;
      if (rsp_valid && rsp_ready) rsp_valid <= 1'b0;

      unique case (st)
        S_IDLE: begin
          if (cmd_valid && cmd_ready) begin
            unique case (cmd_op)
              CMD_LOAD_K: begin
                k_q <= cmd_data;
                rsp_valid <= 1'b1; rsp_op <= RSP_ACK; rsp_data <= '0;
              end
              CMD_LOAD_U: begin
                u_q <= fe_t'(cmd_data);          // bit 255 is ignored
                rsp_valid <= 1'b1; rsp_op <= RSP_ACK; rsp_data <= '0;
              end
              CMD_RUN: begin
                bl_k     <= clamp(k_q);
                bl_r     <= rnd_r;
                bl_start <= 1'b1;
                sc_seed  <= rnd_seed;
                sc_start <= 1'b1;
                lam_q    <= rnd_lambda;
                bl_ok    <= 1'b0;
                sc_ok    <= 1'b0;
                st       <= S_PREP;
              end
              default: begin
                rsp_valid <= 1'b1; rsp_op <= RSP_ERROR; rsp_data <= '0;
              end
            endcase
          end
        end
        S_PREP: begin
          if (bl_done) begin bl_ok <= 1'b1; kb_q <= bl_kb; end
          if (sc_done) sc_ok <= 1'b1;
          if ((bl_ok || bl_done) && (sc_ok || sc_done)) begin
            ld_cnt <= '0;
            st     <= S_LOAD;
          end
        end
        S_LOAD: begin
          ld_cnt <= ld_cnt + 1'b1;
          if (ld_cnt == 3'd5) begin
            ac_prog  <= PRG_INIT;
            ac_start <= 1'b1;
            st       <= S_INIT;
          end
        end
        S_INIT: begin
          if (ac_done) begin
            idx <= ($clog2(SCALAR_W))'(SCALAR_W - 1);
            st  <= S_LADDER;
          end
        end
        S_LADDER: begin
          ac_prog  <= PRG_LADDER;
          ac_start <= 1'b1;
          st       <= S_LADDER_W;
        end
        S_LADDER_W: begin
          if (ac_done) begin
            if (idx == 0) begin
              st <= S_INV;
            end else begin
              idx <= idx - 1'b1;
              st  <= S_LADDER;
            end
          end
        end
        S_INV: begin
          ac_prog  <= PRG_INVERT;
          ac_start <= 1'b1;
          st       <= S_INV_W;
        end
        S_INV_W: if (ac_done) st <= S_READ;
        S_READ:   st <= S_READ_W;                // memory read of the result
        S_READ_W: st <= S_RESP;
        S_RESP: begin
          rsp_valid <= 1'b1;
          rsp_op    <= RSP_RESULT;
          rsp_data  <= mem_rdata;
          st        <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // A response stays offered, unchanged, until it is taken.
  a_rsp_hold: assert property (@(posedge clk) disable iff (!rst_n)
      rsp_valid && !rsp_ready |=> rsp_valid && $stable(rsp_data) && $stable(rsp_op))
    else $error("core_ctrl: response withdrawn or changed before it was taken");

endmodule

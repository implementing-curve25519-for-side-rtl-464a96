// arith_ctrl: arithmetic controller of the Curve25519 core.
//
// Runs three small microcode programs over the modular multiplier, the modular
// adder/subtractor and the dual-port block memory:
//   PRG_INIT    randomized projective coordinates: R1 = (lambda * x1 : lambda),
//   PRG_LADDER  one Montgomery ladder step (x-only, projective X:Z),
//   PRG_INVERT  x = X * Z^(p-2), the affine conversion by Fermat's little
//               theorem (254 squarings and 11 multiplications, then one more
//               multiplication by X).
// A program is a list of operations, each one multiplication or one
// addition/subtraction. They issue in program order, at most one every two
// cycles, as soon as
//   - the unit can take it (the multiplier holds up to three products in its
//     pipeline stages, the adder one operation),
//   - no operation in flight still has to write one of its operands or its
//     destination (one scoreboard bit per memory word), and
//   - no result is being written back this cycle (write-back uses the ports).
// Issuing reads both operands on the two memory ports; the unit starts in the
// next cycle with the read data. Results are written back in the cycle the
// unit reports done: multiplier results through port A, adder results through
// port B. The operation order interleaves products and sums so that the two
// units and the multiplier's pipeline stages work at the same time. Hazards
// depend only on the program, so the schedule is the same for every key and
// every data value. A multiplication can repeat in place (dst = dst^2) for the
// inversion's long squaring runs; nothing else issues meanwhile.
//
// The scalar bit decides which ladder point is doubled. Instead of swapping
// data, the ladder program names the doubled point (X2,Z2) and the other point
// (X3,Z3) at addresses 0..3 and this controller flips address bit 1 when the bit
// is 1, so R0 and R1 trade roles. The same operations run for either bit value.
//
// Interface: pulse start with prog and bit_i while busy is low; done pulses
// when the program's last result is written. Memory addresses leave here as
// logical addresses (the address scrambler sits between this block and the
// memory). The data paths need no registers here: write data are the units'
// results and the units' operands are the memory's read data, so those outputs
// are wired straight to inputs (or, for the multiplier, through one mux).
// Timing at the default sizes, start to done: ladder step 244 cycles,
// inversion 12,816, randomization about 52; the same for every key and data.
//
// The ladder formulas, the use of Fermat's little theorem with 265
// multiplications/squarings, the parallel operation of the two units, the
// pipelined use of the multiplier, the address selection by the scalar bit and
// the extra multiplication for the randomized coordinates follow the design
// description. The microcode format, the issue rules, the operation order and
// the memory map are this design's own.
module arith_ctrl
  import c25519_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // command
  input  logic  start,
  input  prog_e prog,
  input  logic  bit_i,     // current scalar bit (PRG_LADDER)
  output logic  busy,
  output logic  done,
  // memory, logical addresses
  output addr_t addr_a,
  output logic  we_a,
  output fe_t   wdata_a,
  input  fe_t   rdata_a,
  output addr_t addr_b,
  output logic  we_b,
  output fe_t   wdata_b,
  input  fe_t   rdata_b,
  // multiplier
  output logic  mul_start,
  output fe_t   mul_a,
  output fe_t   mul_b,
  input  logic  mul_ready,
  input  logic  mul_done,
  input  fe_t   mul_c,
  // adder/subtractor
  output logic  add_start,
  output logic  add_op,
  output fe_t   add_a,
  output fe_t   add_b,
  input  logic  add_ready,
  input  logic  add_done,
  input  fe_t   add_c
);

  // ------------------------------------------------------------ microcode
  function automatic ucode_t mul(input addr_t d, input addr_t a, input addr_t b,
                                 input logic [6:0] rep, input logic last);
    ucode_t u;
    u.is_mul = 1'b1; u.sub = 1'b0; u.a = a; u.b = b; u.d = d; u.rep = rep; u.last = last;
    return u;
  endfunction

  function automatic ucode_t add(input addr_t d, input addr_t a, input addr_t b,
                                 input logic sub, input logic last);
    ucode_t u;
    u.is_mul = 1'b0; u.sub = sub; u.a = a; u.b = b; u.d = d; u.rep = '0; u.last = last;
    return u;
  endfunction

  localparam addr_t T0  = AD_T0,         T1  = AD_T0 + 6'd1,  T2  = AD_T0 + 6'd2;
  localparam addr_t T3  = AD_T0 + 6'd3,  T4  = AD_T0 + 6'd4,  T5  = AD_T0 + 6'd5;
  localparam addr_t T6  = AD_T0 + 6'd6,  T7  = AD_T0 + 6'd7,  T8  = AD_T0 + 6'd8;
  localparam addr_t T9  = AD_T0 + 6'd9,  T10 = AD_T0 + 6'd10, T11 = AD_T0 + 6'd11;
  localparam addr_t T12 = AD_T0 + 6'd12, T13 = AD_T0 + 6'd13;

  // Ladder step (RFC 7748 naming):
  //   A = X2+Z2, AA = A^2, B = X2-Z2, BB = B^2, E = AA-BB, C = X3+Z3, D = X3-Z3,
  //   DA = D*A, CB = C*B, X3 = (DA+CB)^2, Z3 = x1*(DA-CB)^2,
  //   X2 = AA*BB, Z2 = E*(AA + 121665*E)
  function automatic ucode_t ladder_rom(input logic [4:0] pc);
    unique case (pc)
      5'd0:  return add(T0,    AD_X2, AD_Z2, 1'b0, 1'b0);         // A
      5'd1:  return mul(T2,    T0,    T0,    7'd0, 1'b0);         // AA
      5'd2:  return add(T1,    AD_X2, AD_Z2, 1'b1, 1'b0);         // B
      5'd3:  return mul(T4,    T1,    T1,    7'd0, 1'b0);         // BB
      5'd4:  return add(T5,    AD_X3, AD_Z3, 1'b1, 1'b0);         // D
      5'd5:  return mul(T8,    T5,    T0,    7'd0, 1'b0);         // DA
      5'd6:  return add(T3,    AD_X3, AD_Z3, 1'b0, 1'b0);         // C
      5'd7:  return mul(T6,    T3,    T1,    7'd0, 1'b0);         // CB
      5'd8:  return add(T7,    T2,    T4,    1'b1, 1'b0);         // E = AA - BB
      5'd9:  return mul(AD_X2, T2,    T4,    7'd0, 1'b0);         // X2 = AA * BB
      5'd10: return mul(T11,   T7,    AD_A24, 7'd0, 1'b0);        // a24 * E
      5'd11: return add(T9,    T8,    T6,    1'b0, 1'b0);         // DA + CB
      5'd12: return add(T10,   T8,    T6,    1'b1, 1'b0);         // DA - CB
      5'd13: return mul(AD_X3, T9,    T9,    7'd0, 1'b0);         // X3
      5'd14: return mul(T13,   T10,   T10,   7'd0, 1'b0);         // (DA - CB)^2
      5'd15: return add(T12,   T2,    T11,   1'b0, 1'b0);         // AA + a24 * E
      5'd16: return mul(AD_Z2, T7,    T12,   7'd0, 1'b0);         // Z2
      default: return mul(AD_Z3, AD_X1, T13, 7'd0, 1'b1);         // Z3
    endcase
  endfunction

  // Inversion z^(p-2) = z^(2^255-21) by the usual addition chain, then times X.
  function automatic ucode_t invert_rom(input logic [4:0] pc);
    unique case (pc)
      5'd0:  return mul(T0,  AD_R0Z, AD_R0Z, 7'd0,  1'b0);   // z^2
      5'd1:  return mul(T1,  T0,  T0,  7'd1,  1'b0);         // z^8
      5'd2:  return mul(T2,  T1,  AD_R0Z, 7'd0, 1'b0);       // z^9
      5'd3:  return mul(T3,  T2,  T0,  7'd0,  1'b0);         // z^11
      5'd4:  return mul(T4,  T3,  T3,  7'd0,  1'b0);         // z^22
      5'd5:  return mul(T5,  T4,  T2,  7'd0,  1'b0);         // 2^5-1
      5'd6:  return mul(T6,  T5,  T5,  7'd4,  1'b0);         // 2^10-2^5
      5'd7:  return mul(T7,  T6,  T5,  7'd0,  1'b0);         // 2^10-1
      5'd8:  return mul(T6,  T7,  T7,  7'd9,  1'b0);         // 2^20-2^10
      5'd9:  return mul(T8,  T6,  T7,  7'd0,  1'b0);         // 2^20-1
      5'd10: return mul(T6,  T8,  T8,  7'd19, 1'b0);         // 2^40-2^20
      5'd11: return mul(T6,  T6,  T8,  7'd0,  1'b0);         // 2^40-1
      5'd12: return mul(T6,  T6,  T6,  7'd9,  1'b0);         // 2^50-2^10
      5'd13: return mul(T9,  T6,  T7,  7'd0,  1'b0);         // 2^50-1
      5'd14: return mul(T6,  T9,  T9,  7'd49, 1'b0);         // 2^100-2^50
      5'd15: return mul(T10, T6,  T9,  7'd0,  1'b0);         // 2^100-1
      5'd16: return mul(T6,  T10, T10, 7'd99, 1'b0);         // 2^200-2^100
      5'd17: return mul(T6,  T6,  T10, 7'd0,  1'b0);         // 2^200-1
      5'd18: return mul(T6,  T6,  T6,  7'd49, 1'b0);         // 2^250-2^50
      5'd19: return mul(T6,  T6,  T9,  7'd0,  1'b0);         // 2^250-1
      5'd20: return mul(T6,  T6,  T6,  7'd4,  1'b0);         // 2^255-2^5
      5'd21: return mul(T11, T6,  T3,  7'd0,  1'b0);         // 2^255-21
      default: return mul(AD_OUT, AD_R0X, T11, 7'd0, 1'b1);  // X / Z
    endcase
  endfunction

  // Randomized projective coordinates: R1 = (x1 * lambda : lambda mod p).
  // Adding 0 reduces lambda; it runs on the adder next to the product.
  function automatic ucode_t init_rom(input logic [4:0] pc);
    if (pc == 5'd0) return mul(AD_R1X, AD_X1, AD_LAM, 7'd0, 1'b0);
    return add(AD_R1Z, AD_LAM, AD_ZER, 1'b0, 1'b1);
  endfunction

  // ------------------------------------------------------------ sequencer
  localparam int unsigned MQ = 4;   // multiplier destination queue depth

  typedef enum logic [1:0] {ST_IDLE, ST_RUN, ST_DRAIN} st_e;
  st_e         st;
  prog_e       prog_q;
  logic        bit_q;
  logic [4:0]  pc;
  ucode_t      cur;                 // operation at pc
  addr_t       ca, cb, cd;          // its addresses after the R0/R1 mapping
  logic [63:0] pend;                // word is the destination of an operation in flight
  logic        rd_pend;             // operands read last cycle: start the unit now
  logic        rd_is_mul, rd_sub;
  addr_t       mq [MQ];             // destinations of products in flight, oldest first
  logic [2:0]  mq_cnt;
  addr_t       add_dst;
  logic        rep_act;             // an in-place squaring run is in flight
  logic [6:0]  rep_left;
  logic        can_issue, unit_ok, restart, mul_fin;

  // Ladder-relative coordinates 0..3 swap R0/R1 when the scalar bit is 1.
  function automatic addr_t map(input prog_e p, input logic bt, input addr_t a);
    if (p == PRG_LADDER && a < 6'd4) return a ^ {4'b0, bt, 1'b0};
    return a;
  endfunction

  always_comb begin
    unique case (prog_q)
      PRG_LADDER: cur = ladder_rom(pc);
      PRG_INVERT: cur = invert_rom(pc);
      default:    cur = init_rom(pc);
    endcase
    ca = map(prog_q, bit_q, cur.a);
    cb = map(prog_q, bit_q, cur.b);
    cd = map(prog_q, bit_q, cur.d);
    unit_ok   = cur.is_mul ? (mul_ready && mq_cnt < 3'(MQ)) : add_ready;
    can_issue = (st == ST_RUN) && !rd_pend && !rep_act && !mul_done && !add_done &&
                unit_ok && !pend[ca] && !pend[cb] && !pend[cd];
    // The squaring run is the youngest product (nothing issues behind it), so
    // it is the one finishing when the queue holds a single entry.
    restart   = mul_done && rep_act && (mq_cnt == 3'd1) && (rep_left != 0);
    mul_fin   = mul_done && !restart;
  end

  // Unit starts: operands straight from the memory, or the product for a
  // repeated squaring.
  assign mul_start = (rd_pend && rd_is_mul) || restart;
  assign mul_a     = restart ? mul_c : rdata_a;
  assign mul_b     = restart ? mul_c : rdata_b;
  assign add_start = rd_pend && !rd_is_mul;
  assign add_op    = rd_sub;
  assign add_a     = rdata_a;
  assign add_b     = rdata_b;

  // Memory ports: operand reads when issuing, results when a unit finishes.
  assign addr_a  = can_issue ? ca : mq[0];
  assign addr_b  = can_issue ? cb : add_dst;
  assign we_a    = mul_done;
  assign we_b    = add_done;
  assign wdata_a = mul_c;
  assign wdata_b = add_c;

  assign busy = (st != ST_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= ST_IDLE;
      prog_q    <= PRG_INIT;
      bit_q     <= 1'b0;
      pc        <= '0;
      pend      <= '0;
      rd_pend   <= 1'b0;
      rd_is_mul <= 1'b0;
      rd_sub    <= 1'b0;
      for (int i = 0; i < MQ; i++) mq[i] <= '0;
      mq_cnt    <= '0;
      add_dst   <= '0;
      rep_act   <= 1'b0;
      rep_left  <= '0;
      done      <= 1'b0;
    end else begin
      done    <= 1'b0;
      rd_pend <= 1'b0;

      // write-back: release the scoreboard
      if (mul_fin) begin
        pend[mq[0]] <= 1'b0;
        for (int i = 0; i < MQ - 1; i++) mq[i] <= mq[i+1];
        if (mq_cnt == 3'd1) rep_act <= 1'b0;
      end
      if (restart) rep_left <= rep_left - 1'b1;
      if (add_done) pend[add_dst] <= 1'b0;

      // issue (never in a write-back cycle, so the queue does not shift then)
      if (can_issue) begin
        rd_pend   <= 1'b1;
        rd_is_mul <= cur.is_mul;
        rd_sub    <= cur.sub;
        pend[cd]  <= 1'b1;
        if (cur.is_mul) begin
          mq[mq_cnt[1:0]] <= cd;
          rep_act  <= (cur.rep != 0);
          rep_left <= cur.rep;
        end else begin
          add_dst <= cd;
        end
        if (cur.last) st <= ST_DRAIN;
        else          pc <= pc + 1'b1;
      end
      mq_cnt <= mq_cnt + ((can_issue && cur.is_mul) ? 3'd1 : 3'd0) - (mul_fin ? 3'd1 : 3'd0);

      unique case (st)
        ST_IDLE: begin
          if (start) begin
            prog_q <= prog;
            bit_q  <= bit_i;
            pc     <= '0;
            st     <= ST_RUN;
          end
        end
        ST_RUN: ;
        ST_DRAIN: begin
          if (!rd_pend && mq_cnt == 0 && pend == '0) begin
            st   <= ST_IDLE;
            done <= 1'b1;
          end
        end
        default: st <= ST_IDLE;
      endcase
    end
  end

  a_mul_ready: assert property (@(posedge clk) disable iff (!rst_n) mul_start |-> mul_ready)
    else $error("arith_ctrl: multiplier started while not ready");
  a_add_ready: assert property (@(posedge clk) disable iff (!rst_n) add_start |-> add_ready)
    else $error("arith_ctrl: adder started while not ready");
  a_queue_bound: assert property (@(posedge clk) disable iff (!rst_n) mq_cnt <= 3'(MQ))
    else $error("arith_ctrl: product queue overflow");

endmodule

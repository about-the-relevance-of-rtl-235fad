// dwt_sched_pkg -- cstep schedule of the Discrete Wavelet Transform data-flow
// graph on one multispeculative adder (ADD) and two multispeculative
// multipliers (M0, M1).
//
// The graph has 17 operations (products x1 x3 x5 x6 x9 x10 x13 x14 and sums
// +2 +4 +7 +8 +11 +12 +15 +16 +17) grouped into six additive trees:
//   T1 = {x1,+2,x3,+4} -> R0    T2 = {x5,+7} -> R1    T3 = {x6,+8} -> R2
//   T4 = {x9,+11}      -> R3    T5 = {x10,+12} -> R4
//   T6 = {x13,x14,+15,+16,+17} -> R5 (R6 holds +16 until +17)
// Each tree owns one register, in which its running sum accumulates with its
// carries still pending. Each tree ends with a recovery addition (4' 7' 8'
// 11' 12' 17') that adds the pending carries back in.
//
// The schedule has 19 fixed csteps plus three csteps that hold nothing but a
// recovery addition (7', 11', 17'). The controller skips one of those when
// the root of its tree hit, so a run takes 19 to 22 cycles, plus one more
// cycle for each recovery addition that itself misses. The recovery
// additions 4', 8' and 12' sit in csteps where multiplications are in flight
// anyway (csteps 6, 8 and 12), so they cost no time when they are enough.
//
// The unit counts, latencies (3 cycles per product, 1 per addition), the tree
// grouping, the 19..22 cycle range and the recovery slots in csteps 6, 8 and
// 12 follow the published multispeculation scheme; the exact placement of each operation, the
// operands that come from outside (in0..in9, coefficients c0..c7) and the
// register binding are this design's own.
package dwt_sched_pkg;

  localparam int unsigned NSTEP = 22;  // 19 fixed + 3 skippable csteps
  localparam int unsigned NREG  = 7;   // R0..R6
  localparam int unsigned NROOT = 6;   // R0..R5 hold the tree results
  localparam int unsigned NIN   = 10;  // input samples in0..in9
  localparam int unsigned NCOEF = 8;   // coefficients c0..c7
  localparam int unsigned FIXED_STEPS = 19;

  typedef enum logic [1:0] {
    ADD_NONE = 2'd0,   // adder idle
    ADD_OP   = 2'd1,   // original addition of a tree
    ADD_REC  = 2'd2    // recovery addition: reg.s + reg.d, carry-in reg.c
  } add_kind_e;

  typedef enum logic [1:0] {
    SRC_IN  = 2'd0,    // input sample in[idx] (plain value)
    SRC_REG = 2'd1,    // register R[idx] (sum with pending carries)
    SRC_M0  = 2'd2,    // product held by multiplier 0 (with carries)
    SRC_M1  = 2'd3     // product held by multiplier 1 (with carries)
  } src_e;

  typedef struct packed {
    add_kind_e   add;
    src_e        a_src;     // adder operand A: its carries enter as carry-in
    logic [3:0]  a_idx;
    src_e        b_src;     // adder operand B: its carries are deferred
    logic [3:0]  b_idx;
    logic [2:0]  dst;       // register written by the adder (also ADD_REC target)
    logic        root;      // this addition is the root of its tree
    logic        skippable; // cstep holds only a recovery addition
    logic        m0_go;
    src_e        m0_src;    // SRC_IN or SRC_REG
    logic [3:0]  m0_idx;
    logic [2:0]  m0_coef;
    logic        m1_go;
    src_e        m1_src;
    logic [3:0]  m1_idx;
    logic [2:0]  m1_coef;
  } step_t;

  localparam step_t NOP = '{ADD_NONE, SRC_IN, 4'd0, SRC_IN, 4'd0, 3'd0, 1'b0, 1'b0,
                            1'b0, SRC_IN, 4'd0, 3'd0, 1'b0, SRC_IN, 4'd0, 3'd0};

  // schedule ROM
  function automatic step_t sched(input logic [4:0] pc);
    step_t s;
    s = NOP;
    case (pc)
      // cstep 1: x1 = in0*c0 on M0, x3 = in2*c1 on M1
      5'd0: begin
        s.m0_go = 1'b1; s.m0_src = SRC_IN; s.m0_idx = 4'd0; s.m0_coef = 3'd0;
        s.m1_go = 1'b1; s.m1_src = SRC_IN; s.m1_idx = 4'd2; s.m1_coef = 3'd1;
      end
      // csteps 2, 3: products in flight
      5'd1, 5'd2: ;
      // cstep 4: +2 = x1 + in1 -> R0 ; x6 = in4*c3 on M0
      5'd3: begin
        s.add = ADD_OP; s.a_src = SRC_M0; s.b_src = SRC_IN; s.b_idx = 4'd1; s.dst = 3'd0;
        s.m0_go = 1'b1; s.m0_src = SRC_IN; s.m0_idx = 4'd4; s.m0_coef = 3'd3;
      end
      // cstep 5: +4 = R0 + x3 -> R0 (root of T1)
      5'd4: begin
        s.add = ADD_OP; s.a_src = SRC_REG; s.a_idx = 4'd0; s.b_src = SRC_M1; s.dst = 3'd0;
        s.root = 1'b1;
      end
      // cstep 6: 4' in a recovery slot (x6 in flight)
      5'd5: begin
        s.add = ADD_REC; s.a_src = SRC_REG; s.a_idx = 4'd0; s.dst = 3'd0;
      end
      // cstep 7: +8 = x6 + in5 -> R2 (root of T3); x5 = R0*c2 on M0; x10 = in6*c4 on M1
      5'd6: begin
        s.add = ADD_OP; s.a_src = SRC_M0; s.b_src = SRC_IN; s.b_idx = 4'd5; s.dst = 3'd2;
        s.root = 1'b1;
        s.m0_go = 1'b1; s.m0_src = SRC_REG; s.m0_idx = 4'd0; s.m0_coef = 3'd2;
        s.m1_go = 1'b1; s.m1_src = SRC_IN;  s.m1_idx = 4'd6; s.m1_coef = 3'd4;
      end
      // cstep 8: 8' in a recovery slot (x5, x10 in flight)
      5'd7: begin
        s.add = ADD_REC; s.a_src = SRC_REG; s.a_idx = 4'd2; s.dst = 3'd2;
      end
      // cstep 9: products in flight
      5'd8: ;
      // cstep 10: +7 = x5 + in3 -> R1 (root of T2)
      5'd9: begin
        s.add = ADD_OP; s.a_src = SRC_M0; s.b_src = SRC_IN; s.b_idx = 4'd3; s.dst = 3'd1;
        s.root = 1'b1;
      end
      // skippable cstep: 7'
      5'd10: begin
        s.add = ADD_REC; s.a_src = SRC_REG; s.a_idx = 4'd1; s.dst = 3'd1; s.skippable = 1'b1;
      end
      // cstep 11: +12 = x10 + in7 -> R4 (root of T5); x9 = R1*c5 on M0; x14 = in8*c7 on M1
      5'd11: begin
        s.add = ADD_OP; s.a_src = SRC_M1; s.b_src = SRC_IN; s.b_idx = 4'd7; s.dst = 3'd4;
        s.root = 1'b1;
        s.m0_go = 1'b1; s.m0_src = SRC_REG; s.m0_idx = 4'd1; s.m0_coef = 3'd5;
        s.m1_go = 1'b1; s.m1_src = SRC_IN;  s.m1_idx = 4'd8; s.m1_coef = 3'd7;
      end
      // cstep 12: 12' in a recovery slot (x9, x14 in flight)
      5'd12: begin
        s.add = ADD_REC; s.a_src = SRC_REG; s.a_idx = 4'd4; s.dst = 3'd4;
      end
      // cstep 13: products in flight
      5'd13: ;
      // cstep 14: +11 = x9 + R2 -> R3 (root of T4)
      5'd14: begin
        s.add = ADD_OP; s.a_src = SRC_M0; s.b_src = SRC_REG; s.b_idx = 4'd2; s.dst = 3'd3;
        s.root = 1'b1;
      end
      // skippable cstep: 11'
      5'd15: begin
        s.add = ADD_REC; s.a_src = SRC_REG; s.a_idx = 4'd3; s.dst = 3'd3; s.skippable = 1'b1;
      end
      // cstep 15: +16 = x14 + in9 -> R6 ; x13 = R3*c6 on M0
      5'd16: begin
        s.add = ADD_OP; s.a_src = SRC_M1; s.b_src = SRC_IN; s.b_idx = 4'd9; s.dst = 3'd6;
        s.m0_go = 1'b1; s.m0_src = SRC_REG; s.m0_idx = 4'd3; s.m0_coef = 3'd6;
      end
      // csteps 16, 17: product in flight
      5'd17, 5'd18: ;
      // cstep 18: +15 = x13 + R4 -> R5
      5'd19: begin
        s.add = ADD_OP; s.a_src = SRC_M0; s.b_src = SRC_REG; s.b_idx = 4'd4; s.dst = 3'd5;
      end
      // cstep 19: +17 = R5 + R6 -> R5 (root of T6; the carries of R6 are deferred)
      5'd20: begin
        s.add = ADD_OP; s.a_src = SRC_REG; s.a_idx = 4'd5; s.b_src = SRC_REG; s.b_idx = 4'd6;
        s.dst = 3'd5; s.root = 1'b1;
      end
      // skippable cstep: 17'
      5'd21: begin
        s.add = ADD_REC; s.a_src = SRC_REG; s.a_idx = 4'd5; s.dst = 3'd5; s.skippable = 1'b1;
      end
      default: ;
    endcase
    return s;
  endfunction

endpackage

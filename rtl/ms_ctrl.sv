// ms_ctrl -- cstep controller of the multispeculative DWT datapath.
//
// A program counter walks the schedule ROM of dwt_sched_pkg. In each cstep
// (state RUN) every unit does what the schedule says. The controller then
// decides the next state from the adder's hit signal:
//   * a recovery addition that missed (a carry came out of some fragment)
//     sends the controller to the correction state CORR, where only that
//     recovery addition is repeated on the updated register while both
//     multipliers are frozen (mul_en low); CORR repeats until it hits;
//   * the hit of a tree's root addition is recorded; a following cstep that
//     holds nothing but that tree's recovery addition is then skipped, at no
//     cycle cost;
//   * otherwise the next cstep follows.
// The hit -> next state / miss -> correction state rule and the skipping of
// recovery-only csteps follow the published multispeculation scheme; the state encoding, the
// zero-cycle skip by look-ahead and the statistics counters are this
// design's own.
//
// Interface: start (one cycle, in IDLE) begins a run; busy is high during
// every cstep of the run (RUN and CORR cycles) and done pulses for one cycle
// right after the last one, when all results sit in the registers. cycles
// then holds the number of busy cycles of that run, skipped the number of
// recovery-only csteps skipped and corrections the number of CORR cycles.
// Synchronous active-high reset.
module ms_ctrl
  import dwt_sched_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        add_hit,     // hit of the addition executed this cycle
  output step_t       step,        // current schedule entry
  output logic        add_we,      // adder result is written to step.dst
  output logic        mul_en,      // multiplier pipelines advance
  output logic        m0_go,
  output logic        m1_go,
  output logic        correcting,
  output logic        busy,
  output logic        done,
  output logic [7:0]  cycles,
  output logic [1:0]  skipped,
  output logic [7:0]  corrections
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_CORR} state_e;
  state_e     state;
  logic [4:0] pc;
  logic [NREG-1:0] hit_flag, hit_now;
  logic [7:0] cyc_cnt, corr_cnt;
  logic [1:0] skip_cnt;

  assign step       = sched(pc);
  assign busy       = (state != S_IDLE);
  assign correcting = (state == S_CORR);
  assign mul_en     = (state == S_RUN);
  assign m0_go      = (state == S_RUN) && step.m0_go;
  assign m1_go      = (state == S_RUN) && step.m1_go;
  assign add_we     = ((state == S_RUN) && (step.add != ADD_NONE)) || (state == S_CORR);

  // root hits known at the end of this cycle
  always_comb begin
    hit_now = hit_flag;
    if (state == S_RUN && step.add == ADD_OP && step.root) hit_now[step.dst] = add_hit;
  end

  // does the current cstep finish this cycle, and where does it go?
  logic       advance, last;
  logic [4:0] pc_next;
  logic       skip_next;
  step_t      nstep;
  always_comb begin
    advance = 1'b0;
    if (state == S_RUN)  advance = !(step.add == ADD_REC && !add_hit);
    if (state == S_CORR) advance = add_hit;
    nstep     = sched(pc + 5'd1);
    skip_next = nstep.skippable && hit_now[nstep.dst];
    pc_next   = skip_next ? pc + 5'd2 : pc + 5'd1;
    last      = (int'(pc_next) >= NSTEP);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE; pc <= '0; hit_flag <= '0; done <= 1'b0;
      cyc_cnt <= '0; corr_cnt <= '0; skip_cnt <= '0;
      cycles <= '0; skipped <= '0; corrections <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state <= S_RUN; pc <= '0; hit_flag <= '0;
          cyc_cnt <= '0; corr_cnt <= '0; skip_cnt <= '0;
        end
        default: begin
          cyc_cnt  <= cyc_cnt + 8'd1;
          hit_flag <= hit_now;
          if (state == S_CORR) corr_cnt <= corr_cnt + 8'd1;
          if (!advance) begin
            state <= S_CORR;
          end else if (last) begin
            state       <= S_IDLE;
            done        <= 1'b1;
            cycles      <= cyc_cnt + 8'd1;
            corrections <= corr_cnt + ((state == S_CORR) ? 8'd1 : 8'd0);
            skipped     <= skip_cnt + (skip_next ? 2'd1 : 2'd0);
          end else begin
            state <= S_RUN;
            pc    <= pc_next;
            if (skip_next) skip_cnt <= skip_cnt + 2'd1;
          end
        end
      endcase
    end
  end

  // a skipped cstep is never followed by another skippable one
  always_ff @(posedge clk) begin
    if (!rst && busy && advance && skip_next)
      assert (!sched(pc + 5'd2).skippable) else $error("ms_ctrl: two skippable csteps in a row");
  end
endmodule

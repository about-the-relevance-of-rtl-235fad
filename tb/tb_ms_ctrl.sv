// tb_ms_ctrl -- self-checking test of the cstep controller.
// The testbench plays the adder: it answers add_hit according to a plan
// (which tree roots hit, how many times each recovery addition misses) and
// checks against its own copy of the cstep sequence:
//   * the order of executed csteps (adder operation and target register);
//   * that a recovery-only cstep is skipped exactly when its root hit;
//   * that a missed recovery repeats in the correction state with the
//     multipliers frozen (mul_en low, no go) until it hits;
//   * the cycle, skip and correction counts, and the 19..22 cycle range;
//   * five starts on multiplier 0 and three on multiplier 1 per run.
module tb_ms_ctrl;
  import dwt_sched_pkg::*;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0, add_hit;
  step_t step;
  logic add_we, mul_en, m0_go, m1_go, correcting, busy, done;
  logic [7:0] cycles, corrections;
  logic [1:0] skipped;
  int checks = 0, failures = 0, cyc = 0;

  ms_ctrl dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the cstep sequence: adder kind (0 none, 1 op, 2 rec), register, root, skippable
  typedef struct { int kind; int dst; bit root; bit skp; } ent_t;
  ent_t prog [NSTEP];
  initial begin
    foreach (prog[i]) prog[i] = '{0, 0, 0, 0};
    prog[3]  = '{1, 0, 0, 0};  prog[4]  = '{1, 0, 1, 0};  prog[5]  = '{2, 0, 0, 0};
    prog[6]  = '{1, 2, 1, 0};  prog[7]  = '{2, 2, 0, 0};
    prog[9]  = '{1, 1, 1, 0};  prog[10] = '{2, 1, 0, 1};
    prog[11] = '{1, 4, 1, 0};  prog[12] = '{2, 4, 0, 0};
    prog[14] = '{1, 3, 1, 0};  prog[15] = '{2, 3, 0, 1};
    prog[16] = '{1, 6, 0, 0};  prog[19] = '{1, 5, 0, 0};
    prog[20] = '{1, 5, 1, 0};  prog[21] = '{2, 5, 0, 1};
  end

  // plan for one run
  bit root_hit [NREG];
  int rec_miss [NREG];
  int tries = 0;

  // the adder's answer
  always_comb begin
    add_hit = 1'b1;
    if (busy) begin
      if (step.add == ADD_OP && step.root) add_hit = root_hit[step.dst];
      if (step.add == ADD_REC || correcting) add_hit = (tries >= rec_miss[step.dst]);
    end
  end

  int seen_kind [$], seen_dst [$];
  int n_m0, n_m1, n_skip_total = 0, n_corr_total = 0, n_rec_total = 0;

  always @(posedge clk) begin
    if (busy) begin
      if (!correcting) begin
        seen_kind.push_back(int'(step.add));
        seen_dst.push_back(int'(step.dst));
      end
      if (correcting) begin
        checks++;
        if (mul_en || m0_go || m1_go || !add_we) begin failures++; $display("CORR: units not frozen"); end
      end
      if (m0_go) n_m0++;
      if (m1_go) n_m1++;
    end
  end

  // failed tries of the recovery addition in progress
  always @(posedge clk) begin
    if (busy && (step.add == ADD_REC || correcting) && !add_hit) tries <= tries + 1;
    else tries <= 0;
  end

  task automatic run(string tag);
    int exp_kind [$], exp_dst [$];
    int exp_cyc, exp_skip, exp_corr;
    exp_cyc = 0; exp_skip = 0; exp_corr = 0;
    for (int p = 0; p < NSTEP; p++) begin
      if (prog[p].skp && root_hit[prog[p].dst]) begin exp_skip++; continue; end
      exp_kind.push_back(prog[p].kind);
      exp_dst.push_back(prog[p].kind == 0 ? -1 : prog[p].dst);
      exp_cyc++;
      if (prog[p].kind == 2) begin exp_cyc += rec_miss[prog[p].dst]; exp_corr += rec_miss[prog[p].dst]; end
    end
    seen_kind.delete(); seen_dst.delete();
    n_m0 = 0; n_m1 = 0;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!done) @(negedge clk);
    checks++;
    if (seen_kind.size() != exp_kind.size()) begin
      failures++; $display("[%s] %0d csteps executed, expected %0d", tag, seen_kind.size(), exp_kind.size());
    end else begin
      foreach (exp_kind[i]) begin
        checks++;
        if (seen_kind[i] != exp_kind[i] || (exp_dst[i] >= 0 && seen_dst[i] != exp_dst[i])) begin
          failures++; $display("[%s] cstep %0d: %0d/R%0d, expected %0d/R%0d", tag, i,
                               seen_kind[i], seen_dst[i], exp_kind[i], exp_dst[i]);
        end
      end
    end
    checks++;
    if (int'(cycles) != exp_cyc || int'(skipped) != exp_skip || int'(corrections) != exp_corr) begin
      failures++; $display("[%s] cycles/skip/corr %0d/%0d/%0d expected %0d/%0d/%0d", tag,
                           cycles, skipped, corrections, exp_cyc, exp_skip, exp_corr);
    end
    checks++;
    if (int'(cycles) - int'(corrections) < 19 || int'(cycles) - int'(corrections) > 22) begin
      failures++; $display("[%s] outside 19..22", tag);
    end
    checks++;
    if (n_m0 != 5 || n_m1 != 3) begin failures++; $display("[%s] multiplier starts %0d/%0d", tag, n_m0, n_m1); end
    n_skip_total += exp_skip;
    n_corr_total += exp_corr;
    n_rec_total += 3 - exp_skip;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // every root hits, no recovery misses: 19 cycles
    foreach (root_hit[r]) begin root_hit[r] = 1'b1; rec_miss[r] = 0; end
    run("all_hit");
    checks++; if (cycles != 8'd19) begin failures++; $display("all_hit: %0d cycles", cycles); end
    // every root misses, recoveries hit: 22 cycles
    foreach (root_hit[r]) begin root_hit[r] = 1'b0; rec_miss[r] = 0; end
    run("all_miss");
    checks++; if (cycles != 8'd22) begin failures++; $display("all_miss: %0d cycles", cycles); end
    // every recovery misses once: 22 + 6
    foreach (root_hit[r]) begin root_hit[r] = 1'b0; rec_miss[r] = 1; end
    run("rec_miss");
    checks++; if (cycles != 8'd28) begin failures++; $display("rec_miss: %0d cycles", cycles); end
    for (int n = 0; n < 200; n++) begin
      foreach (root_hit[r]) begin
        root_hit[r] = 1'($urandom_range(0, 1));
        rec_miss[r] = ($urandom_range(0, 3) == 0) ? $urandom_range(1, 3) : 0;
      end
      run($sformatf("rand%0d", n));
    end
    checks++;
    if (n_skip_total == 0 || n_corr_total == 0 || n_rec_total == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

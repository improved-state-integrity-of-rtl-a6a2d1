// tb_mrv_characterizer: self-checking test of the MRV binary search.
//
// A die model answers each trial: the state is corrupted when the trial
// voltage is at or below the die's first failure voltage, except that up to
// four of the ten repetitions at one voltage give the opposite answer, as
// supply jitter would; the majority vote must hide this. Answers come back
// after a random delay. For the three reference dies (FFV 315, 285 and
// 250 mV, with IRV 400 mV, VSR 1 mV, RVM 54 mV: MRV 369, 339 and 304 mV) and
// for random dies and coarser resolutions, the result is compared with a
// search computed in the testbench, including the number of trials.
module tb_mrv_characterizer;
  logic clk = 0, rst_n = 0, start = 0;
  logic [10:0] irv, vsr, rvm, trial_mv, ffv, mrv;
  logic trial_req, trial_done = 0, trial_error = 0, busy, done;
  int checks = 0, failures = 0;
  int die_ffv, ntrials, rep, wrong, last_mv = -1;

  mrv_characterizer dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (die ffv %0d)", what, die_ffv); end
  endtask

  // die model
  initial forever begin
    @(posedge clk);
    if (trial_req && !trial_done) begin
      repeat ($urandom % 5) @(posedge clk);
      if (int'(trial_mv) != last_mv || rep == 10) begin
        last_mv = int'(trial_mv);
        rep     = 0;
        wrong   = $urandom % 5;          // 0..4 jittered answers in this step
      end
      trial_error <= (int'(trial_mv) <= die_ffv) ^ (rep < wrong);
      rep++;
      trial_done  <= 1'b1;
      ntrials++;
      @(posedge clk);
      trial_done  <= 1'b0;
    end
  end

  task automatic run(input int f, input int i_irv, input int i_vsr, input int i_rvm);
    int vc, vf, cur, exp_trials;
    die_ffv = f;
    irv = 11'(i_irv); vsr = 11'(i_vsr); rvm = 11'(i_rvm);
    // reference search
    vc = i_irv; vf = 0; cur = (vc + vf) / 2; exp_trials = 0;
    while (vc - vf > i_vsr) begin
      if (cur <= f) vf = cur; else vc = cur;
      cur = (vc + vf) / 2;
      exp_trials += 10;
    end
    ntrials = 0;
    last_mv = -1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    check(busy, "busy after start");
    wait (done);
    @(negedge clk);
    check(int'(ffv) == vf, "ffv");
    check(int'(mrv) == vf + i_rvm, "mrv");
    check(ntrials == exp_trials, "trial count");
    if (i_vsr == 1 && f < i_irv) check(int'(ffv) == f, "exact ffv at 1 mV");
    check(!busy, "idle after done");
  endtask

  initial begin
    irv = 0; vsr = 0; rvm = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(315, 400, 1, 54); check(mrv == 11'd369, "die 1 MRV 369");
    run(285, 400, 1, 54); check(mrv == 11'd339, "die 2 MRV 339");
    run(250, 400, 1, 54); check(mrv == 11'd304, "die 3 MRV 304");
    check(ntrials <= 90, "at most 9 steps of 10 trials from 400 mV at 1 mV");
    for (int t = 0; t < 30; t++) run(180 + int'($urandom % 200), 400, 1 + int'($urandom % 16), 54);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

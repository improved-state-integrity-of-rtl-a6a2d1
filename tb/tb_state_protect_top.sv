// tb_state_protect_top: end-to-end test of the parity-protected retention
// block at its full default size (64 scan chains x 128 flip-flops).
//
// Around the design sit two models. The supply model applies each requested
// setpoint after a 4-cycle ramp and acknowledges it. The die model has two
// weak flip-flops: the first loses its state when the supply is at or below
// the die's first failure voltage (FFV), the second at FFV - GAP; each flips
// once per low-voltage period. GAP = 0 gives a multi-bit-failure die.
//
// Sequence: scan shift; characterization of a die with FFV 285 mV (expect
// FFV 285, MRV 285 + 54 = 339 mV); random state written; sleep at MRV with no
// failure; the die's FFV drifts to 345 mV so one flip-flop fails in sleep,
// which must be detected, corrected at nominal supply, and MRV raised to 363;
// wake-up and full read-back; then a multi-bit die (both weak cells fail at
// 370 mV) whose error must be flagged uncorrectable and MRV raised to 387;
// finally both ring oscillators are run. Every mechanism is counted and one
// that never happens is a failure.
module tb_state_protect_top;
  import sp_pkg::*;
  localparam int ROWS = 64, COLS = 128;

  logic clk = 0, rst_n = 0;
  logic sleep_req = 0, wakeup_req = 0, char_start = 0, mrv_load = 0;
  mv_t  irv_mv = IRV_MV, vsr_mv = VSR_MV, rvm_mv = RVM_MV, mrv_load_val = '0;
  logic host_wr_en = 0;
  logic [5:0] host_wr_row = '0, host_rd_row = '0;
  logic [COLS-1:0] host_wr_data = '0, host_rd_data;
  logic scan_en = 0;
  logic [ROWS-1:0] scan_in = '0, scan_out;
  mv_t vdd_set_mv, mrv_mv, ffv_mv;
  logic vdd_req, vdd_ack = 0;
  logic ret_fail_en = 0;
  logic [5:0] ret_fail_row = '0;
  logic [6:0] ret_fail_col = '0;
  ctrl_state_e state;
  logic char_busy, char_done, err_irq, uncorrectable;
  logic [15:0] error_cnt, corrected_cnt;
  logic osc_en = 0;
  logic [1:0] osc_out;

  state_protect_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (state %0d, mrv %0d)", what, state, mrv_mv); end
  endtask

  // ---------------- supply model ----------------
  int v_supply = 1200;
  int n_supply = 0;
  // requests are sampled on the falling edge, away from the register updates
  initial forever begin
    @(negedge clk);
    if (vdd_req) begin
      automatic int target = int'(vdd_set_mv);
      repeat (4) @(posedge clk);
      v_supply = target;
      n_supply++;
      vdd_ack <= 1;
      @(posedge clk);
      vdd_ack <= 0;
    end
  end

  // ---------------- die model ----------------
  int die_ffv = 285, die_gap = 9;
  int weak_r[2] = '{17, 42}, weak_c[2] = '{100, 3};
  bit flipped[2] = '{0, 0};
  int n_flips = 0;
  always @(posedge clk) begin
    ret_fail_en <= 1'b0;
    if (v_supply >= 1200) flipped = '{0, 0};
    else begin
      for (int i = 0; i < 2; i++) begin
        if (!flipped[i] && !ret_fail_en && v_supply <= die_ffv - (i == 0 ? 0 : die_gap)) begin
          flipped[i]   = 1;
          ret_fail_en  <= 1'b1;
          ret_fail_row <= 6'(weak_r[i]);
          ret_fail_col <= 7'(weak_c[i]);
          n_flips++;
          break;
        end
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_trial_pass = 0, n_trial_fail = 0, n_sleep = 0, n_irq = 0, n_wake = 0;
  int n_iso = 0, n_scan = 0, n_osc0 = 0, n_osc1 = 0, n_char = 0, n_mrv_up = 0;
  ctrl_state_e prev_state = ST_ACTIVE;
  // sampled on the falling edge, half a cycle away from every register update
  always @(negedge clk) begin
    if (dut.trial_done) begin
      if (dut.trial_error) n_trial_fail++; else n_trial_pass++;
    end
    if (state == ST_SLEEP && prev_state != ST_SLEEP) n_sleep++;
    if (err_irq) n_irq++;
    if (state == ST_ACTIVE && prev_state == ST_WAKE) n_wake++;
    if (state == ST_MRV_UP) n_mrv_up++;
    if (state == ST_SLEEP) begin
      if (host_rd_data == '0 && scan_out == '0) n_iso++;
      else begin failures++; $display("FAIL outputs not isolated in sleep"); end
    end
    if (scan_en && state == ST_ACTIVE) n_scan++;
    if (char_done) n_char++;
    prev_state <= state;
  end
  always @(posedge osc_out[0]) n_osc0++;
  always @(posedge osc_out[1]) n_osc1++;

  // ---------------- helpers ----------------
  logic [COLS-1:0] pattern [ROWS];
  int osc0_base, osc1_base, char_flips;

  task automatic write_pattern();
    for (int n = 0; n < ROWS; n++) begin
      for (int w = 0; w < COLS / 32; w++) pattern[n][w*32 +: 32] = $urandom;
      @(negedge clk);
      host_wr_en = 1; host_wr_row = 6'(n); host_wr_data = pattern[n];
    end
    @(negedge clk) host_wr_en = 0;
  endtask

  task automatic read_compare(input int expect_diff, input string what);
    int d = 0;
    for (int n = 0; n < ROWS; n++) begin
      @(negedge clk) host_rd_row = 6'(n);
      #1 d += $countones(host_rd_data ^ pattern[n]);
    end
    check(d == expect_diff, what);
  endtask

  task automatic wait_for(input ctrl_state_e s, input int limit);
    int k = 0;
    while (state != s && k < limit) begin @(negedge clk); k++; end
    check(state == s, $sformatf("reach state %0d", s));
  endtask

  task automatic go_sleep();
    @(negedge clk) sleep_req = 1;
    @(negedge clk) sleep_req = 0;
    wait_for(ST_SLEEP, 100);
  endtask

  task automatic wake();
    @(negedge clk) wakeup_req = 1;
    @(negedge clk) wakeup_req = 0;
    wait_for(ST_ACTIVE, 100);
  endtask

  // ---------------- sequence ----------------
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(state == ST_ACTIVE && vdd_set_mv == NOMINAL_MV, "reset: active at nominal");

    // scan: shift the written state out through all 64 chains
    write_pattern();
    for (int k = 0; k < COLS; k++) begin
      @(negedge clk);
      scan_en = 1;
      for (int n = 0; n < ROWS; n++) scan_in[n] = pattern[n][k];   // shift the same data back in
      #1;
      for (int n = 0; n < ROWS; n++) check(scan_out[n] == pattern[n][COLS-1-k], "scan out order");
    end
    @(negedge clk) scan_en = 0;
    // after COLS shifts depth m holds what was shifted in at step COLS-1-m
    begin
      int bad = 0;
      for (int n = 0; n < ROWS; n++) begin
        @(negedge clk) host_rd_row = 6'(n);
        #1;
        for (int m = 0; m < COLS; m++) if (host_rd_data[m] != pattern[n][COLS-1-m]) bad++;
      end
      check(bad == 0, "scan shift-in");
    end

    // characterization: FFV 285 mV die, second failure 9 mV lower
    die_ffv = 285; die_gap = 9;
    @(negedge clk) char_start = 1;
    @(negedge clk) char_start = 0;
    while (!char_done) @(negedge clk);
    @(negedge clk);
    check(ffv_mv == 11'd285, "characterized FFV = 285 mV");
    check(mrv_mv == 11'd339, "MRV = FFV + RVM = 339 mV");
    check(n_trial_pass + n_trial_fail == 90, "9 search steps of 10 trials");
    check(v_supply == 1200, "characterization ends at nominal");

    char_flips = n_flips;
    // sleep at MRV with no failure
    write_pattern();
    read_compare(0, "pattern written");
    go_sleep();
    check(v_supply == 339, "sleeping at 339 mV");
    repeat (300) @(negedge clk);
    check(state == ST_SLEEP && error_cnt == 0, "no error at MRV");

    // FFV drifts up to 345 mV: one flip-flop fails at 339 mV
    wake();
    read_compare(0, "state intact after clean sleep");
    die_ffv = 345; die_gap = 9;
    go_sleep();
    wait_for(ST_RAISE, 50);
    check(error_cnt == 16'd1, "error detected");
    wait_for(ST_SLEEP, 200);
    check(corrected_cnt == 16'd1 && !uncorrectable, "single error corrected");
    check(mrv_mv == 11'd363 && v_supply == 363, "MRV raised by SM to 363 mV");
    repeat (200) @(negedge clk);
    check(error_cnt == 16'd1, "no further error at 363 mV");
    wake();
    read_compare(0, "state intact after correction");

    // multi-bit failure die: both weak cells fail at 370 mV
    die_ffv = 370; die_gap = 0;
    go_sleep();
    wait_for(ST_MRV_UP, 200);
    check(uncorrectable, "multi-bit error flagged uncorrectable");
    wait_for(ST_SLEEP, 200);
    check(mrv_mv == 11'd387 && v_supply == 387, "MRV raised to 387 mV");
    check(corrected_cnt == 16'd1 && error_cnt == 16'd2, "counters after multi-bit error");
    repeat (100) @(negedge clk);
    check(error_cnt == 16'd2, "monitoring resumes on re-captured parity");
    wake();
    read_compare(2, "two bits lost in the multi-bit error");

    // ring oscillators
    osc0_base = n_osc0; osc1_base = n_osc1;
    @(negedge clk) osc_en = 1;
    #20000;
    @(negedge clk) osc_en = 0;
    #1000;
    check(n_osc0 - osc0_base == n_osc1 - osc1_base, "ring oscillators agree");
    check(n_osc0 - osc0_base >= 20000 / 3800 - 1, "ring oscillator period");

    // every mechanism happened
    check(n_trial_pass > 0, "trial passed");
    check(n_trial_fail > 0, "trial failed");
    check(n_char == 1, "characterization done");
    check(n_sleep >= 5, "sleep entries");
    check(n_iso > 0, "isolation during sleep");
    check(n_irq > 0, "error interrupt");
    check(n_mrv_up == 2, "MRV updates");
    check(n_wake == 3, "wake-ups");
    check(n_scan == COLS, "scan shifts");
    check(n_osc0 > 0, "ring oscillation");
    check(n_flips - char_flips == 3, "retention failures injected in sleep");
    $display("mechanisms: trials pass %0d fail %0d, sleeps %0d, irq %0d, mrv+ %0d, wakes %0d, flips %0d, supply steps %0d, osc edges %0d",
             n_trial_pass, n_trial_fail, n_sleep, n_irq, n_mrv_up, n_wake, n_flips, n_supply, n_osc0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

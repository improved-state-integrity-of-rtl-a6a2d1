// tb_protection_ctrl: self-checking test of the state-protection control flow.
//
// The controller runs alone against testbench models: a supply that
// acknowledges each setpoint after a few cycles, a parity error line and an
// error location driven by the testbench, and a row of read data. The test
// walks the flow: sleep request -> parity capture -> scaling to MRV -> sleep;
// single error -> raise to nominal -> read-modify-write of the located bit ->
// MRV + 24 mV -> back to sleep at the new MRV; multi-bit error -> flagged,
// parity re-captured, MRV raised; wake-up -> nominal -> active; and one
// characterization trial (fill with logic 1, capture, trial voltage, hold
// HOLD_CYCLES cycles, nominal, report); finally MRV near nominal must
// saturate at 1200 mV instead of wrapping.
module tb_protection_ctrl;
  import sp_pkg::*;
  localparam int HOLD = 10;
  logic clk = 0, rst_n = 0;
  logic sleep_req = 0, wakeup_req = 0, mrv_load = 0;
  mv_t mrv_load_val = '0, vdd_set_mv, trial_mv = '0, mrv_o;
  logic host_wr_en = 0;
  logic [5:0] host_wr_row = '0, host_rd_row = '0, bank_wr_row, bank_rd_row, loc_row = '0;
  logic [127:0] host_wr_data = '0, bank_wr_data, bank_rd_data = '0;
  logic vdd_req, vdd_ack = 0;
  logic bank_clk_en, bank_iso, bank_fill_en, bank_fill_val, bank_wr_en;
  logic par_en, par_capture, par_check_en, par_error = 0, loc_single = 0;
  logic [6:0] loc_col = '0;
  logic trial_req = 0, trial_done, trial_error, err_irq, uncorrectable;
  ctrl_state_e state_o;
  logic [15:0] error_cnt, corrected_cnt;
  int checks = 0, failures = 0, nreq = 0;
  mv_t last_set;

  protection_ctrl #(.HOLD_CYCLES(HOLD)) dut (.*);

  always #5 clk = ~clk;

  // supply model
  // requests are sampled on the falling edge, away from the register updates
  initial forever begin
    @(negedge clk);
    if (vdd_req) begin
      last_set = vdd_set_mv;
      nreq++;
      repeat (3) @(posedge clk);
      vdd_ack <= 1;
      @(posedge clk);
      vdd_ack <= 0;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (state %0d)", what, state_o); end
  endtask

  task automatic wait_state(input ctrl_state_e s, input int limit);
    int n = 0;
    while (state_o != s && n < limit) begin @(negedge clk); n++; end
    check(state_o == s, $sformatf("reach state %0d", s));
  endtask

  initial begin
    int hold_seen;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(state_o == ST_ACTIVE && bank_clk_en && !bank_iso, "reset to active");
    // host access passes through in ACTIVE
    host_wr_en = 1; host_wr_row = 6'd9; host_wr_data = 128'hABCD; host_rd_row = 6'd4;
    #1 check(bank_wr_en && bank_wr_row == 6'd9 && bank_wr_data == 128'hABCD && bank_rd_row == 6'd4,
             "host access");
    host_wr_en = 0;
    mrv_load = 1; mrv_load_val = 11'd339;
    @(negedge clk) mrv_load = 0;
    check(mrv_o == 11'd339, "MRV loaded");
    // sleep
    sleep_req = 1;
    @(negedge clk) sleep_req = 0;
    check(state_o == ST_GEN_PAR && par_en && par_capture, "parity generation");
    @(negedge clk);
    check(state_o == ST_IDLE && !bank_clk_en && bank_iso, "idle: clock stopped, isolated");
    wait_state(ST_SLEEP, 20);
    check(last_set == 11'd339, "scaled to MRV");
    check(par_check_en && !bank_clk_en && bank_iso, "monitoring in sleep");
    repeat (5) @(negedge clk);
    check(state_o == ST_SLEEP, "stays asleep without error");
    // single error at chain 17, depth 100
    loc_single = 1; loc_row = 6'd17; loc_col = 7'd100;
    par_error = 1;
    #1 check(err_irq, "error interrupt");
    @(negedge clk);
    check(state_o == ST_RAISE, "raise on error");
    wait_state(ST_CORR_RD, 20);
    check(last_set == NOMINAL_MV, "raised to nominal before correction");
    par_error = 0;
    bank_rd_data = 128'h5;
    check(bank_clk_en && bank_rd_row == 6'd17, "read located row");
    @(negedge clk);
    check(state_o == ST_CORR_WR && bank_wr_en && bank_wr_row == 6'd17 &&
          bank_wr_data == (128'h5 ^ (128'h1 << 100)), "write corrected row");
    @(negedge clk);
    check(state_o == ST_MRV_UP && !par_capture, "MRV update, no re-capture");
    @(negedge clk);
    check(mrv_o == 11'd363, "MRV + SM");
    check(corrected_cnt == 16'd1 && error_cnt == 16'd1, "counters after single");
    wait_state(ST_SLEEP, 20);
    check(last_set == 11'd363, "back to sleep at new MRV");
    // multi-bit error
    loc_single = 0; par_error = 1;
    @(negedge clk);
    wait_state(ST_MRV_UP, 20);
    par_error = 0;
    check(uncorrectable && par_capture, "multi-bit: flagged, parity re-captured");
    @(negedge clk);
    check(mrv_o == 11'd387 && corrected_cnt == 16'd1 && error_cnt == 16'd2, "counters after multi");
    wait_state(ST_SLEEP, 20);
    check(last_set == 11'd387, "sleep at raised MRV");
    // wake-up
    wakeup_req = 1;
    @(negedge clk) wakeup_req = 0;
    check(state_o == ST_WAKE, "wake");
    wait_state(ST_ACTIVE, 20);
    check(last_set == NOMINAL_MV && bank_clk_en && !bank_iso, "active at nominal");
    // characterization trial at 270 mV with an error
    trial_mv = 11'd270; trial_req = 1;
    @(negedge clk);
    check(state_o == ST_T_FILL && bank_fill_en && bank_fill_val && bank_clk_en, "trial fill logic-1");
    @(negedge clk);
    check(state_o == ST_T_PAR && par_capture, "trial capture");
    wait_state(ST_T_HOLD, 20);
    check(last_set == 11'd270, "trial voltage");
    hold_seen = 0;
    while (state_o == ST_T_HOLD) begin
      hold_seen++;
      if (hold_seen == 4) par_error = 1;
      @(negedge clk);
      par_error = 0;
    end
    check(hold_seen == HOLD, "hold length");
    wait_state(ST_T_DONE, 20);
    check(last_set == NOMINAL_MV, "trial ends at nominal");
    @(negedge clk);
    check(trial_done && trial_error, "trial reports error");
    trial_req = 0;
    check(state_o == ST_ACTIVE, "back to active");
    // MRV saturates at the nominal supply
    mrv_load = 1; mrv_load_val = 11'd1190;
    @(negedge clk) mrv_load = 0;
    sleep_req = 1;
    @(negedge clk) sleep_req = 0;
    wait_state(ST_SLEEP, 20);
    loc_single = 0; par_error = 1;
    wait_state(ST_MRV_UP, 20);
    par_error = 0;
    @(negedge clk);
    check(mrv_o == NOMINAL_MV, "MRV capped at nominal");
    wait_state(ST_SLEEP, 20);
    wakeup_req = 1;
    @(negedge clk) wakeup_req = 0;
    wait_state(ST_ACTIVE, 20);
    check(nreq == 12, "supply request count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

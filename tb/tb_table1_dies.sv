// tb_table1_dies: the three-die retention experiment on the full-size design.
//
// For each of three dies with first failure voltages of 315, 285 and 250 mV
// (at room temperature), the design characterizes the die (IRV 400 mV, VSR 1
// mV, RVM 54 mV), which must give MRV 369, 339 and 304 mV. Then every
// flip-flop is loaded with logic 1 and the die is heated: its failure voltage
// rises by the full 30 mV temperature margin. The design sleeps at its MRV for
// SLEEP_CYCLES cycles, must see no error, and after wake-up all 8192 bits must
// still be 1. A fourth run heats Die-3 beyond the margin (FFV + 60 mV) to show
// that the same sleep is then caught and repaired.
//
// The die model has two weak flip-flops (the second fails 9 mV below the
// first); the supply model applies each setpoint after a 4-cycle ramp.
module tb_table1_dies;
  import sp_pkg::*;
  localparam int ROWS = 64, COLS = 128, SLEEP_CYCLES = 5000;

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
    if (!ok) begin failures++; $display("FAIL %s (mrv %0d)", what, mrv_mv); end
  endtask

  // supply model: requests sampled on the falling edge
  int v_supply = 1200;
  initial forever begin
    @(negedge clk);
    if (vdd_req) begin
      automatic int target = int'(vdd_set_mv);
      repeat (4) @(posedge clk);
      v_supply = target;
      vdd_ack <= 1;
      @(posedge clk);
      vdd_ack <= 0;
    end
  end

  // die model: two weak flip-flops, each flips once per low-voltage period
  int die_ffv = 315;
  bit flipped[2] = '{0, 0};
  always @(posedge clk) begin
    ret_fail_en <= 1'b0;
    if (v_supply >= 1200) flipped = '{0, 0};
    else if (!flipped[0] && v_supply <= die_ffv) begin
      flipped[0] = 1; ret_fail_en <= 1; ret_fail_row <= 6'd5; ret_fail_col <= 7'd77;
    end else if (!flipped[1] && v_supply <= die_ffv - 9) begin
      flipped[1] = 1; ret_fail_en <= 1; ret_fail_row <= 6'd60; ret_fail_col <= 7'd12;
    end
  end

  task automatic pulse(ref logic sig);
    @(negedge clk) sig = 1;
    @(negedge clk) sig = 0;
  endtask

  task automatic wait_for(input ctrl_state_e s, input int limit);
    int k = 0;
    while (state != s && k < limit) begin @(negedge clk); k++; end
    check(state == s, $sformatf("reach state %0d", s));
  endtask

  task automatic ones_everywhere(input string what);
    int zeros = 0;
    for (int n = 0; n < ROWS; n++) begin
      @(negedge clk) host_rd_row = 6'(n);
      #1 zeros += COLS - $countones(host_rd_data);
    end
    check(zeros == 0, what);
  endtask

  task automatic run_die(input int ffv25, input int heat, input int exp_mrv, input int exp_errors);
    int err0 = int'(error_cnt);
    die_ffv = ffv25;
    pulse(char_start);
    while (!char_done) @(negedge clk);
    @(negedge clk);
    check(int'(ffv_mv) == ffv25, $sformatf("FFV %0d", ffv25));
    check(int'(mrv_mv) == exp_mrv, $sformatf("MRV %0d", exp_mrv));
    // logic 1 in all flip-flops
    for (int n = 0; n < ROWS; n++) begin
      @(negedge clk);
      host_wr_en = 1; host_wr_row = 6'(n); host_wr_data = '1;
    end
    @(negedge clk) host_wr_en = 0;
    die_ffv = ffv25 + heat;
    pulse(sleep_req);
    wait_for(ST_SLEEP, 100);
    check(v_supply == exp_mrv, "sleeping at MRV");
    repeat (SLEEP_CYCLES) @(negedge clk);
    check(int'(error_cnt) - err0 == exp_errors, $sformatf("%0d error(s) in sleep", exp_errors));
    pulse(wakeup_req);
    wait_for(ST_ACTIVE, 100);
    ones_everywhere("all 8192 flip-flops still hold logic 1");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_die(315, 30, 369, 0);     // Die-1
    run_die(285, 30, 339, 0);     // Die-2
    run_die(250, 30, 304, 0);     // Die-3
    run_die(250, 60, 304, 1);     // Die-3 heated beyond the margin
    check(corrected_cnt == 16'd1 && !uncorrectable, "over-heated die corrected");
    check(mrv_mv == 11'd328, "MRV raised to 304 + 24");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

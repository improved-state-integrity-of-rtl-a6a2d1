// state_protect_top: parity-protected voltage-scaled retention register block.
//
// Leakage in standby falls steeply with supply voltage, so the register
// block's own supply (power domain 1) is scaled down while it retains its
// state. How far it can go differs from die to die and with temperature, so
// each die gets its own minimum retention voltage (MRV), and the state is
// watched while it sleeps: every flip-flop feeds a horizontal parity (one bit
// per scan chain, 64) and a vertical parity (one per chain depth, 128). The
// parity is stored in the always-on domain before sleep and compared
// continuously during sleep; a single flipped flip-flop is located at the
// crossing of the mismatching chain and depth and corrected, a multi-bit
// error is reported, and MRV is raised by a safety margin after any error.
//
// Blocks: retention_bank (8192 flip-flops, power domain 1), hparity_logic and
// vparity_logic (XOR trees, power domain 1), two parity_storage registers and
// error_locator (always-on), protection_ctrl (the Active/Idle/Sleep control
// flow), mrv_characterizer (binary search for the first failure voltage, MRV =
// FFV + RVM) and a pair of ring_osc behavioural models for delay-variation
// measurement. Level shifters between the domains, the micro-controller that
// runs the flow on the test chip, and the supply itself are outside this
// module: the supply is reached through the vdd_set_mv / vdd_req / vdd_ack
// handshake and retention failures enter through ret_fail_* (see
// retention_bank).
//
// Host interface: in ACTIVE, host_wr_* writes a scan chain and host_rd_*
// reads one (read data is combinational, isolated to 0 outside ACTIVE);
// scan_* shifts the chains. sleep_req / wakeup_req are levels sampled in
// ACTIVE / SLEEP. char_start (in ACTIVE) runs the characterization with the
// irv/vsr/rvm inputs; when char_done pulses, ffv_mv holds the result and the
// new MRV (ffv + rvm) is loaded automatically. mrv_load loads MRV directly.
module state_protect_top
  import sp_pkg::*;
#(
  parameter int unsigned ROWS        = sp_pkg::ROWS,
  parameter int unsigned COLS        = sp_pkg::COLS,
  parameter int unsigned HOLD_CYCLES = 64,
  localparam int unsigned RW = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CW = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // host commands and configuration
  input  logic            sleep_req,
  input  logic            wakeup_req,
  input  logic            char_start,
  input  mv_t             irv_mv,
  input  mv_t             vsr_mv,
  input  mv_t             rvm_mv,
  input  logic            mrv_load,
  input  mv_t             mrv_load_val,
  // host access to the register block
  input  logic            host_wr_en,
  input  logic [RW-1:0]   host_wr_row,
  input  logic [COLS-1:0] host_wr_data,
  input  logic [RW-1:0]   host_rd_row,
  output logic [COLS-1:0] host_rd_data,
  input  logic            scan_en,
  input  logic [ROWS-1:0] scan_in,
  output logic [ROWS-1:0] scan_out,
  // external supply of power domain 1
  output mv_t             vdd_set_mv,
  output logic            vdd_req,
  input  logic            vdd_ack,
  // retention failure of one flip-flop (die / supply model)
  input  logic            ret_fail_en,
  input  logic [RW-1:0]   ret_fail_row,
  input  logic [CW-1:0]   ret_fail_col,
  // status
  output ctrl_state_e     state,
  output mv_t             mrv_mv,
  output mv_t             ffv_mv,
  output logic            char_busy,
  output logic            char_done,
  output logic            err_irq,
  output logic            uncorrectable,
  output logic [15:0]     error_cnt,
  output logic [15:0]     corrected_cnt,
  // delay-monitor ring oscillators
  input  logic            osc_en,
  output logic [1:0]      osc_out
);

  logic [ROWS-1:0][COLS-1:0] ff_state;
  logic [ROWS-1:0]           hp_live, hp_stored, hp_mis;
  logic [COLS-1:0]           vp_live, vp_stored, vp_mis;
  logic                      h_err, v_err;

  logic            bank_clk_en, bank_iso, bank_fill_en, bank_fill_val, bank_wr_en;
  logic [RW-1:0]   bank_wr_row, bank_rd_row;
  logic [COLS-1:0] bank_wr_data, bank_rd_data;
  logic            par_en, par_capture, par_check_en;
  logic            loc_err, loc_single, loc_multi;
  logic [RW-1:0]   loc_row;
  logic [CW-1:0]   loc_col;
  logic            trial_req, trial_done, trial_error;
  mv_t             trial_mv, char_mrv;

  retention_bank #(.ROWS(ROWS), .COLS(COLS)) u_bank (
    .clk, .rst_n,
    .clk_en   (bank_clk_en),
    .iso      (bank_iso),
    .fill_en  (bank_fill_en),
    .fill_val (bank_fill_val),
    .wr_en    (bank_wr_en),
    .wr_row   (bank_wr_row),
    .wr_data  (bank_wr_data),
    .scan_en  (scan_en && state == ST_ACTIVE),
    .scan_in,
    .scan_out,
    .rd_row   (bank_rd_row),
    .rd_data  (bank_rd_data),
    .upset_en (ret_fail_en),
    .upset_row(ret_fail_row),
    .upset_col(ret_fail_col),
    .state_o  (ff_state)
  );

  hparity_logic #(.ROWS(ROWS), .COLS(COLS)) u_hpar (
    .en(par_en), .bits(ff_state), .hp(hp_live));

  vparity_logic #(.ROWS(ROWS), .COLS(COLS)) u_vpar (
    .en(par_en), .bits(ff_state), .vp(vp_live));

  parity_storage #(.W(ROWS)) u_hstore (
    .clk, .rst_n, .capture(par_capture), .check_en(par_check_en),
    .parity_in(hp_live), .stored_o(hp_stored), .mismatch_o(hp_mis), .error_o(h_err));

  parity_storage #(.W(COLS)) u_vstore (
    .clk, .rst_n, .capture(par_capture), .check_en(par_check_en),
    .parity_in(vp_live), .stored_o(vp_stored), .mismatch_o(vp_mis), .error_o(v_err));

  error_locator #(.ROWS(ROWS), .COLS(COLS)) u_loc (
    .hmis(hp_mis), .vmis(vp_mis), .err(loc_err), .single(loc_single),
    .multi(loc_multi), .row(loc_row), .col(loc_col));

  mrv_characterizer #(.VW(VW)) u_char (
    .clk, .rst_n,
    .start      (char_start && state == ST_ACTIVE),
    .irv        (irv_mv),
    .vsr        (vsr_mv),
    .rvm        (rvm_mv),
    .trial_req, .trial_mv, .trial_done, .trial_error,
    .busy       (char_busy),
    .done       (char_done),
    .ffv        (ffv_mv),
    .mrv        (char_mrv)
  );

  protection_ctrl #(.ROWS(ROWS), .COLS(COLS), .HOLD_CYCLES(HOLD_CYCLES)) u_ctrl (
    .clk, .rst_n,
    .sleep_req    (sleep_req && !char_busy),
    .wakeup_req,
    .mrv_load     (mrv_load || char_done),
    .mrv_load_val (char_done ? char_mrv : mrv_load_val),
    .host_wr_en, .host_wr_row, .host_wr_data, .host_rd_row,
    .vdd_set_mv, .vdd_req, .vdd_ack,
    .bank_clk_en, .bank_iso, .bank_fill_en, .bank_fill_val,
    .bank_wr_en, .bank_wr_row, .bank_wr_data, .bank_rd_row, .bank_rd_data,
    .par_en, .par_capture, .par_check_en,
    .par_error    (h_err || v_err),
    .loc_single, .loc_row, .loc_col,
    .trial_req, .trial_mv, .trial_done, .trial_error,
    .state_o      (state),
    .mrv_o        (mrv_mv),
    .err_irq, .uncorrectable, .error_cnt, .corrected_cnt
  );

  assign host_rd_data = bank_rd_data;

  ring_osc u_osc0 (.en(osc_en), .osc(osc_out[0]));
  ring_osc u_osc1 (.en(osc_en), .osc(osc_out[1]));

endmodule

// protection_ctrl: state monitoring and protection control flow.
//
// Runs the three-state flow of the technique. In ACTIVE the register block is
// clocked at nominal supply and the host reads and writes it. A sleep request
// generates the horizontal and vertical parity and stores it (GEN_PAR); in IDLE
// the block's clock is stopped, its outputs are isolated and the supply of
// power domain 1 is scaled to the die's minimum retention voltage (MRV); then
// SLEEP monitors the live parity against the stored parity. A mismatch is the
// error interrupt: the supply is raised to nominal (RAISE), a single flipped
// bit is corrected by reading its scan chain and writing it back with the bit
// inverted (CORR_RD, CORR_WR), a multi-bit error is flagged to the host
// (uncorrectable) instead, and in either case MRV is raised by the safety
// margin SM (MRV_UP, saturating at the nominal supply) before going back through IDLE to SLEEP at the new MRV. A
// wake-up request in SLEEP raises the supply to nominal and returns to ACTIVE.
//
// The same machinery executes one retention trial for the MRV characterizer
// (states T_*): fill every flip-flop with FILL_VAL, store parity, scale to
// the trial voltage, hold for HOLD_CYCLES while monitoring, raise to nominal
// and report whether the parity saw an error.
//
// Supply interface: vdd_req pulses for one cycle with the new setpoint on
// vdd_set_mv; the external supply answers with a one-cycle vdd_ack once its
// output has settled (40 us ramps on the bench). One request is outstanding
// at a time. Host requests (sleep_req, wakeup_req) are levels, sampled in the
// state that accepts them (ACTIVE, SLEEP). An error in SLEEP takes precedence
// over a wake-up. mrv_load sets MRV (from the characterizer or the host,
// which keeps the updated value between sleeps) and is accepted in ACTIVE.
//
// The control flow, nominal voltage, safety margin and the choice of logic-1
// as the trial state follow the described technique, where the flow runs as
// firmware and host software; doing it in a hardware state machine, the
// supply handshake, re-capturing parity after an uncorrectable error (so
// that monitoring continues on the state as it now stands), the saturation
// of MRV at nominal and the trial hold length are this implementation's
// choices.
module protection_ctrl
  import sp_pkg::*;
#(
  parameter int unsigned ROWS        = sp_pkg::ROWS,
  parameter int unsigned COLS        = sp_pkg::COLS,
  parameter mv_t         NOMINAL     = NOMINAL_MV,
  parameter mv_t         SM          = SM_MV,
  parameter int unsigned HOLD_CYCLES = 64,
  parameter logic        FILL_VAL    = 1'b1,
  localparam int unsigned RW = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CW = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // host
  input  logic            sleep_req,
  input  logic            wakeup_req,
  input  logic            mrv_load,
  input  mv_t             mrv_load_val,
  input  logic            host_wr_en,
  input  logic [RW-1:0]   host_wr_row,
  input  logic [COLS-1:0] host_wr_data,
  input  logic [RW-1:0]   host_rd_row,
  // external supply of power domain 1
  output mv_t             vdd_set_mv,
  output logic            vdd_req,
  input  logic            vdd_ack,
  // register bank control
  output logic            bank_clk_en,
  output logic            bank_iso,
  output logic            bank_fill_en,
  output logic            bank_fill_val,
  output logic            bank_wr_en,
  output logic [RW-1:0]   bank_wr_row,
  output logic [COLS-1:0] bank_wr_data,
  output logic [RW-1:0]   bank_rd_row,
  input  logic [COLS-1:0] bank_rd_data,
  // parity logic, storage and error locator
  output logic            par_en,
  output logic            par_capture,
  output logic            par_check_en,
  input  logic            par_error,
  input  logic            loc_single,
  input  logic [RW-1:0]   loc_row,
  input  logic [CW-1:0]   loc_col,
  // characterizer trial handshake
  input  logic            trial_req,
  input  mv_t             trial_mv,
  output logic            trial_done,
  output logic            trial_error,
  // status
  output ctrl_state_e     state_o,
  output mv_t             mrv_o,
  output logic            err_irq,
  output logic            uncorrectable,
  output logic [15:0]     error_cnt,
  output logic [15:0]     corrected_cnt
);

  ctrl_state_e     st;
  logic            vsent;       // supply request issued, waiting for ack
  logic            recap;       // re-capture parity in MRV_UP (multi-bit)
  logic [RW-1:0]   c_row;
  logic [CW-1:0]   c_col;
  logic [COLS-1:0] c_data;
  logic            terr;
  logic [$clog2(HOLD_CYCLES+1)-1:0] hold_cnt;

  // MRV + SM, never above the nominal supply
  mv_t mrv_up;
  always_comb begin
    logic [$bits(mv_t):0] sum;
    sum    = {1'b0, mrv_o} + {1'b0, SM};
    mrv_up = (sum > {1'b0, NOMINAL}) ? NOMINAL : sum[$bits(mv_t)-1:0];
  end

  // issue a supply request once, then wait for its acknowledge
  function automatic logic settled(input logic sent, input logic ack);
    return sent && ack;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st            <= ST_ACTIVE;
      vsent         <= 1'b0;
      recap         <= 1'b0;
      c_row         <= '0;
      c_col         <= '0;
      c_data        <= '0;
      terr          <= 1'b0;
      hold_cnt      <= '0;
      vdd_set_mv    <= NOMINAL;
      vdd_req       <= 1'b0;
      trial_done    <= 1'b0;
      trial_error   <= 1'b0;
      mrv_o         <= NOMINAL;
      uncorrectable <= 1'b0;
      error_cnt     <= '0;
      corrected_cnt <= '0;
    end else begin
      vdd_req    <= 1'b0;
      trial_done <= 1'b0;
      unique case (st)
        ST_ACTIVE: begin
          if (mrv_load) mrv_o <= mrv_load_val;
          if (trial_req && !trial_done) st <= ST_T_FILL;
          else if (sleep_req) begin
            uncorrectable <= 1'b0;
            st            <= ST_GEN_PAR;
          end
        end
        ST_GEN_PAR: st <= ST_IDLE;
        ST_IDLE: begin
          if (!vsent) begin
            vdd_set_mv <= mrv_o;
            vdd_req    <= 1'b1;
            vsent      <= 1'b1;
          end else if (settled(vsent, vdd_ack)) begin
            vsent <= 1'b0;
            st    <= ST_SLEEP;
          end
        end
        ST_SLEEP: begin
          if (par_error) begin
            error_cnt <= error_cnt + 16'd1;
            st        <= ST_RAISE;
          end else if (wakeup_req) begin
            st <= ST_WAKE;
          end
        end
        ST_RAISE: begin
          if (!vsent) begin
            vdd_set_mv <= NOMINAL;
            vdd_req    <= 1'b1;
            vsent      <= 1'b1;
          end else if (settled(vsent, vdd_ack)) begin
            // supply is back at nominal: no further flips, locate now
            vsent <= 1'b0;
            c_row <= loc_row;
            c_col <= loc_col;
            if (loc_single) begin
              recap <= 1'b0;
              st    <= ST_CORR_RD;
            end else begin
              recap         <= 1'b1;
              uncorrectable <= 1'b1;
              st            <= ST_MRV_UP;
            end
          end
        end
        ST_CORR_RD: begin
          c_data <= bank_rd_data ^ (COLS'(1) << c_col);
          st     <= ST_CORR_WR;
        end
        ST_CORR_WR: begin
          corrected_cnt <= corrected_cnt + 16'd1;
          st            <= ST_MRV_UP;
        end
        ST_MRV_UP: begin
          mrv_o <= mrv_up;
          recap <= 1'b0;
          st    <= ST_IDLE;
        end
        ST_WAKE: begin
          if (!vsent) begin
            vdd_set_mv <= NOMINAL;
            vdd_req    <= 1'b1;
            vsent      <= 1'b1;
          end else if (settled(vsent, vdd_ack)) begin
            vsent <= 1'b0;
            st    <= ST_ACTIVE;
          end
        end
        ST_T_FILL: st <= ST_T_PAR;
        ST_T_PAR:  st <= ST_T_DOWN;
        ST_T_DOWN: begin
          if (!vsent) begin
            vdd_set_mv <= trial_mv;
            vdd_req    <= 1'b1;
            vsent      <= 1'b1;
          end else if (settled(vsent, vdd_ack)) begin
            vsent    <= 1'b0;
            terr     <= 1'b0;
            hold_cnt <= '0;
            st       <= ST_T_HOLD;
          end
        end
        ST_T_HOLD: begin
          if (par_error) terr <= 1'b1;
          if (hold_cnt == ($bits(hold_cnt))'(HOLD_CYCLES - 1)) st <= ST_T_UP;
          else hold_cnt <= hold_cnt + 1'b1;
        end
        ST_T_UP: begin
          if (par_error) terr <= 1'b1;
          if (!vsent) begin
            vdd_set_mv <= NOMINAL;
            vdd_req    <= 1'b1;
            vsent      <= 1'b1;
          end else if (settled(vsent, vdd_ack)) begin
            vsent <= 1'b0;
            st    <= ST_T_DONE;
          end
        end
        ST_T_DONE: begin
          trial_done  <= 1'b1;
          trial_error <= terr;
          st          <= ST_ACTIVE;
        end
        default: st <= ST_ACTIVE;
      endcase
    end
  end

  // outputs decoded from the state
  always_comb begin
    bank_clk_en   = 1'b0;
    bank_iso      = 1'b1;
    bank_fill_en  = 1'b0;
    bank_fill_val = FILL_VAL;
    bank_wr_en    = 1'b0;
    bank_wr_row   = c_row;
    bank_wr_data  = c_data;
    bank_rd_row   = c_row;
    par_en        = 1'b0;
    par_capture   = 1'b0;
    par_check_en  = 1'b0;
    unique case (st)
      ST_ACTIVE: begin
        bank_clk_en  = 1'b1;
        bank_iso     = 1'b0;
        bank_wr_en   = host_wr_en;
        bank_wr_row  = host_wr_row;
        bank_wr_data = host_wr_data;
        bank_rd_row  = host_rd_row;
      end
      ST_GEN_PAR, ST_T_PAR: begin
        bank_clk_en = 1'b1;
        bank_iso    = 1'b0;
        par_en      = 1'b1;
        par_capture = 1'b1;
      end
      ST_SLEEP, ST_T_HOLD, ST_T_UP: begin
        par_en       = 1'b1;
        par_check_en = 1'b1;
      end
      ST_RAISE: par_en = 1'b1;
      ST_CORR_RD: begin
        bank_clk_en = 1'b1;
        bank_iso    = 1'b0;
      end
      ST_CORR_WR: begin
        bank_clk_en = 1'b1;
        bank_iso    = 1'b0;
        bank_wr_en  = 1'b1;
      end
      ST_MRV_UP: begin
        par_en      = recap;
        par_capture = recap;
      end
      ST_WAKE: ;
      ST_T_FILL: begin
        bank_clk_en  = 1'b1;
        bank_iso     = 1'b0;
        bank_fill_en = 1'b1;
      end
      default: ;
    endcase
  end

  assign state_o = st;
  assign err_irq = (st == ST_SLEEP) && par_error;

  // one supply request at a time
  a_one_req: assert property (@(posedge clk) disable iff (!rst_n)
                              vdd_req |=> !vdd_req);
  // the clock of the register block never runs below nominal supply
  a_clk_nominal: assert property (@(posedge clk) disable iff (!rst_n)
                                  bank_clk_en |-> vdd_set_mv == NOMINAL);

endmodule

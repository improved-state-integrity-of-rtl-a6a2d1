// mrv_characterizer: per-die minimum retention voltage search.
//
// Finds the first failure voltage (FFV) of the die by binary search and adds
// the retention voltage margin: MRV = FFV + RVM. The search keeps two bounds,
// v_correct (lowest voltage seen to retain the state, starting at IRV, a
// voltage at which no die fails) and v_fail (highest voltage seen to corrupt
// it, starting at 0 V). While v_correct - v_fail > VSR it runs one retention
// trial at the mid-point (v_correct + v_fail) / 2 (rounded down): a failing
// trial moves v_fail up to that voltage, a passing one moves v_correct down.
// At the end v_fail is the FFV. With IRV = 400 mV and VSR = 1 mV a search takes
// at most 9 steps.
//
// Each step repeats the trial REPEATS times (10 by default) at the same voltage
// and keeps the most common outcome, so that supply jitter near the failure
// point does not steer the search; a tie counts as a failure, the safe side.
//
// Trial handshake: trial_req rises with trial_mv valid and both stay stable
// until the one-cycle trial_done pulse, which carries trial_error. A trial
// is a complete retention test (store the state, scale down, hold, scale up,
// check) carried out by the protection controller. The algorithm and its
// inputs and the ten-fold repetition follow the described technique; the
// handshake, the round-down of the mid-point and the tie rule are this
// implementation's choices. trial_req stays high across the repetitions of
// one step; each repetition ends with its own trial_done pulse.
//
// Timing: start is sampled in the idle state only; done pulses for one cycle
// when ffv/mrv are valid, and they stay valid until the next start.
module mrv_characterizer #(
  parameter int unsigned VW      = sp_pkg::VW,
  parameter int unsigned REPEATS = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [VW-1:0] irv,
  input  logic [VW-1:0] vsr,
  input  logic [VW-1:0] rvm,
  output logic          trial_req,
  output logic [VW-1:0] trial_mv,
  input  logic          trial_done,
  input  logic          trial_error,
  output logic          busy,
  output logic          done,
  output logic [VW-1:0] ffv,
  output logic [VW-1:0] mrv
);

  typedef enum logic [1:0] {C_IDLE, C_CHECK, C_TRIAL, C_FINISH} cstate_e;

  cstate_e       st;
  logic [VW-1:0] v_correct, v_fail, v_cur;
  localparam int unsigned RCW = $clog2(REPEATS + 1);
  logic [RCW-1:0] rep_cnt, err_cnt;
  logic [RCW-1:0] errs_now;     // failures including the trial ending now
  logic           step_fail;    // majority (or tie) of the repetitions failed

  assign errs_now  = err_cnt + RCW'(trial_error);
  assign step_fail = ({1'b0, errs_now} << 1) >= (RCW + 1)'(REPEATS);

  // mid-point with one extra bit so the sum cannot overflow
  function automatic logic [VW-1:0] mid(input logic [VW-1:0] a, input logic [VW-1:0] b);
    logic [VW:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[VW:1];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= C_IDLE;
      v_correct <= '0;
      v_fail    <= '0;
      v_cur     <= '0;
      ffv       <= '0;
      mrv       <= '0;
      done      <= 1'b0;
      rep_cnt   <= '0;
      err_cnt   <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        C_IDLE: if (start) begin
          v_correct <= irv;                  // line 1
          v_fail    <= '0;
          v_cur     <= mid(irv, '0);         // line 2
          st        <= C_CHECK;
        end
        C_CHECK: begin                       // line 3
          if (v_correct - v_fail > vsr) st <= C_TRIAL;
          else                          st <= C_FINISH;
        end
        C_TRIAL: if (trial_done) begin       // lines 4-9
          if (rep_cnt != RCW'(REPEATS - 1)) begin
            rep_cnt <= rep_cnt + 1'b1;
            err_cnt <= errs_now;
          end else begin
            rep_cnt <= '0;
            err_cnt <= '0;
            if (step_fail) begin
              v_fail <= v_cur;
              v_cur  <= mid(v_correct, v_cur);
            end else begin
              v_correct <= v_cur;
              v_cur     <= mid(v_cur, v_fail);
            end
            st <= C_CHECK;
          end
        end
        C_FINISH: begin                      // lines 11-13
          ffv  <= v_fail;
          mrv  <= v_fail + rvm;
          done <= 1'b1;
          st   <= C_IDLE;
        end
        default: st <= C_IDLE;
      endcase
    end
  end

  assign trial_req = (st == C_TRIAL);
  assign trial_mv  = v_cur;
  assign busy      = (st != C_IDLE);

  // the trial voltage may not move while a trial is outstanding
  a_trial_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                   trial_req && !trial_done |=> $stable(trial_mv));
  // bounds stay ordered
  a_bounds: assert property (@(posedge clk) disable iff (!rst_n)
                             st == C_CHECK |-> v_correct >= v_fail);

endmodule

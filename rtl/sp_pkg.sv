// sp_pkg: constants and types shared by the parity-protected retention design.
//
// The retention register block holds 8192 flip-flops as 64 scan chains of 128
// flip-flops (two rows of four 32x32 tiles). Voltages are carried as unsigned
// millivolt numbers, 11 bits wide (0..2047 mV), which covers the 1.2 V nominal
// supply with a 1 mV step, the finest step of the bench supply the design was
// characterised with. The voltage constants below are the ones the technique
// uses: nominal 1200 mV, safety margin SM = 2% of nominal = 24 mV, temperature
// variation margin TVM = 30 mV, retention voltage margin RVM = TVM + SM = 54 mV,
// initial retention voltage IRV = 400 mV and scaling resolution VSR = 1 mV.
// The 11-bit width and the encodings of the controller state are choices of
// this implementation.
package sp_pkg;

  localparam int unsigned ROWS = 64;   // scan chains = horizontal parity bits
  localparam int unsigned COLS = 128;  // chain depth  = vertical parity bits
  localparam int unsigned VW   = 11;   // millivolt word width

  typedef logic [VW-1:0] mv_t;

  localparam mv_t NOMINAL_MV = mv_t'(1200);
  localparam mv_t SM_MV      = mv_t'(24);
  localparam mv_t TVM_MV     = mv_t'(30);
  localparam mv_t RVM_MV     = mv_t'(54);
  localparam mv_t IRV_MV     = mv_t'(400);
  localparam mv_t VSR_MV     = mv_t'(1);

  // Protection controller states. ACTIVE, IDLE and SLEEP are the three states
  // of the control flow; the others are the transitions between them.
  typedef enum logic [3:0] {
    ST_ACTIVE    = 4'd0,   // clock running, outputs live, supply nominal
    ST_GEN_PAR   = 4'd1,   // capture horizontal + vertical parity
    ST_IDLE      = 4'd2,   // clock stopped, outputs isolated, scale to MRV
    ST_SLEEP     = 4'd3,   // retention at MRV, parity monitored
    ST_RAISE     = 4'd4,   // error: supply back to nominal
    ST_CORR_RD   = 4'd5,   // read the row holding the flipped bit
    ST_CORR_WR   = 4'd6,   // write it back with the bit inverted
    ST_MRV_UP    = 4'd7,   // MRV = MRV + SM
    ST_WAKE      = 4'd8,   // wake-up: supply back to nominal
    ST_T_FILL    = 4'd9,   // trial: store the initial logic state
    ST_T_PAR     = 4'd10,  // trial: capture parity
    ST_T_DOWN    = 4'd11,  // trial: scale to the trial voltage
    ST_T_HOLD    = 4'd12,  // trial: hold and monitor
    ST_T_UP      = 4'd13,  // trial: supply back to nominal
    ST_T_DONE    = 4'd14   // trial: report to the characterizer
  } ctrl_state_e;

endpackage

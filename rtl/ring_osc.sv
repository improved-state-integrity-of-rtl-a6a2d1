// ring_osc: behavioural model of a NAND-gate ring oscillator (not synthesizable
// logic: a combinational loop with modelled gate delays).
//
// STAGES two-input NAND gates form a ring. The first gate's second input is the
// enable: with en low its output is forced high and the ring settles; with en
// high all STAGES gates invert and, STAGES being odd, the ring oscillates with
// a period of 2 * STAGES * STAGE_DELAY (95 stages of 20 units: 3800 units). The other
// gates have both inputs tied together. Two identical instances are placed in the
// design to measure within-die delay variation against supply and temperature;
// comparing their frequencies is done off-chip. The 95-stage NAND ring follows
// the described test chip; the gate delay is an assumed figure, and a real
// ring's delay depends on supply, temperature and process, which this model
// does not capture except through the parameter. Delays are in the time unit
// in force for the module (20 units of 1 ps give a 3.8 ns period).
module ring_osc #(
  parameter int unsigned STAGES         = 95,
  parameter int unsigned STAGE_DELAY = 20
) (
  input  logic en,
  output logic osc
);

  logic [STAGES-1:0] node;

  assign #(STAGE_DELAY) node[0] = ~(en & node[STAGES-1]);

  for (genvar i = 1; i < STAGES; i++) begin : g_stage
    assign #(STAGE_DELAY) node[i] = ~(node[i-1] & node[i-1]);
  end

  assign osc = node[STAGES-1];

endmodule

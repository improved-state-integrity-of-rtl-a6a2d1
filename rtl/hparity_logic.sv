// hparity_logic: horizontal parity of the retention register block.
//
// One parity bit per scan chain: hp[n] is the XOR of every flip-flop along
// chain n, hp[n] = b[n][0] ^ b[n][1] ^ ... ^ b[n][len_n-1]. Chains may differ
// in length (CHAIN_LEN[n]); positions beyond a chain's length hold no
// flip-flop and are skipped, the direct connection of the gate-level insertion
// flow. With the default ROWS = 64 chains of COLS = 128 flip-flops this gives
// the 64 horizontal parity bits of the design.
//
// The logic is purely combinational. When en is 0 (normal operation) its
// inputs are gated off and hp is 0, so the XOR trees do not toggle with the
// functional logic; en is raised while parity is generated and monitored.
// The gating is this implementation's reading of "parity logic is disabled".
module hparity_logic #(
  parameter int unsigned ROWS = sp_pkg::ROWS,
  parameter int unsigned COLS = sp_pkg::COLS,
  parameter int unsigned CHAIN_LEN [ROWS] = '{default: COLS}
) (
  input  logic                      en,
  input  logic [ROWS-1:0][COLS-1:0] bits,
  output logic [ROWS-1:0]           hp
);

  for (genvar n = 0; n < ROWS; n++) begin : g_chain
    // flip-flops that exist on this chain
    localparam int unsigned LEN = (CHAIN_LEN[n] > COLS) ? COLS : CHAIN_LEN[n];
    logic [COLS-1:0] present;
    for (genvar m = 0; m < COLS; m++) begin : g_ff
      assign present[m] = (m < LEN) & en;
    end
    assign hp[n] = ^(bits[n] & present);
  end

endmodule

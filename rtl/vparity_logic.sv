// vparity_logic: vertical parity of the retention register block.
//
// One parity bit per scan-chain depth: vp[m] is the XOR of the flip-flops at
// depth m of every chain, vp[m] = b[0][m] ^ b[1][m] ^ ... ^ b[ROWS-1][m].
// A chain shorter than m+1 (CHAIN_LEN[n] <= m) contributes nothing, so the
// number of vertical parity bits equals the depth of the longest chain. With
// the defaults (64 chains of 128) this gives the 128 vertical parity bits.
//
// Combinational; inputs gated by en exactly as in hparity_logic.
module vparity_logic #(
  parameter int unsigned ROWS = sp_pkg::ROWS,
  parameter int unsigned COLS = sp_pkg::COLS,
  parameter int unsigned CHAIN_LEN [ROWS] = '{default: COLS}
) (
  input  logic                      en,
  input  logic [ROWS-1:0][COLS-1:0] bits,
  output logic [COLS-1:0]           vp
);

  for (genvar m = 0; m < COLS; m++) begin : g_depth
    // the flip-flop at depth m of every chain long enough to have one
    logic [ROWS-1:0] column;
    for (genvar n = 0; n < ROWS; n++) begin : g_chain
      assign column[n] = bits[n][m] & (m < CHAIN_LEN[n]) & en;
    end
    assign vp[m] = ^column;
  end

endmodule

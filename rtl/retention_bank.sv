// retention_bank: the voltage-scaled retention register block (power domain 1).
//
// 8192 flip-flops are arranged as ROWS scan chains of COLS flip-flops; bit
// [n][m] is the flip-flop at depth m of scan chain n. Physically the array is
// two rows of four 32x32 tiles. The whole array is exposed on state_o so that
// the horizontal and vertical parity logic can watch every flip-flop, which is
// how the block is monitored while it sleeps at a reduced supply.
//
// Ports and timing (all synchronous to clk, one-cycle write latency):
//   clk_en      stands for the gated clock: when 0 (Idle/Sleep) no write,
//               fill or scan shift takes effect.
//   fill_en     stores fill_val in every flip-flop (the "initial logic state"
//               used when characterising a die). Priority: fill, write, scan.
//   wr_en       writes wr_data into chain wr_row.
//   scan_en     shifts every chain by one towards depth COLS-1; scan_in[n]
//               enters at depth 0, scan_out[n] is depth COLS-1.
//   rd_row      selects the chain shown on rd_data (combinational).
//   iso         isolation: clamps rd_data and scan_out to 0 while the block
//               sleeps; state_o is not isolated (it feeds the parity logic).
//   upset_*     inverts one stored bit at the next clock edge regardless of
//               clk_en. It stands for a retention failure of a flip-flop whose
//               supply is below its retention voltage; on silicon such a flip is
//               caused by the supply, not by a port, so a die or supply model
//               drives it.
// The organisation, the parity tap-out and isolation follow the described
// design; the row-wide access port, the fill port and the upset port are this
// implementation's choices. rst_n clears the array (power-on only: retention
// flip-flops keep their state across sleep, reset is not used on wake-up).
module retention_bank #(
  parameter int unsigned ROWS = sp_pkg::ROWS,
  parameter int unsigned COLS = sp_pkg::COLS,
  localparam int unsigned RW  = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CW  = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clk_en,
  input  logic                      iso,
  input  logic                      fill_en,
  input  logic                      fill_val,
  input  logic                      wr_en,
  input  logic [RW-1:0]             wr_row,
  input  logic [COLS-1:0]           wr_data,
  input  logic                      scan_en,
  input  logic [ROWS-1:0]           scan_in,
  output logic [ROWS-1:0]           scan_out,
  input  logic [RW-1:0]             rd_row,
  output logic [COLS-1:0]           rd_data,
  input  logic                      upset_en,
  input  logic [RW-1:0]             upset_row,
  input  logic [CW-1:0]             upset_col,
  output logic [ROWS-1:0][COLS-1:0] state_o
);

  logic [ROWS-1:0][COLS-1:0] ff_q;
  logic [ROWS-1:0][COLS-1:0] ff_d;
  logic [ROWS-1:0][COLS-1:0] upset_mask;

  always_comb begin
    ff_d = ff_q;
    if (clk_en) begin
      if (fill_en) begin
        ff_d = {(ROWS*COLS){fill_val}};
      end else if (wr_en) begin
        ff_d[wr_row] = wr_data;
      end else if (scan_en) begin
        for (int n = 0; n < ROWS; n++) begin
          ff_d[n] = {ff_q[n][COLS-2:0], scan_in[n]};
        end
      end
    end
    upset_mask = '0;
    if (upset_en) upset_mask[upset_row][upset_col] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ff_q <= '0;
    else        ff_q <= ff_d ^ upset_mask;
  end

  always_comb begin
    for (int n = 0; n < ROWS; n++) scan_out[n] = ff_q[n][COLS-1] & ~iso;
    rd_data = ff_q[rd_row] & {COLS{~iso}};
  end

  assign state_o = ff_q;

endmodule

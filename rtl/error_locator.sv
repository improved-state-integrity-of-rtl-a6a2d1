// error_locator: turns parity mismatches into an error location.
//
// Inputs are the horizontal (per scan chain) and vertical (per depth)
// mismatch vectors between stored and live parity. A single flipped
// flip-flop at chain r, depth c makes exactly hmis[r] and vmis[c] set, so
// "one horizontal and one vertical mismatch" is reported as a correctable
// single error at (row, col). Any other non-zero pattern is a multi-bit
// error: it is detected but cannot be corrected. Note the limits of a
// two-dimensional parity: an even number of flips in the same chain and the
// same depth pattern (e.g. four corners of a rectangle) cancels out, and three
// flips at three corners of a rectangle look like one flip at the fourth.
//
// Purely combinational. row/col are 0 unless single is 1.
module error_locator #(
  parameter int unsigned ROWS = sp_pkg::ROWS,
  parameter int unsigned COLS = sp_pkg::COLS,
  localparam int unsigned RW  = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CW  = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic [ROWS-1:0] hmis,
  input  logic [COLS-1:0] vmis,
  output logic            err,
  output logic            single,
  output logic            multi,
  output logic [RW-1:0]   row,
  output logic [CW-1:0]   col
);

  logic [$clog2(ROWS+1)-1:0] hcnt;
  logic [$clog2(COLS+1)-1:0] vcnt;

  always_comb begin
    hcnt = '0;
    row  = '0;
    for (int n = 0; n < ROWS; n++) begin
      if (hmis[n]) begin
        hcnt = hcnt + 1'b1;
        row  = RW'(n);
      end
    end
    vcnt = '0;
    col  = '0;
    for (int m = 0; m < COLS; m++) begin
      if (vmis[m]) begin
        vcnt = vcnt + 1'b1;
        col  = CW'(m);
      end
    end
    err    = (hcnt != 0) || (vcnt != 0);
    single = (hcnt == 1) && (vcnt == 1);
    multi  = err && !single;
    if (!single) begin
      row = '0;
      col = '0;
    end
  end

endmodule

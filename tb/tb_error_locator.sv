// tb_error_locator: self-checking test of the error locator.
//
// Builds a random 64 x 128 state in the testbench, flips 0, 1, 2 or 3 random
// bits, computes the horizontal and vertical mismatch vectors from the two
// states, and checks the classification: no flip -> no error, one flip ->
// single with its exact row and column, two flips -> always detected and
// never "single". Three flips are only checked for detection when they do
// not share a rectangle corner pattern, plus directed patterns with
// one mismatching row but several mismatching columns and vice versa.
module tb_error_locator;
  localparam int ROWS = 64, COLS = 128;
  logic [ROWS-1:0] hmis;
  logic [COLS-1:0] vmis;
  logic err, single, multi;
  logic [5:0] row;
  logic [6:0] col;
  int checks = 0, failures = 0;

  error_locator dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int k, r[3], c[3];
      bit [ROWS-1:0][COLS-1:0] flip;
      k = t % 3;
      flip = '0;
      for (int i = 0; i <= k; i++) begin
        // distinct positions
        do begin
          r[i] = $urandom % ROWS;
          c[i] = $urandom % COLS;
        end while (flip[r[i]][c[i]]);
        flip[r[i]][c[i]] = 1'b1;
      end
      if (t % 7 == 0) begin flip = '0; k = -1; end
      for (int n = 0; n < ROWS; n++) hmis[n] = ^flip[n];
      for (int m = 0; m < COLS; m++) begin
        vmis[m] = 1'b0;
        for (int n = 0; n < ROWS; n++) vmis[m] ^= flip[n][m];
      end
      #1;
      if (k < 0) begin
        check(!err && !single && !multi, "no error");
      end else if (k == 0) begin
        check(err && single && !multi, "single classified");
        check(row == 6'(r[0]) && col == 7'(c[0]), "single located");
      end else if (k == 1) begin
        check(err && !single && multi, "double detected, not corrected");
      end else begin
        check(err == (hmis != 0 || vmis != 0), "triple: err is any mismatch");
        check(single == ($countones(hmis) == 1 && $countones(vmis) == 1), "triple: single only for one row and one column");
        check(multi == (err && !single), "triple: multi");
      end
      // directed: one odd row but three odd columns is not correctable
      if (t == 5) begin
        hmis = '0; vmis = '0;
        hmis[1] = 1'b1; vmis[0] = 1'b1; vmis[1] = 1'b1; vmis[2] = 1'b1;
        #1 check(err && !single && multi, "one row, three columns");
        hmis = '0; hmis[3] = 1'b1; hmis[9] = 1'b1; vmis = '0; vmis[5] = 1'b1;
        #1 check(err && !single && multi, "two rows, one column");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

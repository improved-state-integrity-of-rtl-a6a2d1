// tb_retention_bank: self-checking test of the retention register bank.
//
// Uses a small 8 x 16 array. A reference copy of the array is kept in the
// testbench and updated with the same rules (fill > write > scan when the
// clock is enabled, upsets always), then every cycle the state tap, a row
// read and the scan outputs are compared with it. Random stimulus covers row
// writes, fills, scan shifts, stopped clock and isolation.
module tb_retention_bank;
  localparam int ROWS = 8, COLS = 16;
  logic clk = 0, rst_n = 0;
  logic clk_en, iso, fill_en, fill_val, wr_en, scan_en, upset_en;
  logic [2:0] wr_row, rd_row, upset_row;
  logic [3:0] upset_col;
  logic [COLS-1:0] wr_data, rd_data;
  logic [ROWS-1:0] scan_in, scan_out;
  logic [ROWS-1:0][COLS-1:0] state, ref_q;
  int checks = 0, failures = 0, cycles = 0;

  retention_bank #(.ROWS(ROWS), .COLS(COLS)) dut (.*, .state_o(state));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycles);
    end
  endtask

  initial begin
    {clk_en, iso, fill_en, fill_val, wr_en, scan_en, upset_en} = '0;
    {wr_row, rd_row, upset_row, upset_col, wr_data, scan_in} = '0;
    ref_q = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(state == '0, "reset clears array");
    for (int i = 0; i < 2000; i++) begin
      // drive random stimulus
      clk_en    = ($urandom % 4) != 0;
      iso       = ($urandom % 4) == 0;
      fill_en   = ($urandom % 20) == 0;
      fill_val  = 1'($urandom);
      wr_en     = ($urandom % 3) == 0;
      wr_row    = 3'($urandom);
      wr_data   = 16'($urandom);
      scan_en   = ($urandom % 3) == 0;
      scan_in   = 8'($urandom);
      upset_en  = ($urandom % 5) == 0;
      upset_row = 3'($urandom);
      upset_col = 4'($urandom);
      rd_row    = 3'($urandom);
      #1;
      check(rd_data == (iso ? '0 : ref_q[rd_row]), "row read / isolation");
      for (int n = 0; n < ROWS; n++)
        check(scan_out[n] == (iso ? 1'b0 : ref_q[n][COLS-1]), "scan out");
      // reference update
      if (clk_en) begin
        if (fill_en) ref_q = {(ROWS*COLS){fill_val}};
        else if (wr_en) ref_q[wr_row] = wr_data;
        else if (scan_en)
          for (int n = 0; n < ROWS; n++) ref_q[n] = {ref_q[n][COLS-2:0], scan_in[n]};
      end
      if (upset_en) ref_q[upset_row][upset_col] = ~ref_q[upset_row][upset_col];
      @(negedge clk);
      check(state == ref_q, "array state");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycles++;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_parity_storage: self-checking test of the always-on parity register.
//
// Captures random parity words and checks that the stored value only changes
// on capture, that the mismatch vector is stored XOR live bit for bit, and
// that the error output follows "any mismatch" only while checking is on.
module tb_parity_storage;
  localparam int W = 128;
  logic clk = 0, rst_n = 0, capture = 0, check_en = 0;
  logic [W-1:0] parity_in = '0, stored_o, mismatch_o, model;
  logic error_o;
  int checks = 0, failures = 0;

  parity_storage #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      capture   = ($urandom % 4) == 0;
      check_en  = ($urandom % 2) == 0;
      for (int w = 0; w < W/32; w++) parity_in[w*32 +: 32] = $urandom;
      if (($urandom % 3) == 0) parity_in = model;      // live parity equal to stored
      else if (($urandom % 3) == 0) parity_in = model ^ (W'(1) << ($urandom % W));
      #1;
      check(stored_o == model, "stored value");
      check(mismatch_o == (model ^ parity_in), "mismatch vector");
      check(error_o == (check_en && (model != parity_in)), "error output");
      if (capture) model = parity_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

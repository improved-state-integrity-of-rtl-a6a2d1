// tb_hparity_logic: self-checking test of the horizontal parity logic.
//
// Checks the irregular two-chain example of the parity insertion flow (chain
// lengths 3 and 2: HP1 covers three flip-flops, HP2 two) exhaustively, and a
// 64 x 128 instance with default chain lengths on random states, against a
// parity counted bit by bit in the testbench. Also checks that the output is 0
// when the logic is disabled.
module tb_hparity_logic;
  localparam int unsigned LEN2 [2] = '{3, 2};
  logic en;
  logic [1:0][2:0] b2;
  logic [1:0]      hp2;
  logic [63:0][127:0] bb;
  logic [63:0]        hpb;
  int checks = 0, failures = 0;

  hparity_logic #(.ROWS(2), .COLS(3), .CHAIN_LEN(LEN2)) dut_small (.en(en), .bits(b2), .hp(hp2));
  hparity_logic dut_full (.en(en), .bits(bb), .hp(hpb));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    bb = '0;
    for (int e = 0; e < 2; e++) begin
      en = e[0];
      for (int v = 0; v < 64; v++) begin
        bit p1, p2;
        b2 = 6'(v);
        #1;
        p1 = b2[0][0] ^ b2[0][1] ^ b2[0][2];
        p2 = b2[1][0] ^ b2[1][1];           // b2[1][2] is not a flip-flop
        check(hp2 == (en ? {p2, p1} : 2'b00), "two-chain example");
      end
    end
    en = 1;
    for (int t = 0; t < 50; t++) begin
      for (int n = 0; n < 64; n++)
        for (int w = 0; w < 4; w++) bb[n][w*32 +: 32] = $urandom;
      #1;
      for (int n = 0; n < 64; n++) begin
        automatic int ones = 0;
        for (int m = 0; m < 128; m++) ones += int'(bb[n][m]);
        check(hpb[n] == ones[0], "full-size row parity");
      end
    end
    en = 0;
    #1 check(hpb == '0, "disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

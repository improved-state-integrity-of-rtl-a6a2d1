// tb_vparity_logic: self-checking test of the vertical parity logic.
//
// Checks the irregular two-chain example of the parity insertion flow (chain
// lengths 3 and 2: VP1 and VP2 cover both chains, VP3 only the first chain's
// third flip-flop) exhaustively, and a 64 x 128 instance on random states,
// against a per-column count of ones made in the testbench.
module tb_vparity_logic;
  localparam int unsigned LEN2 [2] = '{3, 2};
  logic en;
  logic [1:0][2:0] b2;
  logic [2:0]      vp2;
  logic [63:0][127:0] bb;
  logic [127:0]       vpb;
  int checks = 0, failures = 0;

  vparity_logic #(.ROWS(2), .COLS(3), .CHAIN_LEN(LEN2)) dut_small (.en(en), .bits(b2), .vp(vp2));
  vparity_logic dut_full (.en(en), .bits(bb), .vp(vpb));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    bb = '0;
    for (int e = 0; e < 2; e++) begin
      en = e[0];
      for (int v = 0; v < 64; v++) begin
        bit p1, p2, p3;
        b2 = 6'(v);
        #1;
        p1 = b2[0][0] ^ b2[1][0];
        p2 = b2[0][1] ^ b2[1][1];
        p3 = b2[0][2];                       // direct connection, no XOR
        check(vp2 == (en ? {p3, p2, p1} : 3'b000), "two-chain example");
      end
    end
    en = 1;
    for (int t = 0; t < 50; t++) begin
      for (int n = 0; n < 64; n++)
        for (int w = 0; w < 4; w++) bb[n][w*32 +: 32] = $urandom;
      #1;
      for (int m = 0; m < 128; m++) begin
        automatic int ones = 0;
        for (int n = 0; n < 64; n++) ones += int'(bb[n][m]);
        check(vpb[m] == ones[0], "full-size column parity");
      end
    end
    en = 0;
    #1 check(vpb == '0, "disabled");
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

// parity_storage: always-on parity register with continuous comparison.
//
// Sits in the always-on power domain (behind level shifters, not modelled
// here). On capture it stores the parity computed from the register block just
// before the block goes to sleep. While check_en is high it compares the
// stored bits with the live parity every cycle: mismatch_o shows which bits
// differ and error_o is their OR, the error interrupt source. The design
// uses two of these: 64 bits for the horizontal and 128 bits for the vertical
// parity.
//
// Timing: stored_o updates on the clock edge where capture is high;
// mismatch_o and error_o are combinational from parity_in. mismatch_o is
// valid whether or not check_en is set; only error_o is gated.
module parity_storage #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         capture,
  input  logic         check_en,
  input  logic [W-1:0] parity_in,
  output logic [W-1:0] stored_o,
  output logic [W-1:0] mismatch_o,
  output logic         error_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       stored_o <= '0;
    else if (capture) stored_o <= parity_in;
  end

  assign mismatch_o = stored_o ^ parity_in;
  assign error_o    = check_en & (|mismatch_o);

endmodule

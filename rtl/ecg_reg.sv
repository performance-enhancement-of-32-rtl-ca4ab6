// ecg_reg: W-bit register with enhanced clock gating.
//
// Each bit of the register input d is compared with the stored bit q by an
// XOR, and one W-input OR tells whether any bit would change. Only when a bit
// would change and en is high is the enable passed through the clock gate
// latch and AND to the register's clock. A clock edge that would reload the
// same value is therefore suppressed as well as one with en low.
//
// Timing: d and en must be settled before the rising edge of clk; q takes d
// on that edge when en is high (if d equals q nothing needs to happen).
// Functionally this is a register with load enable en. Reset is asynchronous,
// active low, and clears q; the reset is this design's choice.
module ecg_reg #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic changed, gate_en, gclk;

  assign changed = |(d ^ q);
  assign gate_en = en & changed;

  clock_gate u_cg (.clk(clk), .en(gate_en), .gclk(gclk));

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end
endmodule

// clk_select: chooses the register file clock. With sel_i low the register
// file and the monitoring unit run on the chip clock; with sel_i high they run
// on a clock the user drives from outside, one edge at a time if wished, which
// gives full control over when the registers change.
// The document names the two clock sources; the plain multiplexer is this
// design's choice. sel_i must only change while both clocks are low (or with
// the user clock held low and the chip clock stopped), otherwise a short pulse
// can reach the register file.
module clk_select (
  input  logic chip_clk_i,  // default chip clock
  input  logic user_clk_i,  // user controlled clock
  input  logic sel_i,       // 1: user clock, 0: chip clock
  output logic clk_o
);

  always_comb clk_o = sel_i ? user_clk_i : chip_clk_i;

endmodule

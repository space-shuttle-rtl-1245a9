// dup_monitor: the duplicated monitoring unit. Two identical monitor_unit
// copies, each with its own counter registers and incrementers, receive the
// same events. A read selects the same counter in both and returns both
// values together with mismatch_o, set when they differ, so an upset in
// either copy is visible when the counters are read. Readout is
// combinational. The document asks for both the counter registers and their
// counter logic to be replicated; the comparison on readout is this design's
// choice.
module dup_monitor
  import shuttle_pkg::*;
#(
  parameter int unsigned NREGS  = NUM_REGS,
  parameter int unsigned NBANKS = NUM_BANKS,
  parameter int unsigned CW     = CNT_W,
  parameter int unsigned RPB    = NREGS / NBANKS,
  parameter int unsigned LAW    = (RPB > 1) ? $clog2(RPB) : 1,
  parameter int unsigned RAW    = $clog2(NREGS)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              we_i     [NBANKS],
  input  logic [LAW-1:0]    waddr_i  [NBANKS],
  input  logic              rvalid_i [NBANKS],
  input  logic [LAW-1:0]    raddr_i  [NBANKS],
  input  logic              det_i    [NBANKS],
  input  logic              corr_i   [NBANKS],
  input  logic [RAW-1:0]    rd_reg_i,
  input  cnt_e              rd_type_i,
  output logic [CW-1:0]     value_a_o,
  output logic [CW-1:0]     value_b_o,
  output logic              mismatch_o
);

  monitor_unit #(.NREGS(NREGS), .NBANKS(NBANKS), .CW(CW), .RPB(RPB), .LAW(LAW), .RAW(RAW))
    u_copy_a (.clk, .rst, .we_i, .waddr_i, .rvalid_i, .raddr_i, .det_i, .corr_i,
              .rd_reg_i, .rd_type_i, .rd_value_o(value_a_o));

  monitor_unit #(.NREGS(NREGS), .NBANKS(NBANKS), .CW(CW), .RPB(RPB), .LAW(LAW), .RAW(RAW))
    u_copy_b (.clk, .rst, .we_i, .waddr_i, .rvalid_i, .raddr_i, .det_i, .corr_i,
              .rd_reg_i, .rd_type_i, .rd_value_o(value_b_o));

  assign mismatch_o = (value_a_o != value_b_o);

endmodule

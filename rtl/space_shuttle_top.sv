// space_shuttle_top: the reliability test core. A 32 x 32-bit flip-flop
// register file in 8 parallel banks, guarded by four selectable protection
// mechanisms (ECC, triple redundancy, shadow copy, ECC-protected shadow copy),
// and a duplicated monitoring unit counting writes, reads, detected and
// corrected errors per register, readable over Wishbone.
//
// Clocking: the register file and the monitoring unit run on clk_select's
// output, the chip clock wb_clk_i (default) or user_clk_i when clk_sel_i is
// high. The Wishbone slave always runs on wb_clk_i; while the user clock is
// selected, hold it still when reading counters so the values do not change
// under the read. wb_rst_i resets everything (asynchronously).
//
// Register file ports are per bank (arrays indexed by bank), see
// protected_regfile and reg_bank for their timing; the raw port sets or
// inspects single stored copies. The chip-level pin assignment of these
// signals is not part of this module: they are all brought out as ports.
module space_shuttle_top
  import shuttle_pkg::*;
#(
  parameter int unsigned NREGS  = NUM_REGS,
  parameter int unsigned NBANKS = NUM_BANKS,
  parameter int unsigned RPB    = NREGS / NBANKS,
  parameter int unsigned LAW    = (RPB > 1) ? $clog2(RPB) : 1,
  parameter int unsigned RAW    = $clog2(NREGS)
) (
  // chip clock and reset (Wishbone clock domain)
  input  logic              wb_clk_i,
  input  logic              wb_rst_i,
  // register file clock selection
  input  logic              user_clk_i,
  input  logic              clk_sel_i,
  // protection configuration
  input  prot_cfg_t         cfg_i,
  // register file, one port pair per bank
  input  logic              we_i     [NBANKS],
  input  logic [LAW-1:0]    waddr_i  [NBANKS],
  input  logic [DATA_W-1:0] wdata_i  [NBANKS],
  input  logic              re_i     [NBANKS],
  input  logic [LAW-1:0]    raddr_i  [NBANKS],
  output logic              rvalid_o [NBANKS],
  output logic [LAW-1:0]    raddr_o  [NBANKS],
  output logic [DATA_W-1:0] rdata_o  [NBANKS],
  output logic              det_o    [NBANKS],
  output logic              corr_o   [NBANKS],
  output logic              uncorr_o [NBANKS],
  // raw access to individual stored copies
  input  logic              raw_we_i,
  input  logic [RAW-1:0]    raw_addr_i,
  input  field_e            raw_field_i,
  input  logic [DATA_W-1:0] raw_wdata_i,
  output logic [DATA_W-1:0] raw_rdata_o,
  // Wishbone slave for the monitoring counters
  input  logic              wbs_stb_i,
  input  logic              wbs_cyc_i,
  input  logic              wbs_we_i,
  input  logic [3:0]        wbs_sel_i,
  input  logic [31:0]       wbs_dat_i,
  input  logic [31:0]       wbs_adr_i,
  output logic              wbs_ack_o,
  output logic [31:0]       wbs_dat_o
);

  logic             rf_clk;
  logic [RAW-1:0]   cnt_reg;
  cnt_e             cnt_type;
  logic [CNT_W-1:0] cnt_a, cnt_b;
  logic             cnt_mis;

  clk_select u_clk_sel (.chip_clk_i(wb_clk_i), .user_clk_i(user_clk_i),
                        .sel_i(clk_sel_i), .clk_o(rf_clk));

  protected_regfile #(.NREGS(NREGS), .NBANKS(NBANKS), .RPB(RPB), .LAW(LAW), .RAW(RAW)) u_rf (
    .clk         (rf_clk),
    .rst         (wb_rst_i),
    .cfg_i       (cfg_i),
    .we_i        (we_i),
    .waddr_i     (waddr_i),
    .wdata_i     (wdata_i),
    .re_i        (re_i),
    .raddr_i     (raddr_i),
    .rvalid_o    (rvalid_o),
    .raddr_o     (raddr_o),
    .rdata_o     (rdata_o),
    .det_o       (det_o),
    .corr_o      (corr_o),
    .uncorr_o    (uncorr_o),
    .raw_we_i    (raw_we_i),
    .raw_addr_i  (raw_addr_i),
    .raw_field_i (raw_field_i),
    .raw_wdata_i (raw_wdata_i),
    .raw_rdata_o (raw_rdata_o)
  );

  dup_monitor #(.NREGS(NREGS), .NBANKS(NBANKS), .RPB(RPB), .LAW(LAW), .RAW(RAW)) u_mon (
    .clk        (rf_clk),
    .rst        (wb_rst_i),
    .we_i       (we_i),
    .waddr_i    (waddr_i),
    .rvalid_i   (rvalid_o),
    .raddr_i    (raddr_o),
    .det_i      (det_o),
    .corr_i     (corr_o),
    .rd_reg_i   (cnt_reg),
    .rd_type_i  (cnt_type),
    .value_a_o  (cnt_a),
    .value_b_o  (cnt_b),
    .mismatch_o (cnt_mis)
  );

  wb_counter_if #(.NREGS(NREGS), .RAW(RAW)) u_wb (
    .wb_clk_i, .wb_rst_i, .wbs_stb_i, .wbs_cyc_i, .wbs_we_i, .wbs_sel_i,
    .wbs_dat_i, .wbs_adr_i, .wbs_ack_o, .wbs_dat_o,
    .cnt_reg_o      (cnt_reg),
    .cnt_type_o     (cnt_type),
    .cnt_a_i        (cnt_a),
    .cnt_b_i        (cnt_b),
    .cnt_mismatch_i (cnt_mis)
  );

endmodule

// protected_regfile: the 32 x 32-bit flip-flop register file, split into
// NUM_BANKS banks (reg_bank) that work in parallel.
//
// Register r lives in bank r / REGS_PER_BANK at local address
// r % REGS_PER_BANK, so with the defaults registers 0-3 form bank 0, 4-7 bank
// 1 and so on. Every bank has its own write and read port; all eight can be
// used in the same cycle. The protection configuration cfg_i is common to all
// banks. Reads return their word and error flags one cycle later (see
// reg_bank). The single raw port reaches any stored field of any register by
// its full register number, for setting or inspecting individual copies.
// The document gives the 32 registers, the 32-bit width and the 8 parallel
// banks; the port layout and the mapping of registers to banks are this
// design's choices.
module protected_regfile
  import shuttle_pkg::*;
#(
  parameter int unsigned NREGS  = NUM_REGS,
  parameter int unsigned NBANKS = NUM_BANKS,
  parameter int unsigned RPB    = NREGS / NBANKS,            // registers per bank
  parameter int unsigned LAW    = (RPB > 1) ? $clog2(RPB) : 1, // local address width
  parameter int unsigned RAW    = $clog2(NREGS)               // register number width
) (
  input  logic              clk,
  input  logic              rst,
  input  prot_cfg_t         cfg_i,
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
  input  logic              raw_we_i,
  input  logic [RAW-1:0]    raw_addr_i,
  input  field_e            raw_field_i,
  input  logic [DATA_W-1:0] raw_wdata_i,
  output logic [DATA_W-1:0] raw_rdata_o
);

  localparam int unsigned BW = (NBANKS > 1) ? $clog2(NBANKS) : 1;

  logic [DATA_W-1:0] bank_raw_rdata [NBANKS];
  logic [BW-1:0]     raw_bank;
  logic [LAW-1:0]    raw_local;

  assign raw_bank  = BW'(raw_addr_i / RAW'(RPB));
  assign raw_local = LAW'(raw_addr_i % RAW'(RPB));
  assign raw_rdata_o = bank_raw_rdata[raw_bank];

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    reg_bank #(.REGS(RPB), .AW(LAW)) u_bank (
      .clk         (clk),
      .rst         (rst),
      .cfg_i       (cfg_i),
      .we_i        (we_i[b]),
      .waddr_i     (waddr_i[b]),
      .wdata_i     (wdata_i[b]),
      .re_i        (re_i[b]),
      .raddr_i     (raddr_i[b]),
      .rvalid_o    (rvalid_o[b]),
      .raddr_o     (raddr_o[b]),
      .rdata_o     (rdata_o[b]),
      .det_o       (det_o[b]),
      .corr_o      (corr_o[b]),
      .uncorr_o    (uncorr_o[b]),
      .raw_we_i    (raw_we_i && (raw_bank == BW'(b))),
      .raw_addr_i  (raw_local),
      .raw_field_i (raw_field_i),
      .raw_wdata_i (raw_wdata_i),
      .raw_rdata_o (bank_raw_rdata[b])
    );
  end

endmodule

// monitor_unit: event counters for every register of the protected register
// file: writes, reads, detected errors and corrected errors, CNT_W bits each.
//
// The inputs are the per-bank events of the register file, given with the
// bank-local register address: a write (we_i/waddr_i), and a finished read
// (rvalid_i/raddr_i, as returned one cycle after the read) with its
// detected/corrected flags. Each counter sees at most one event per cycle,
// because a bank has one write and one read port, so each counter is a plain
// incrementer. Counters wrap around at 2**CNT_W and are cleared by reset.
// rd_reg_i/rd_type_i select one counter, returned combinationally on
// rd_value_o. The document gives the four counter kinds and their 32-bit
// width; wrap-around and the read-out port are this design's choices.
module monitor_unit
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
  output logic [CW-1:0]     rd_value_o
);

  logic [CW-1:0] cnt [NREGS][NUM_CNT_TYPES];

  for (genvar r = 0; r < NREGS; r++) begin : g_reg
    localparam int unsigned B = r / RPB;
    localparam int unsigned L = r % RPB;
    logic [NUM_CNT_TYPES-1:0] inc;
    always_comb begin
      logic hit_r;
      hit_r = rvalid_i[B] && (raddr_i[B] == LAW'(L));
      inc[CNT_WRITE]     = we_i[B] && (waddr_i[B] == LAW'(L));
      inc[CNT_READ]      = hit_r;
      inc[CNT_DETECTED]  = hit_r && det_i[B];
      inc[CNT_CORRECTED] = hit_r && corr_i[B];
    end
    for (genvar t = 0; t < NUM_CNT_TYPES; t++) begin : g_type
      always_ff @(posedge clk or posedge rst) begin
        if (rst)         cnt[r][t] <= '0;
        else if (inc[t]) cnt[r][t] <= cnt[r][t] + 1'b1;
      end
    end
  end

  assign rd_value_o = cnt[rd_reg_i][rd_type_i];

endmodule

// wb_counter_if: Wishbone (classic, 32-bit) slave through which the
// processor reads the duplicated monitoring counters.
//
// Address map (byte offsets from BASE, word aligned, 4 KiB window):
//   offset[10]   = 0: counter value, 1: compare word {31'b0, copies differ}
//   offset[9:5]  = register number (0..31)
//   offset[4:3]  = counter kind: 0 writes, 1 reads, 2 detected, 3 corrected
//   offset[2]    = 0: copy A, 1: copy B
// Offsets above 0x7FC read as zero. The counter is selected combinationally
// from the address (cnt_reg_o/cnt_type_o) and captured when the cycle is
// acknowledged. Timing: a cycle with cyc and stb inside the window is
// acknowledged in the next clock cycle, for one cycle, with the data. Writes
// are acknowledged and ignored: the counters are read-only. Cycles outside
// the window are not acknowledged. wb_rst_i resets the slave asynchronously,
// like the rest of the core. The document says the counters are read
// over Wishbone; the address map and timing are this design's choices, and the
// port names follow the usual Caravel user-project names. cnt_reg_o and
// cnt_type_o are plain slices of the address bus, so synthesis reports them
// as wired straight to an input. The acknowledge assertion samples wb_rst_i
// synchronously (disable iff) while the flops use it asynchronously; lint
// notes the mixed use, which is intended.
module wb_counter_if
  import shuttle_pkg::*;
#(
  parameter logic [31:0] BASE  = 32'h3000_0000,
  parameter int unsigned NREGS = NUM_REGS,
  parameter int unsigned RAW   = $clog2(NREGS)
) (
  input  logic              wb_clk_i,
  input  logic              wb_rst_i,
  input  logic              wbs_stb_i,
  input  logic              wbs_cyc_i,
  input  logic              wbs_we_i,
  input  logic [3:0]        wbs_sel_i,
  input  logic [31:0]       wbs_dat_i,
  input  logic [31:0]       wbs_adr_i,
  output logic              wbs_ack_o,
  output logic [31:0]       wbs_dat_o,
  // counter selection towards the monitoring unit
  output logic [RAW-1:0]    cnt_reg_o,
  output cnt_e              cnt_type_o,
  input  logic [CNT_W-1:0]  cnt_a_i,
  input  logic [CNT_W-1:0]  cnt_b_i,
  input  logic              cnt_mismatch_i
);

  logic        hit, req;
  logic [11:0] off;
  logic [31:0] rdata;

  assign off  = wbs_adr_i[11:0];
  assign hit  = (wbs_adr_i[31:12] == BASE[31:12]);
  assign req  = wbs_cyc_i && wbs_stb_i && hit && !wbs_ack_o;

  assign cnt_reg_o  = RAW'(off[9:5]);
  assign cnt_type_o = cnt_e'(off[4:3]);

  always_comb begin
    if (off[11] || (32'(off[9:5]) >= NREGS)) rdata = '0;
    else if (off[10])                        rdata = {31'b0, cnt_mismatch_i};
    else if (off[2])                         rdata = cnt_b_i;
    else                                     rdata = cnt_a_i;
  end

  always_ff @(posedge wb_clk_i or posedge wb_rst_i) begin
    if (wb_rst_i) begin
      wbs_ack_o <= 1'b0;
      wbs_dat_o <= '0;
    end else begin
      wbs_ack_o <= req;
      if (req) wbs_dat_o <= wbs_we_i ? '0 : rdata;
    end
  end

  // The slave answers only a cycle that was requested one clock earlier.
  a_ack_follows_req: assert property (@(posedge wb_clk_i) disable iff (wb_rst_i)
    wbs_ack_o |-> $past(wbs_cyc_i && wbs_stb_i));

  logic unused;
  assign unused = ^{wbs_sel_i, wbs_dat_i, off[1:0]};

endmodule

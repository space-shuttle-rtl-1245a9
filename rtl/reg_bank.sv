// reg_bank: one bank of the protected register file, REGS flip-flop registers
// with their redundant copies, one write port and one read port.
//
// A write stores the word in all six fields of the register: primary word,
// its SECDED check bits, two copies for triple redundancy, a shadow copy and
// the shadow's check bits. Which of them are used is decided on read by
// cfg_i, so any protection can be switched on later without rewriting.
//
// The read path applies the enabled mechanisms in a fixed order:
//   1. ECC:        the primary word is corrected with its check bits; a double
//                  error marks the word as bad.
//   2. TMR:        the result is voted with the two copies. If the copies
//                  disagree with each other while the primary was bad, two of
//                  three copies are wrong and the word stays bad; otherwise the
//                  vote repairs it.
//   3. shadow:     plain shadow: a difference from the shadow is detected and
//                  marks the word bad (a copy cannot say which side is right).
//      ECC shadow: the shadow is checked with its own SECDED bits. If it is
//                  usable (no double error) it is trusted: a differing word is
//                  replaced by it and counts as corrected. With a double error
//                  in the shadow the word from steps 1-2 is returned but reported as not
//                  repaired, since nothing can confirm it.
//                  When both shadow modes are enabled, ECC shadow is used.
// Every disagreement or ECC syndrome seen on the read sets det_o; corr_o is
// set when an error was detected and the returned word is trusted, uncorr_o
// when it is not.
//
// Timing: a read in cycle n returns rdata_o, the flags and rvalid_o in cycle
// n+1 (registered). A write in cycle n is visible to a read from cycle n+1;
// a read and a write of the same register in one cycle return the old word.
// The raw port (raw_*) reads any stored field combinationally and writes one
// field alone without touching the others, so a test can plant bit flips and
// inspect every copy; a raw write wins over a port write of the same field in
// the same cycle. Reset (asynchronous, active high) clears all fields, which
// is a valid codeword. The document states the bank count and the protection
// mechanisms; the ports, the order of checks and the raw port are this
// design's choices.
module reg_bank
  import shuttle_pkg::*;
#(
  parameter int unsigned REGS = NUM_REGS / NUM_BANKS,     // registers per bank
  parameter int unsigned AW   = (REGS > 1) ? $clog2(REGS) : 1
) (
  input  logic              clk,
  input  logic              rst,
  input  prot_cfg_t         cfg_i,
  // write port
  input  logic              we_i,
  input  logic [AW-1:0]     waddr_i,
  input  logic [DATA_W-1:0] wdata_i,
  // read port
  input  logic              re_i,
  input  logic [AW-1:0]     raddr_i,
  output logic              rvalid_o,
  output logic [AW-1:0]     raddr_o,     // register the result belongs to
  output logic [DATA_W-1:0] rdata_o,
  output logic              det_o,       // an error was detected
  output logic              corr_o,      // ... and the returned word is repaired
  output logic              uncorr_o,    // ... and could not be repaired
  // raw access to single stored fields
  input  logic              raw_we_i,
  input  logic [AW-1:0]     raw_addr_i,
  input  field_e            raw_field_i,
  input  logic [DATA_W-1:0] raw_wdata_i,
  output logic [DATA_W-1:0] raw_rdata_o
);

  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic [ECC_W-1:0]  chk;
    logic [DATA_W-1:0] copy1;
    logic [DATA_W-1:0] copy2;
    logic [DATA_W-1:0] shadow;
    logic [ECC_W-1:0]  schk;
  } entry_t;

  entry_t            mem [REGS];
  logic [ECC_W-1:0]  wchk;

  secded_encoder u_wenc (.data_i(wdata_i), .chk_o(wchk));

  // ---------------------------------------------------------------- storage
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int unsigned r = 0; r < REGS; r++) mem[r] <= '0;
    end else begin
      if (we_i) begin
        mem[waddr_i] <= '{data: wdata_i, chk: wchk, copy1: wdata_i,
                          copy2: wdata_i, shadow: wdata_i, schk: wchk};
      end
      if (raw_we_i) begin
        unique case (raw_field_i)
          FLD_DATA:   mem[raw_addr_i].data   <= raw_wdata_i;
          FLD_ECC:    mem[raw_addr_i].chk    <= raw_wdata_i[ECC_W-1:0];
          FLD_COPY1:  mem[raw_addr_i].copy1  <= raw_wdata_i;
          FLD_COPY2:  mem[raw_addr_i].copy2  <= raw_wdata_i;
          FLD_SHADOW: mem[raw_addr_i].shadow <= raw_wdata_i;
          FLD_SECC:   mem[raw_addr_i].schk   <= raw_wdata_i[ECC_W-1:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (raw_field_i)
      FLD_DATA:   raw_rdata_o = mem[raw_addr_i].data;
      FLD_ECC:    raw_rdata_o = DATA_W'(mem[raw_addr_i].chk);
      FLD_COPY1:  raw_rdata_o = mem[raw_addr_i].copy1;
      FLD_COPY2:  raw_rdata_o = mem[raw_addr_i].copy2;
      FLD_SHADOW: raw_rdata_o = mem[raw_addr_i].shadow;
      FLD_SECC:   raw_rdata_o = DATA_W'(mem[raw_addr_i].schk);
      default:    raw_rdata_o = '0;
    endcase
  end

  // -------------------------------------------------------------- read path
  entry_t            rd;
  logic [DATA_W-1:0] p_corr, s_corr, vote;
  logic              p_single, p_double, s_single, s_double, tmr_mis;
  logic [DATA_W-1:0] val;
  logic              det, bad;

  assign rd = mem[raddr_i];

  secded_decoder u_pdec (.data_i(rd.data), .chk_i(rd.chk), .data_o(p_corr),
                         .single_o(p_single), .double_o(p_double));
  secded_decoder u_sdec (.data_i(rd.shadow), .chk_i(rd.schk), .data_o(s_corr),
                         .single_o(s_single), .double_o(s_double));

  logic [DATA_W-1:0] stage_a;
  assign stage_a = cfg_i.ecc ? p_corr : rd.data;

  tmr_voter #(.W(DATA_W)) u_vote (.a_i(stage_a), .b_i(rd.copy1), .c_i(rd.copy2),
                                  .vote_o(vote), .mismatch_o(tmr_mis));

  always_comb begin
    val = stage_a;
    det = 1'b0;
    bad = 1'b0;
    // 1. ECC on the primary word
    if (cfg_i.ecc) begin
      det = p_single || p_double;
      bad = p_double;
    end
    // 2. triple redundancy
    if (cfg_i.tmr) begin
      val = vote;
      if (tmr_mis) det = 1'b1;
      bad = bad && (rd.copy1 != rd.copy2);
    end
    // 3. shadow copy
    if (cfg_i.ecc_shadow) begin
      if (s_single || s_double) det = 1'b1;
      if (s_double) begin
        bad = 1'b1;
      end else begin
        if (val != s_corr) begin
          det = 1'b1;
          val = s_corr;
        end
        bad = 1'b0;
      end
    end else if (cfg_i.shadow) begin
      if (val != rd.shadow) begin
        det = 1'b1;
        bad = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      rvalid_o <= 1'b0;
      raddr_o  <= '0;
      rdata_o  <= '0;
      det_o    <= 1'b0;
      corr_o   <= 1'b0;
      uncorr_o <= 1'b0;
    end else begin
      rvalid_o <= re_i;
      if (re_i) begin
        raddr_o  <= raddr_i;
        rdata_o  <= val;
        det_o    <= det;
        corr_o   <= det && !bad;
        uncorr_o <= det && bad;
      end else begin
        det_o    <= 1'b0;
        corr_o   <= 1'b0;
        uncorr_o <= 1'b0;
      end
    end
  end

endmodule

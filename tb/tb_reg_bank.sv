// tb_reg_bank: exercises one register bank under every protection setting.
// Bits are flipped in single stored copies through the raw port, then the
// word is read through the protected port and the returned value and the
// detected / corrected / uncorrected flags are compared with the outcome the
// protection scheme must give for that fault (worked out per case below).
// Also checks the one-cycle read latency, that raw reads show what a write
// stored in every field, and that reset leaves valid, zero registers.
module tb_reg_bank;
  import shuttle_pkg::*;

  localparam int REGS = 4;
  localparam int AW   = 2;

  logic              clk = 0, rst = 1;
  prot_cfg_t         cfg;
  logic              we, re, rvalid, det, corr, uncorr, raw_we;
  logic [AW-1:0]     waddr, raddr, raddr_q, raw_addr;
  logic [DATA_W-1:0] wdata, rdata, raw_wdata, raw_rdata;
  field_e            raw_field;
  int checks = 0, failures = 0;
  int cycle = 0;

  reg_bank #(.REGS(REGS), .AW(AW)) dut (
    .clk, .rst, .cfg_i(cfg), .we_i(we), .waddr_i(waddr), .wdata_i(wdata),
    .re_i(re), .raddr_i(raddr), .rvalid_o(rvalid), .raddr_o(raddr_q), .rdata_o(rdata),
    .det_o(det), .corr_o(corr), .uncorr_o(uncorr),
    .raw_we_i(raw_we), .raw_addr_i(raw_addr), .raw_field_i(raw_field),
    .raw_wdata_i(raw_wdata), .raw_rdata_o(raw_rdata));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pos_of(int d);
    int p = 0, n = -1;
    while (n < d) begin
      p++;
      if ((p & (p - 1)) != 0) n++;
    end
    return p;
  endfunction

  function automatic logic [ECC_W-1:0] ref_enc(logic [DATA_W-1:0] w);
    logic [ECC_W-1:0] c = '0;
    for (int d = 0; d < DATA_W; d++)
      if (w[d]) c[ECC_W-2:0] ^= 6'(pos_of(d));
    c[ECC_W-1] = ^{w, c[ECC_W-2:0]};
    return c;
  endfunction

  task automatic idle();
    we = 0; re = 0; raw_we = 0;
  endtask

  task automatic write(int a, logic [DATA_W-1:0] d);
    @(negedge clk);
    idle();
    we = 1; waddr = AW'(a); wdata = d;
    @(negedge clk);
    idle();
  endtask

  task automatic raw_flip(int a, field_e f, logic [DATA_W-1:0] mask);
    @(negedge clk);
    idle();
    raw_addr = AW'(a); raw_field = f;
    #1;
    raw_wdata = raw_rdata ^ mask;
    raw_we = 1;
    @(negedge clk);
    idle();
  endtask

  task automatic expect_field(int a, field_e f, logic [DATA_W-1:0] exp, string what);
    @(negedge clk);
    raw_addr = AW'(a); raw_field = f;
    #1;
    checks++;
    if (raw_rdata !== exp) begin
      failures++;
      $display("FAIL %s: field %s = %h, expected %h", what, f.name(), raw_rdata, exp);
    end
  endtask

  // Read register a and compare word and flags; also checks one-cycle latency.
  task automatic expect_read(int a, logic [DATA_W-1:0] exp, logic e_det, logic e_corr,
                             logic e_uncorr, string what, bit chk_data = 1);
    int c0;
    @(negedge clk);
    idle();
    re = 1; raddr = AW'(a);
    c0 = cycle;
    @(posedge clk);
    #1;
    re = 0;
    checks++;
    if (!rvalid || raddr_q !== AW'(a) || cycle != c0 + 1 || (chk_data && rdata !== exp) ||
        det !== e_det || corr !== e_corr || uncorr !== e_uncorr) begin
      failures++;
      $display("FAIL %s: rvalid=%b data=%h exp=%h det=%b corr=%b uncorr=%b (exp %b %b %b)",
               what, rvalid, rdata, exp, det, corr, uncorr, e_det, e_corr, e_uncorr);
    end
  endtask

  function automatic prot_cfg_t mk(bit e, bit t, bit s, bit es);
    prot_cfg_t c;
    c.ecc = e; c.tmr = t; c.shadow = s; c.ecc_shadow = es;
    return c;
  endfunction

  logic [DATA_W-1:0] v, m1, m2;

  initial begin
    idle();
    cfg = mk(0, 0, 0, 0);
    waddr = '0; raddr = '0; wdata = '0; raw_addr = '0; raw_field = FLD_DATA; raw_wdata = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    // reset: zero registers are clean codewords for every protection
    cfg = mk(1, 1, 0, 1);
    for (int a = 0; a < REGS; a++) expect_read(a, '0, 0, 0, 0, "after reset");

    // a write fills every field; check bits follow the reference code
    for (int a = 0; a < REGS; a++) begin
      v = $urandom;
      write(a, v);
      expect_field(a, FLD_DATA, v, "write");
      expect_field(a, FLD_COPY1, v, "write");
      expect_field(a, FLD_COPY2, v, "write");
      expect_field(a, FLD_SHADOW, v, "write");
      expect_field(a, FLD_ECC, DATA_W'(ref_enc(v)), "write");
      expect_field(a, FLD_SECC, DATA_W'(ref_enc(v)), "write");
    end

    for (int n = 0; n < 40; n++) begin
      int a, b1, b2;
      a  = $urandom_range(REGS - 1);
      b1 = $urandom_range(DATA_W - 1);
      do b2 = $urandom_range(DATA_W - 1); while (b2 == b1);
      m1 = DATA_W'(1) << b1;
      m2 = m1 | (DATA_W'(1) << b2);
      v  = $urandom;

      // no protection: a flip goes unnoticed
      cfg = mk(0, 0, 0, 0);
      write(a, v); raw_flip(a, FLD_DATA, m1);
      expect_read(a, v ^ m1, 0, 0, 0, "none, 1 flip");

      // ECC: single corrected, double detected only
      cfg = mk(1, 0, 0, 0);
      write(a, v); expect_read(a, v, 0, 0, 0, "ecc clean");
      raw_flip(a, FLD_DATA, m1);
      expect_read(a, v, 1, 1, 0, "ecc 1 flip");
      raw_flip(a, FLD_DATA, m2 ^ m1);
      expect_read(a, v, 1, 0, 1, "ecc 2 flips", 0);

      // TMR: any one copy is outvoted
      cfg = mk(0, 1, 0, 0);
      write(a, v); raw_flip(a, FLD_COPY1, m2);
      expect_read(a, v, 1, 1, 0, "tmr copy1");
      write(a, v); raw_flip(a, FLD_DATA, m2);
      expect_read(a, v, 1, 1, 0, "tmr primary");
      write(a, v); raw_flip(a, FLD_COPY2, m1);
      expect_read(a, v, 1, 1, 0, "tmr copy2");

      // ECC + TMR: double error in the primary, copies agree -> repaired;
      // copies also disagree -> not repairable
      cfg = mk(1, 1, 0, 0);
      write(a, v); raw_flip(a, FLD_DATA, m2);
      expect_read(a, v, 1, 1, 0, "ecc+tmr 2 flips");
      raw_flip(a, FLD_COPY1, m1);
      expect_read(a, v, 1, 0, 1, "ecc+tmr 2 flips + copy", 0);

      // shadow: difference detected, not repaired, primary returned
      cfg = mk(0, 0, 1, 0);
      write(a, v); raw_flip(a, FLD_DATA, m1);
      expect_read(a, v ^ m1, 1, 0, 1, "shadow primary");
      write(a, v); raw_flip(a, FLD_SHADOW, m1);
      expect_read(a, v, 1, 0, 1, "shadow shadow");

      // ECC shadow: shadow repairs the primary, its own single error corrected,
      // a double error in it leaves the read unconfirmed
      cfg = mk(0, 0, 0, 1);
      write(a, v); raw_flip(a, FLD_DATA, m2);
      expect_read(a, v, 1, 1, 0, "ecc-shadow primary");
      write(a, v); raw_flip(a, FLD_SHADOW, m1);
      expect_read(a, v, 1, 1, 0, "ecc-shadow shadow 1 flip");
      write(a, v); raw_flip(a, FLD_SHADOW, m2);
      expect_read(a, v, 1, 0, 1, "ecc-shadow shadow 2 flips");
      // both shadow modes: ECC shadow behaviour
      cfg = mk(0, 0, 1, 1);
      write(a, v); raw_flip(a, FLD_DATA, m1);
      expect_read(a, v, 1, 1, 0, "both shadows");
      // combinations: ECC repairs before the shadow comparison, so the
      // shadow agrees; TMR repairs a copy before the shadow comparison
      cfg = mk(1, 0, 1, 0);
      write(a, v); raw_flip(a, FLD_DATA, m1);
      expect_read(a, v, 1, 1, 0, "ecc+shadow");
      cfg = mk(0, 1, 1, 0);
      write(a, v); raw_flip(a, FLD_COPY1, m2);
      expect_read(a, v, 1, 1, 0, "tmr+shadow");
      cfg = mk(1, 1, 1, 1);
      write(a, v); raw_flip(a, FLD_DATA, m2); raw_flip(a, FLD_COPY2, m1);
      expect_read(a, v, 1, 1, 0, "all enabled");
      // a flipped check bit alone is corrected
      cfg = mk(1, 0, 0, 0);
      write(a, v); raw_flip(a, FLD_ECC, 32'(1) << (b1 % ECC_W));
      expect_read(a, v, 1, 1, 0, "ecc check bit");
    end

    // writes in one register leave the others alone
    cfg = mk(0, 0, 0, 0);
    for (int a = 0; a < REGS; a++) write(a, 32'hA5A5_0000 + a);
    for (int a = 0; a < REGS; a++) expect_read(a, 32'hA5A5_0000 + a, 0, 0, 0, "separate");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

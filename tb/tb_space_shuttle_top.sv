// tb_space_shuttle_top: end-to-end test of the whole core at its default
// size (32 registers, 8 banks). A reference model keeps every register's
// value and its four counters.
//  1. All 32 registers are written, 8 at a time through the 8 bank ports, and
//     read back the same way.
//  2. Faults are planted in single stored copies through the raw port and
//     the register is read under each protection setting: ECC single
//     correction, ECC double detection, triple-redundancy vote, shadow
//     detection and ECC-shadow repair. Word and flags are checked each time.
//  3. The register file is switched to the user clock, which the testbench
//     pulses by hand, and written and read there; the chip clock keeps
//     running and must not disturb it.
//  4. Back on the chip clock, every counter of both monitor copies and every
//     compare word is read over Wishbone and checked against the model.
// Every mechanism above is counted; one that never happened is a failure.
module tb_space_shuttle_top;
  import shuttle_pkg::*;

  localparam int NB = NUM_BANKS, RPB = NUM_REGS / NUM_BANKS, LAW = $clog2(RPB);

  logic              wb_clk = 0, rst = 1, user_clk = 0, clk_sel = 0;
  prot_cfg_t         cfg;
  logic              we [NB], re [NB], rvalid [NB], det [NB], corr [NB], uncorr [NB];
  logic [LAW-1:0]    waddr [NB], raddr [NB], raddr_q [NB];
  logic [DATA_W-1:0] wdata [NB], rdata [NB];
  logic              raw_we;
  logic [4:0]        raw_addr;
  field_e            raw_field;
  logic [DATA_W-1:0] raw_wdata, raw_rdata;
  logic              stb, cyc, wbwe, ack;
  logic [3:0]        sel;
  logic [31:0]       dat_w, dat_r, adr;

  logic [DATA_W-1:0] model [NUM_REGS];
  int unsigned       cnt_model [NUM_REGS][4];
  int checks = 0, failures = 0;
  bit umode = 0;

  typedef enum int {
    M_PARALLEL, M_ECC_CORR, M_ECC_DOUBLE, M_TMR_VOTE, M_SHADOW_DET, M_ESHADOW_FIX,
    M_USER_CLK, M_WB_READ, M_NUM
  } mech_e;
  int mech [M_NUM];

  space_shuttle_top dut (
    .wb_clk_i(wb_clk), .wb_rst_i(rst), .user_clk_i(user_clk), .clk_sel_i(clk_sel),
    .cfg_i(cfg), .we_i(we), .waddr_i(waddr), .wdata_i(wdata), .re_i(re), .raddr_i(raddr),
    .rvalid_o(rvalid), .raddr_o(raddr_q), .rdata_o(rdata), .det_o(det), .corr_o(corr),
    .uncorr_o(uncorr), .raw_we_i(raw_we), .raw_addr_i(raw_addr), .raw_field_i(raw_field),
    .raw_wdata_i(raw_wdata), .raw_rdata_o(raw_rdata),
    .wbs_stb_i(stb), .wbs_cyc_i(cyc), .wbs_we_i(wbwe), .wbs_sel_i(sel), .wbs_dat_i(dat_w),
    .wbs_adr_i(adr), .wbs_ack_o(ack), .wbs_dat_o(dat_r));

  always #5 wb_clk = ~wb_clk;

  initial begin
    repeat (200000) @(posedge wb_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- register file clocking: chip clock or hand-pulsed user clock
  task automatic rf_low();
    if (umode) #2;
    else @(negedge wb_clk);
  endtask
  task automatic rf_edge();
    if (umode) begin user_clk = 1; #1; end
    else begin @(posedge wb_clk); #1; end
  endtask
  task automatic rf_end();  // bring the user clock back low
    if (umode) begin #1; user_clk = 0; end
  endtask

  task automatic idle();
    for (int b = 0; b < NB; b++) begin we[b] = 0; re[b] = 0; end
    raw_we = 0;
  endtask

  task automatic tick_idle();
    rf_low(); idle(); rf_edge(); rf_end();
  endtask

  // write the given registers (at most one per bank) in one cycle
  task automatic write_regs(int regs [$], logic [DATA_W-1:0] vals [$]);
    rf_low();
    idle();
    foreach (regs[i]) begin
      int b = regs[i] / RPB;
      we[b] = 1; waddr[b] = LAW'(regs[i] % RPB); wdata[b] = vals[i];
      model[regs[i]] = vals[i];
      cnt_model[regs[i]][CNT_WRITE]++;
    end
    rf_edge();
    idle();
    rf_end();
  endtask

  // read the given registers in one cycle, expect the flags given per register
  task automatic read_regs(int regs [$], logic e_det [$], logic e_corr [$], bit chk_data [$]);
    rf_low();
    idle();
    foreach (regs[i]) begin
      int b = regs[i] / RPB;
      re[b] = 1; raddr[b] = LAW'(regs[i] % RPB);
    end
    rf_edge();
    idle();
    foreach (regs[i]) begin
      int b = regs[i] / RPB;
      int r = regs[i];
      checks++;
      if (!rvalid[b] || raddr_q[b] !== LAW'(r % RPB) || (chk_data[i] && rdata[b] !== model[r]) ||
          det[b] !== e_det[i] || corr[b] !== e_corr[i] || uncorr[b] !== (e_det[i] && !e_corr[i])) begin
        failures++;
        $display("FAIL read reg %0d: data=%h exp=%h det=%b corr=%b uncorr=%b (exp %b %b)",
                 r, rdata[b], model[r], det[b], corr[b], uncorr[b], e_det[i], e_corr[i]);
      end
      cnt_model[r][CNT_READ]++;
      if (e_det[i])  cnt_model[r][CNT_DETECTED]++;
      if (e_corr[i]) cnt_model[r][CNT_CORRECTED]++;
    end
    rf_end();
  endtask

  task automatic read_one(int r, logic e_det, logic e_corr, bit chk_data = 1);
    read_regs('{r}, '{e_det}, '{e_corr}, '{chk_data});
  endtask

  task automatic flip(int r, field_e f, logic [DATA_W-1:0] mask);
    rf_low();
    idle();
    raw_addr = 5'(r); raw_field = f;
    #1;
    raw_wdata = raw_rdata ^ mask;
    raw_we = 1;
    rf_edge();
    idle();
    rf_end();
  endtask

  // ---- Wishbone master
  task automatic wb_read(logic [31:0] a, output logic [31:0] d);
    @(negedge wb_clk);
    adr = a; wbwe = 0; stb = 1; cyc = 1; sel = 4'hF;
    do begin @(posedge wb_clk); #1; end while (!ack);
    d = dat_r;
    @(negedge wb_clk);
    stb = 0; cyc = 0;
    mech[M_WB_READ]++;
  endtask

  function automatic prot_cfg_t mk(bit e, bit t, bit s, bit es);
    prot_cfg_t c;
    c.ecc = e; c.tmr = t; c.shadow = s; c.ecc_shadow = es;
    return c;
  endfunction

  task automatic write_one(int r, logic [DATA_W-1:0] v);
    write_regs('{r}, '{v});
  endtask

  task automatic parallel_pass();
    for (int l = 0; l < RPB; l++) begin
      int regs [$];
      logic [DATA_W-1:0] vals [$];
      logic ed [$], ec [$];
      bit cd [$];
      for (int b = 0; b < NB; b++) begin
        regs.push_back(b * RPB + l);
        vals.push_back($urandom);
        ed.push_back(0); ec.push_back(0); cd.push_back(1);
      end
      write_regs(regs, vals);
      read_regs(regs, ed, ec, cd);
      mech[M_PARALLEL]++;
    end
  endtask

  task automatic fault_pass();
    for (int n = 0; n < 6; n++) begin
      int r;
      logic [DATA_W-1:0] v, m1, m2;
      r  = $urandom_range(NUM_REGS - 1);
      v  = $urandom;
      m1 = 32'(1) << $urandom_range(15);
      m2 = m1 | (32'(1) << $urandom_range(31, 16));
      cfg = mk(1, 0, 0, 0);
      write_one(r, v); flip(r, FLD_DATA, m1);
      read_one(r, 1, 1); mech[M_ECC_CORR]++;
      flip(r, FLD_DATA, m2 ^ m1);
      read_one(r, 1, 0, 0); mech[M_ECC_DOUBLE]++;
      cfg = mk(0, 1, 0, 0);
      write_one(r, v); flip(r, FLD_COPY2, m2);
      read_one(r, 1, 1); mech[M_TMR_VOTE]++;
      cfg = mk(0, 0, 1, 0);
      write_one(r, v); flip(r, FLD_SHADOW, m1);
      read_one(r, 1, 0); mech[M_SHADOW_DET]++;
      cfg = mk(0, 0, 0, 1);
      write_one(r, v); flip(r, FLD_DATA, m2);
      read_one(r, 1, 1); mech[M_ESHADOW_FIX]++;
      cfg = mk(1, 1, 0, 1);
      write_one(r, v); read_one(r, 0, 0);
    end
  endtask

  initial begin
    logic [31:0] d;
    idle();
    cfg = '0;
    stb = 0; cyc = 0; wbwe = 0; sel = '0; dat_w = '0; adr = '0;
    raw_addr = '0; raw_field = FLD_DATA; raw_wdata = '0;
    for (int b = 0; b < NB; b++) begin waddr[b] = '0; raddr[b] = '0; wdata[b] = '0; end
    for (int r = 0; r < NUM_REGS; r++) begin
      model[r] = '0;
      for (int t = 0; t < 4; t++) cnt_model[r][t] = 0;
    end
    for (int m = 0; m < M_NUM; m++) mech[m] = 0;
    repeat (3) @(posedge wb_clk);
    @(negedge wb_clk) rst = 0;

    // 1-2 on the chip clock
    cfg = mk(1, 1, 0, 1);
    parallel_pass();
    fault_pass();
    tick_idle();

    // 3 on the user clock: switch while both clocks are low
    @(negedge wb_clk);
    clk_sel = 1;
    umode = 1;
    #1;
    repeat (7) @(posedge wb_clk);  // chip clock alone must change nothing
    cfg = mk(1, 1, 0, 1);
    parallel_pass();
    fault_pass();
    tick_idle();
    mech[M_USER_CLK]++;
    @(negedge wb_clk);
    umode = 0;
    clk_sel = 0;

    // 4 read back all counters of both copies and the compare words
    @(negedge wb_clk);
    for (int r = 0; r < NUM_REGS; r++) begin
      for (int t = 0; t < 4; t++) begin
        logic [31:0] base;
        base = 32'h3000_0000 | 32'(r << 5) | 32'(t << 3);
        wb_read(base, d);
        checks++;
        if (d !== cnt_model[r][t]) begin
          failures++;
          $display("FAIL counter A reg %0d kind %0d = %0d, expected %0d", r, t, d, cnt_model[r][t]);
        end
        wb_read(base | 32'h4, d);
        checks++;
        if (d !== cnt_model[r][t]) begin
          failures++;
          $display("FAIL counter B reg %0d kind %0d = %0d, expected %0d", r, t, d, cnt_model[r][t]);
        end
        wb_read(base | 32'h400, d);
        checks++;
        if (d !== 32'h0) begin failures++; $display("FAIL copies differ reg %0d", r); end
      end
    end

    for (int m = 0; m < M_NUM; m++) begin
      checks++;
      $display("mechanism %s happened %0d times", mech_e'(m), mech[m]);
      if (mech[m] == 0) begin failures++; $display("FAIL mechanism %s never happened", mech_e'(m)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

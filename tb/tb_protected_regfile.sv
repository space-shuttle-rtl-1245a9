// tb_protected_regfile: writes all 32 registers through the 8 bank ports in
// parallel (one register per bank per cycle), reads them all back in
// parallel and checks every word, bank-local address and the one-cycle
// latency. Then flips bits through the raw port addressed by full register
// number and checks that exactly the intended register in the intended bank
// reports the error, and that ECC repairs it.
module tb_protected_regfile;
  import shuttle_pkg::*;

  localparam int NB = NUM_BANKS, RPB = NUM_REGS / NUM_BANKS, LAW = $clog2(RPB);

  logic              clk = 0, rst = 1;
  prot_cfg_t         cfg;
  logic              we [NB], re [NB], rvalid [NB], det [NB], corr [NB], uncorr [NB];
  logic [LAW-1:0]    waddr [NB], raddr [NB], raddr_q [NB];
  logic [DATA_W-1:0] wdata [NB], rdata [NB];
  logic              raw_we;
  logic [4:0]        raw_addr;
  field_e            raw_field;
  logic [DATA_W-1:0] raw_wdata, raw_rdata;
  logic [DATA_W-1:0] model [NUM_REGS];
  int checks = 0, failures = 0;

  protected_regfile dut (
    .clk, .rst, .cfg_i(cfg), .we_i(we), .waddr_i(waddr), .wdata_i(wdata),
    .re_i(re), .raddr_i(raddr), .rvalid_o(rvalid), .raddr_o(raddr_q), .rdata_o(rdata),
    .det_o(det), .corr_o(corr), .uncorr_o(uncorr),
    .raw_we_i(raw_we), .raw_addr_i(raw_addr), .raw_field_i(raw_field),
    .raw_wdata_i(raw_wdata), .raw_rdata_o(raw_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    for (int b = 0; b < NB; b++) begin we[b] = 0; re[b] = 0; end
    raw_we = 0;
  endtask

  // read local address l of every bank at once, expect model and flags
  task automatic read_all(int l, int err_reg, logic e_det, logic e_corr);
    @(negedge clk);
    idle();
    for (int b = 0; b < NB; b++) begin re[b] = 1; raddr[b] = LAW'(l); end
    @(posedge clk);
    #1;
    idle();
    for (int b = 0; b < NB; b++) begin
      int r = b * RPB + l;
      logic ed = (r == err_reg) ? e_det : 1'b0;
      logic ec = (r == err_reg) ? e_corr : 1'b0;
      checks++;
      if (!rvalid[b] || raddr_q[b] !== LAW'(l) || rdata[b] !== model[r] ||
          det[b] !== ed || corr[b] !== ec || uncorr[b] !== 1'b0) begin
        failures++;
        $display("FAIL reg %0d: v=%b data=%h exp=%h det=%b corr=%b", r, rvalid[b], rdata[b],
                 model[r], det[b], corr[b]);
      end
    end
  endtask

  initial begin
    idle();
    cfg = '0;
    raw_addr = '0; raw_field = FLD_DATA; raw_wdata = '0;
    for (int b = 0; b < NB; b++) begin waddr[b] = '0; raddr[b] = '0; wdata[b] = '0; end
    for (int r = 0; r < NUM_REGS; r++) model[r] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;

    for (int round = 0; round < 4; round++) begin
      cfg = '0;
      cfg.ecc = 1'b1;
      for (int l = 0; l < RPB; l++) begin
        @(negedge clk);
        idle();
        for (int b = 0; b < NB; b++) begin
          we[b] = 1; waddr[b] = LAW'(l); wdata[b] = $urandom;
          model[b * RPB + l] = wdata[b];
        end
      end
      @(negedge clk) idle();
      for (int l = 0; l < RPB; l++) read_all(l, -1, 0, 0);

      // raw access by full register number
      for (int k = 0; k < 8; k++) begin
        int r;
        r = $urandom_range(NUM_REGS - 1);
        @(negedge clk);
        raw_addr = 5'(r); raw_field = FLD_SHADOW;
        #1;
        checks++;
        if (raw_rdata !== model[r]) begin failures++; $display("FAIL raw read reg %0d", r); end
        raw_field = FLD_DATA;
        raw_wdata = model[r] ^ (32'(1) << $urandom_range(31));
        raw_we = 1;
        @(negedge clk) idle();
        read_all(r % RPB, r, 1, 1);  // ECC repairs, only register r flagged
        // restore
        @(negedge clk);
        raw_field = FLD_DATA; raw_wdata = model[r]; raw_we = 1;
        @(negedge clk) idle();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

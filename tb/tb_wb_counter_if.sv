// tb_wb_counter_if: a Wishbone master issues reads of every counter word,
// copy A and copy B, and of the compare words, plus writes and an access
// outside the slave's window. The counter values are produced by a function
// of the selected register and kind, so each read has a known answer. Checks
// the data, that the acknowledge comes exactly one clock after the request,
// and that the outside access is never acknowledged.
module tb_wb_counter_if;
  import shuttle_pkg::*;

  logic        clk = 0, rst = 1;
  logic        stb, cyc, we, ack;
  logic [3:0]  sel;
  logic [31:0] dat_w, dat_r, adr;
  logic [4:0]  creg;
  cnt_e        ctype;
  logic [31:0] ca, cb;
  logic        cmis;
  int checks = 0, failures = 0;

  wb_counter_if dut (.wb_clk_i(clk), .wb_rst_i(rst), .wbs_stb_i(stb), .wbs_cyc_i(cyc),
                     .wbs_we_i(we), .wbs_sel_i(sel), .wbs_dat_i(dat_w), .wbs_adr_i(adr),
                     .wbs_ack_o(ack), .wbs_dat_o(dat_r), .cnt_reg_o(creg), .cnt_type_o(ctype),
                     .cnt_a_i(ca), .cnt_b_i(cb), .cnt_mismatch_i(cmis));

  function automatic logic [31:0] val(int r, int t, int copy);
    return 32'h1000_0000 * (copy + 1) + 32'(r * 16 + t);
  endfunction

  // counter source: copy B differs from A for odd registers of kind 3
  always_comb begin
    ca   = val(int'(creg), int'(ctype), 0);
    cb   = (creg[0] && ctype == CNT_CORRECTED) ? val(int'(creg), int'(ctype), 1) : ca;
    cmis = (ca != cb);
  end

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(logic [31:0] a, logic w, logic [31:0] exp, logic exp_ack);
    @(negedge clk);
    adr = a; we = w; stb = 1; cyc = 1; dat_w = $urandom; sel = 4'hF;
    @(posedge clk);
    #1;
    // acknowledge must follow one clock after the request
    checks++;
    if (ack !== exp_ack) begin
      failures++;
      $display("FAIL adr=%h ack=%b expected %b", a, ack, exp_ack);
    end else if (exp_ack && !w && dat_r !== exp) begin
      failures++;
      $display("FAIL adr=%h data=%h expected %h", a, dat_r, exp);
    end
    @(negedge clk);
    stb = 0; cyc = 0; we = 0;
    @(posedge clk);
    #1;
    checks++;
    if (ack !== 1'b0) begin failures++; $display("FAIL ack held"); end
  endtask

  initial begin
    stb = 0; cyc = 0; we = 0; sel = '0; dat_w = '0; adr = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int r = 0; r < NUM_REGS; r++) begin
      for (int t = 0; t < 4; t++) begin
        logic [31:0] base;
        logic [31:0] eb;
        base = 32'h3000_0000 | 32'(r << 5) | 32'(t << 3);
        eb   = (r % 2 == 1 && t == 3) ? val(r, t, 1) : val(r, t, 0);
        access(base, 0, val(r, t, 0), 1);
        access(base | 32'h4, 0, eb, 1);
        access(base | 32'h400, 0, {31'b0, eb != val(r, t, 0)}, 1);
      end
    end
    access(32'h3000_0800, 0, 32'h0, 1);       // unused offset reads zero
    access(32'h3000_0020, 1, 32'h0, 1);       // write: acknowledged
    access(32'h3000_0020, 0, val(1, 0, 0), 1); // ... and without effect
    access(32'h3001_0020, 0, 32'h0, 0);       // outside window: no ack
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

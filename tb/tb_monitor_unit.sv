// tb_monitor_unit: drives random per-bank write and read events with random
// detected/corrected flags (corrected only with detected) and keeps its own
// count per register and kind. Samples random counters during the run and
// checks all 128 counters at the end through the read-out port.
module tb_monitor_unit;
  import shuttle_pkg::*;

  localparam int NB = NUM_BANKS, RPB = NUM_REGS / NUM_BANKS, LAW = $clog2(RPB);

  logic           clk = 0, rst = 1;
  logic           we [NB], rv [NB], det [NB], corr [NB];
  logic [LAW-1:0] wa [NB], ra [NB];
  logic [4:0]     sel_reg;
  cnt_e           sel_type;
  logic [31:0]    value;
  int unsigned    model [NUM_REGS][4];
  int checks = 0, failures = 0;

  monitor_unit dut (.clk, .rst, .we_i(we), .waddr_i(wa), .rvalid_i(rv), .raddr_i(ra),
                    .det_i(det), .corr_i(corr), .rd_reg_i(sel_reg), .rd_type_i(sel_type),
                    .rd_value_o(value));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_counter(int r, int t);
    sel_reg = 5'(r); sel_type = cnt_e'(t);
    #1;
    checks++;
    if (value !== model[r][t]) begin
      failures++;
      $display("FAIL reg %0d kind %0d: %0d expected %0d", r, t, value, model[r][t]);
    end
  endtask

  initial begin
    for (int r = 0; r < NUM_REGS; r++) for (int t = 0; t < 4; t++) model[r][t] = 0;
    for (int b = 0; b < NB; b++) begin
      we[b] = 0; rv[b] = 0; det[b] = 0; corr[b] = 0; wa[b] = '0; ra[b] = '0;
    end
    sel_reg = '0; sel_type = CNT_WRITE;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // counters updated by the previous edge
      if (n % 7 == 0) check_counter($urandom_range(NUM_REGS - 1), $urandom_range(3));
      for (int b = 0; b < NB; b++) begin
        we[b]   = ($urandom_range(2) == 0);
        wa[b]   = LAW'($urandom);
        rv[b]   = ($urandom_range(1) == 0);
        ra[b]   = LAW'($urandom);
        det[b]  = rv[b] && ($urandom_range(3) == 0);
        corr[b] = det[b] && ($urandom_range(1) == 0);
        if (we[b])   model[b * RPB + wa[b]][CNT_WRITE]++;
        if (rv[b])   model[b * RPB + ra[b]][CNT_READ]++;
        if (det[b])  model[b * RPB + ra[b]][CNT_DETECTED]++;
        if (corr[b]) model[b * RPB + ra[b]][CNT_CORRECTED]++;
      end
    end
    @(negedge clk);
    for (int b = 0; b < NB; b++) begin we[b] = 0; rv[b] = 0; det[b] = 0; corr[b] = 0; end
    @(negedge clk);
    for (int r = 0; r < NUM_REGS; r++) for (int t = 0; t < 4; t++) check_counter(r, t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_secded_decoder: encodes random words with a reference extended Hamming
// encoder of its own (Hamming bit i = XOR of data bits whose codeword position
// has bit i set, plus overall even parity), then presents the decoder with the
// clean word, with every possible single flip among the 39 bits, and with
// random double flips. Checks the corrected data and the single/double flags.
module tb_secded_decoder;
  import shuttle_pkg::*;

  logic [DATA_W-1:0] din, dout;
  logic [ECC_W-1:0]  cin;
  logic              single, double;
  int checks = 0, failures = 0;

  secded_decoder dut (.data_i(din), .chk_i(cin), .data_o(dout),
                      .single_o(single), .double_o(double));

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

  task automatic apply(logic [DATA_W+ECC_W-1:0] cw, logic [DATA_W-1:0] exp_d,
                       logic exp_s, logic exp_db, logic check_data);
    {cin, din} = cw;
    #1;
    checks++;
    if (single !== exp_s || double !== exp_db || (check_data && dout !== exp_d)) begin
      failures++;
      $display("FAIL cw=%h out=%h exp=%h s=%b d=%b", cw, dout, exp_d, single, double);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 60; n++) begin
      logic [DATA_W-1:0]        w;
      logic [DATA_W+ECC_W-1:0]  cw, bad;
      int a, b;
      w  = (n == 0) ? '0 : $urandom;
      cw = {ref_enc(w), w};
      apply(cw, w, 1'b0, 1'b0, 1'b1);
      for (int i = 0; i < DATA_W + ECC_W; i++) begin
        bad = cw;
        bad[i] = ~bad[i];
        apply(bad, w, 1'b1, 1'b0, 1'b1);
      end
      for (int k = 0; k < 20; k++) begin
        a = $urandom_range(DATA_W + ECC_W - 1);
        do b = $urandom_range(DATA_W + ECC_W - 1); while (b == a);
        bad = cw;
        bad[a] = ~bad[a];
        bad[b] = ~bad[b];
        apply(bad, w, 1'b0, 1'b1, 1'b0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

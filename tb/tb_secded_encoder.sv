// tb_secded_encoder: checks the SECDED encoder by the defining property of a
// Hamming code rather than by recomputing it the same way. The data and the
// six Hamming bits are laid out at their codeword positions 1..38 (Hamming
// bits at 1, 2, 4, 8, 16, 32); the XOR of the positions of all set bits must
// then be zero, and the weight of the whole 39-bit word (with chk[6]) even.
// Also checks that a word with one set data bit gets its position as check
// bits, and that zero encodes to zero.
module tb_secded_encoder;
  import shuttle_pkg::*;

  logic [DATA_W-1:0] data;
  logic [ECC_W-1:0]  chk;
  int checks = 0, failures = 0;

  secded_encoder dut (.data_i(data), .chk_o(chk));

  // Positions that are not powers of two, in order, hold the data bits.
  function automatic int pos_of(int d);
    int p = 0, n = -1;
    while (n < d) begin
      p++;
      if ((p & (p - 1)) != 0) n++;
    end
    return p;
  endfunction

  task automatic check_word(logic [DATA_W-1:0] w);
    int syn;
    int weight;
    data = w;
    #1;
    syn = 0;
    weight = 0;
    for (int d = 0; d < DATA_W; d++) if (w[d]) begin syn ^= pos_of(d); weight++; end
    for (int i = 0; i < ECC_W - 1; i++) if (chk[i]) begin syn ^= (1 << i); weight++; end
    if (chk[ECC_W-1]) weight++;
    checks++;
    if (syn != 0 || (weight % 2) != 0) begin
      failures++;
      $display("FAIL data=%h chk=%b syndrome=%0d weight=%0d", w, chk, syn, weight);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data = '0;
    #1;
    checks++;
    if (chk !== '0) begin failures++; $display("FAIL zero word chk=%b", chk); end
    for (int d = 0; d < DATA_W; d++) begin
      data = DATA_W'(1) << d;
      #1;
      checks++;
      // one data bit: Hamming bits = its position, overall parity = 1 ^ parity(position)
      if (chk[ECC_W-2:0] != 6'(pos_of(d)) || chk[ECC_W-1] != ~(^6'(pos_of(d)))) begin
        failures++;
        $display("FAIL one-hot bit %0d chk=%b", d, chk);
      end
      check_word(DATA_W'(1) << d);
    end
    for (int n = 0; n < 500; n++) check_word($urandom);
    check_word('1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

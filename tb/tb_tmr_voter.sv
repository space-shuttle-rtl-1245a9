// tb_tmr_voter: random triples with zero, one or two copies corrupted; the
// expected vote is computed bit by bit by counting ones, and the mismatch
// flag against direct equality of the copies.
module tb_tmr_voter;
  logic [31:0] a, b, c, v;
  logic        mis;
  int checks = 0, failures = 0;

  tmr_voter #(.W(32)) dut (.a_i(a), .b_i(b), .c_i(c), .vote_o(v), .mismatch_o(mis));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      logic [31:0] base, exp;
      logic        exp_mis;
      base = $urandom;
      a = base; b = base; c = base;
      case (n % 4)
        1: a ^= $urandom;
        2: b ^= $urandom;
        3: begin c ^= $urandom; a ^= $urandom; end
        default: ;
      endcase
      #1;
      for (int i = 0; i < 32; i++) exp[i] = (int'(a[i]) + int'(b[i]) + int'(c[i])) >= 2;
      exp_mis = !(a == b && b == c);
      checks++;
      if (v !== exp || mis !== exp_mis) begin
        failures++;
        $display("FAIL a=%h b=%h c=%h v=%h mis=%b", a, b, c, v, mis);
      end
      // a single corrupted copy must be fully outvoted
      if (n % 4 == 1 || n % 4 == 2) begin
        checks++;
        if (v !== base) begin failures++; $display("FAIL single copy not repaired"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

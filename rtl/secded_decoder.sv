// secded_decoder: checks a 32-bit word against its SECDED check bits (as made
// by secded_encoder) and corrects a single flipped bit.
//
// The 6-bit syndrome is the XOR of the stored Hamming bits with those computed
// again from the stored data; it is the codeword position of a single flipped
// bit. The overall parity tells single (odd) from double (even) errors:
//   syndrome 0, parity even      no error
//   parity odd                   single error: the bit at the syndrome
//                                position is flipped back (syndrome 0 or a
//                                power of two means a check bit flipped, and
//                                the data is already correct)
//   syndrome != 0, parity even   double error: detected, not corrected
// A syndrome beyond position 38 with odd parity cannot come from one flip and
// is reported as a double error. Purely combinational.
module secded_decoder
  import shuttle_pkg::*;
(
  input  logic [DATA_W-1:0] data_i,     // stored word
  input  logic [ECC_W-1:0]  chk_i,      // stored check bits
  output logic [DATA_W-1:0] data_o,     // corrected word
  output logic              single_o,   // one bit was wrong and is corrected
  output logic              double_o    // uncorrectable error detected
);

  localparam int unsigned MAX_POS = DATA_W + ECC_W - 1;  // 38

  logic [ECC_W-1:0] recomputed;
  logic [ECC_W-2:0] syndrome;
  logic             parity_odd;

  secded_encoder u_enc (.data_i(data_i), .chk_o(recomputed));

  // POS[d*(ECC_W-1) +: ECC_W-1]: codeword position of data bit d (positions
  // that are not powers of two, in increasing order).
  typedef logic [DATA_W*(ECC_W-1)-1:0] pos_t;

  function automatic pos_t data_positions();
    pos_t        t;
    int unsigned d;
    t = '0;
    d = 0;
    for (int unsigned p = 1; d < DATA_W; p++) begin
      if ((p & (p - 1)) != 0) begin
        t[d*(ECC_W-1) +: (ECC_W-1)] = (ECC_W-1)'(p);
        d++;
      end
    end
    return t;
  endfunction

  localparam pos_t POS = data_positions();

  // recomputed[ECC_W-1], the overall parity, is not needed: the parity of
  // the stored bits is taken directly.
  logic unused_parity;
  assign unused_parity = recomputed[ECC_W-1];

  logic [DATA_W-1:0] flip;

  assign syndrome   = chk_i[ECC_W-2:0] ^ recomputed[ECC_W-2:0];
  assign parity_odd = (^data_i) ^ (^chk_i);

  for (genvar d = 0; d < DATA_W; d++) begin : g_fix
    assign flip[d] = (syndrome == POS[d*(ECC_W-1) +: (ECC_W-1)]);
  end

  always_comb begin
    data_o   = data_i;
    single_o = 1'b0;
    double_o = 1'b0;
    if (parity_odd) begin
      if (32'(syndrome) > MAX_POS) begin
        double_o = 1'b1;
      end else begin
        single_o = 1'b1;
        data_o   = data_i ^ flip;
      end
    end else if (syndrome != '0) begin
      double_o = 1'b1;
    end
  end

endmodule

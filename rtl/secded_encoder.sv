// secded_encoder: SECDED (single error correct, double error detect) check
// bits for one 32-bit word.
//
// The code is an extended Hamming code. The 32 data bits occupy, in order,
// the positions 1..38 of a Hamming codeword that are not powers of two
// (3, 5, 6, 7, 9, ... 38). Check bit chk[i], i = 0..5, is the XOR of the data
// bits whose position has bit i set; chk[6] is the overall parity of the data
// and chk[5:0], so every valid codeword has even weight. The all-zero word has
// all-zero check bits, so registers reset to zero hold a valid codeword.
// The document asks for 1-bit correction with ECC; the particular code and bit
// order are this design's choice. Purely combinational, no clock.
module secded_encoder
  import shuttle_pkg::*;
(
  input  logic [DATA_W-1:0] data_i,  // word to protect
  output logic [ECC_W-1:0]  chk_o    // its check bits
);

  // MASKS[i*DATA_W +: DATA_W] selects the data bits whose codeword position
  // has bit i set.
  typedef logic [(ECC_W-1)*DATA_W-1:0] mask_t;

  function automatic mask_t hamming_masks();
    mask_t       m;
    int unsigned d;
    m = '0;
    d = 0;
    for (int unsigned p = 1; d < DATA_W; p++) begin
      if ((p & (p - 1)) != 0) begin   // not a power of two: a data position
        for (int unsigned i = 0; i < ECC_W - 1; i++) m[i*DATA_W + d] = p[i];
        d++;
      end
    end
    return m;
  endfunction

  localparam mask_t MASKS = hamming_masks();

  logic [ECC_W-2:0] ham;

  for (genvar i = 0; i < ECC_W - 1; i++) begin : g_ham
    assign ham[i] = ^(data_i & MASKS[i*DATA_W +: DATA_W]);
  end

  assign chk_o = {(^data_i) ^ (^ham), ham};

endmodule

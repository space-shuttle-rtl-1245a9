// tmr_voter: bitwise two-out-of-three majority of three copies of a word,
// used by the triple redundancy protection. mismatch_o is set when the three
// copies are not all equal; the voted word is then the repaired value as long
// as no bit is wrong in two copies at once. Purely combinational.
module tmr_voter #(
  parameter int unsigned W = 32  // word width
) (
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  input  logic [W-1:0] c_i,
  output logic [W-1:0] vote_o,      // bitwise majority
  output logic         mismatch_o   // copies disagree somewhere
);

  always_comb begin
    vote_o     = (a_i & b_i) | (a_i & c_i) | (b_i & c_i);
    mismatch_o = (a_i != b_i) || (a_i != c_i);
  end

endmodule

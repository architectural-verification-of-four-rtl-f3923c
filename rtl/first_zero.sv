// first_zero: one-hot marker of the lowest clear bit of a vector.
//
// Output bit i is set when input bit i is 0 and every input bit below i is 1, i.e. the
// AND of all lower bits with the inverse of bit i, as in the first-zero logic of the
// renaming prioritizer. An all-ones input gives an all-zero output ("none found").
// Purely combinational; N is the number of register-file locations scanned.
module first_zero #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0] bits_i,
  output logic [N-1:0] first_o
);
  always_comb begin
    logic all_below;
    all_below = 1'b1;
    for (int i = 0; i < N; i++) begin
      first_o[i] = all_below & ~bits_i[i];
      all_below  = all_below & bits_i[i];
    end
  end
endmodule

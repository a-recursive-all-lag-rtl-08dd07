// Input adder of the recursive odd correlator.
//
// Forms e_n = d_n + d_{n-N}, the single scalar that multiplies the code vector in
// the recursion r̄_n = S̄ r̄_{n-1} + (d_n + d_{n-N}) c̄_{N-1}. It is the one adder
// outside the bank of N accumulator adders (N+1 adders in all). The sum is kept
// at full precision, one bit wider than a sample, so it never wraps.
//
// Purely combinational.
module input_adder #(
  parameter int unsigned DW = oddcorr_pkg::DW_DEFAULT
) (
  input  logic signed [DW-1:0] d_new,
  input  logic signed [DW-1:0] d_old,
  output logic signed [DW:0]   e
);

  always_comb e = $signed({d_new[DW-1], d_new}) + $signed({d_old[DW-1], d_old});

endmodule

// Bank of N code multipliers of the recursive odd correlator.
//
// Multiplies the combined sample e_n = d_n + d_{n-N} by every element of the
// last column of the odd-correlation matrix, c̄_{N-1} = [c_{N-1}, ..., c_1, c_0]^T.
// Output element i therefore carries e_n * c_{N-1-i}; it is added into the
// storage element that holds lag i of the correlation vector.
//
// Interface: code[k] is the reference-code chip c_k, a signed CW-bit value, held
// steady while the correlator runs (binary ±1 codes fit in the default CW = 2;
// multi-level codes need a wider CW). The products are full precision, EW+CW bits.
// Purely combinational: the N multipliers work in parallel on the same e_n.
module code_multiplier_bank #(
  parameter int unsigned N  = oddcorr_pkg::N_DEFAULT,
  parameter int unsigned EW = oddcorr_pkg::DW_DEFAULT + 1,
  parameter int unsigned CW = oddcorr_pkg::CW_DEFAULT
) (
  input  logic signed [EW-1:0]    e,
  input  logic signed [CW-1:0]    code [N],
  output logic signed [EW+CW-1:0] prod [N]
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      prod[i] = (EW+CW)'(e) * (EW+CW)'(code[N-1-i]);
    end
  end

endmodule

// Output storage of the recursive odd correlator, with its N adders and negator.
//
// Holds the all-lag odd-correlation vector r̄ and updates it once per accepted
// sample as r̄_n = S̄ r̄_{n-1} + p_n, where p_n = (d_n + d_{n-N}) c̄_{N-1} comes from
// the multiplier bank. S̄ is the inverting end-around shift: every element moves
// up one place (element i takes element i+1), and the element that wraps round
// from the top (element 0) is negated on its way into the bottom (element N-1).
// So each of the N registers is fed by one two-input adder, and the single
// negator sits on the wrap-around path.
//
// Interface: r_bar[m] is the stored odd correlation at lag m. A sample accepted
// with in_valid updates r_bar at the next clock edge, so r_bar shows r̄_n one cycle
// after d_n is presented, at one vector per sample. The storage starts at zero,
// as the method requires (r̄_0 = 0), through rst_n or the synchronous clear.
// Additions wrap modulo 2^AW; with AW from oddcorr_pkg::acc_width every stored
// value is an exact correlation that fits, so no wrap is ever visible.
module inverting_rotation_accumulator #(
  parameter int unsigned N  = oddcorr_pkg::N_DEFAULT,
  parameter int unsigned PW = oddcorr_pkg::DW_DEFAULT + 1 + oddcorr_pkg::CW_DEFAULT,
  parameter int unsigned AW = oddcorr_pkg::acc_width(oddcorr_pkg::N_DEFAULT,
                                                     oddcorr_pkg::DW_DEFAULT,
                                                     oddcorr_pkg::CW_DEFAULT)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 in_valid,
  input  logic signed [PW-1:0] prod  [N],
  output logic signed [AW-1:0] r_bar [N]
);

  logic signed [AW-1:0] shifted [N];   // S̄ r̄_{n-1}
  logic signed [AW-1:0] next    [N];   // r̄_n

  always_comb begin
    for (int i = 0; i < N - 1; i++) shifted[i] = r_bar[i+1];
    shifted[N-1] = -r_bar[0];          // the negator on the end-around path
    for (int i = 0; i < N; i++) next[i] = shifted[i] + AW'(prod[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) r_bar[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < N; i++) r_bar[i] <= '0;
    end else if (in_valid) begin
      r_bar <= next;
    end
  end

endmodule

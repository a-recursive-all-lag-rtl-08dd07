// Input shift register of the recursive odd correlator.
//
// Holds the N most recent samples. When a sample d_n is presented with in_valid,
// the register still holds d_{n-1} ... d_{n-N}; its last stage, d_{n-N}, is given
// on d_old during that cycle, and the clock edge shifts d_n in and drops d_{n-N}.
// The recursion needs exactly this sample: r̄_n depends on d_n + d_{n-N}.
//
// Interface: in_valid/d_in carry one sample per accepted cycle; with in_valid low
// nothing moves. d_old is a register output (no combinational path from d_in).
// All stages start at zero, as the method requires (d_0 = ... = d_{-(N-1)} = 0),
// through the asynchronous reset rst_n or the synchronous clear. The reset style
// and the clear input are this design's choice.
module sample_shift_register #(
  parameter int unsigned N  = oddcorr_pkg::N_DEFAULT,
  parameter int unsigned DW = oddcorr_pkg::DW_DEFAULT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] d_in,
  output logic signed [DW-1:0] d_old
);

  // stage[0] holds the newest sample, stage[N-1] the oldest.
  logic signed [DW-1:0] stage [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) stage[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < N; i++) stage[i] <= '0;
    end else if (in_valid) begin
      stage[0] <= d_in;
      for (int i = 1; i < N; i++) stage[i] <= stage[i-1];
    end
  end

  assign d_old = stage[N-1];

endmodule

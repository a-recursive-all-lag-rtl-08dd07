// Recursive all-lag reference-code correlator for odd correlations (top level).
//
// For every incoming sample d_n it produces the whole odd-correlation vector
// r̄_n = C̄ d_n: the correlation of the N most recent samples with all N cyclic
// lags of a length-N reference code, where the wrapped-around part of each lag
// enters with inverted sign. Instead of N parallel correlators (order N^2
// hardware) it uses the recursion
//     r̄_n = S̄ r̄_{n-1} + (d_n + d_{n-N}) c̄_{N-1},
// S̄ being the inverting end-around shift and c̄_{N-1} = [c_{N-1}, ..., c_0]^T.
// The datapath is the method's: a length-N sample shift register, one input
// adder, N multipliers, N accumulator adders, one negator and N output
// registers (order N hardware).
//
// Interface: present a sample on d_in with in_valid high; r_bar holds r̄_n from
// the next clock edge on, with out_valid high for that one cycle. in_valid may be
// low on any cycle; then nothing changes. code[k] = c_k must stay steady once a
// sample has been taken; change it only while no sample has been taken since
// reset or clear (an assertion checks this). rst_n (asynchronous) and clear
// (synchronous) zero the shift register and the output storage, the initial
// condition the recursion needs. r_full goes high once N samples have been taken
// since reset or clear: from then on r_bar is the exact odd correlation of the
// last N samples; before that it is the same sum with the missing, older samples
// taken as zero. The valid flags, the clear input and r_full are this design's
// own choices; the sizes N, DW and CW are free parameters.
module recursive_odd_correlator
  import oddcorr_pkg::*;
#(
  parameter int unsigned N  = N_DEFAULT,
  parameter int unsigned DW = DW_DEFAULT,
  parameter int unsigned CW = CW_DEFAULT,
  localparam int unsigned AW = acc_width(N, DW, CW)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic signed [CW-1:0] code [N],
  input  logic                 in_valid,
  input  logic signed [DW-1:0] d_in,
  output logic                 out_valid,
  output logic                 r_full,
  output logic signed [AW-1:0] r_bar [N]
);

  localparam int unsigned EW = DW + 1;        // width of d_n + d_{n-N}
  localparam int unsigned PW = EW + CW;       // width of one product
  localparam int unsigned CNTW = $clog2(N + 1);

  logic signed [DW-1:0] d_old;
  logic signed [EW-1:0] e;
  logic signed [PW-1:0] prod [N];
  logic [CNTW-1:0]      taken;                // samples since clear, saturating at N

  sample_shift_register #(.N(N), .DW(DW)) u_shift (
    .clk, .rst_n, .clear, .in_valid, .d_in, .d_old
  );

  input_adder #(.DW(DW)) u_add (
    .d_new(d_in), .d_old, .e
  );

  code_multiplier_bank #(.N(N), .EW(EW), .CW(CW)) u_mul (
    .e, .code, .prod
  );

  inverting_rotation_accumulator #(.N(N), .PW(PW), .AW(AW)) u_acc (
    .clk, .rst_n, .clear, .in_valid, .prod, .r_bar
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      taken     <= '0;
    end else if (clear) begin
      out_valid <= 1'b0;
      taken     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid && taken != CNTW'(N)) taken <= taken + 1'b1;
    end
  end

  assign r_full = (taken == CNTW'(N));

  // Interface rule: once a sample has been taken, the stored vector depends on
  // the code, so the code must hold until the next reset or clear.
  logic [N*CW-1:0] code_flat;
  always_comb for (int k = 0; k < N; k++) code_flat[k*CW +: CW] = code[k];

  a_code_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                  (taken != '0 && !clear) |-> $stable(code_flat))
    else $error("code changed while samples were being correlated");

endmodule

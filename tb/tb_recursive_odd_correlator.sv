// End-to-end testbench for recursive_odd_correlator at its default sizes
// (N = 31 lags, 8-bit samples, 2-bit code chips).
//
// Every output vector is compared, element by element, with the odd correlation
// computed directly from its definition, r̄_n = C̄ d_n: row m of C̄ is the code
// rotated right by m places with the wrapped-around chips negated, and d_n holds
// the last N accepted samples (zeros before the first N). out_valid must follow
// in_valid by exactly one clock (one vector per sample, one cycle of latency),
// and r_full must rise on the N-th accepted sample.
//
// Three runs, separated by a synchronous clear:
//   1. a length-31 m-sequence as code, full-range random samples, random stalls;
//   2. a random code using every 2-bit chip value (-2 included), random samples;
//   3. code acquisition of a data-modulated spread-spectrum signal: the samples
//      are the code, phase-shifted, times random ±1 symbols of one code period.
//      Whenever the N-sample window spans a symbol transition (or starts on a
//      symbol boundary), the largest |r̄_m| must be at the lag m where the code
//      period begins, with magnitude N times the amplitude, and no other lag may
//      reach it.
// Mechanisms counted, each of which must occur: stalled cycles, a nonzero value
// through the negating wrap-around, the d_{n-N} term being nonzero, clears,
// r_full rising, code changes, and acquisitions.
module tb_recursive_odd_correlator;
  import oddcorr_pkg::*;
  localparam int unsigned N  = N_DEFAULT;
  localparam int unsigned DW = DW_DEFAULT;
  localparam int unsigned CW = CW_DEFAULT;
  localparam int unsigned AW = acc_width(N, DW, CW);
  localparam int          AMP = 100;     // signal amplitude in run 3

  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic signed [CW-1:0] code [N];
  logic signed [DW-1:0] d_in = '0;
  logic                 out_valid, r_full;
  logic signed [AW-1:0] r_bar [N];

  int checks = 0, failures = 0;
  int hist[$];                      // accepted samples since clear, oldest first
  int c [N];                        // code as integers
  bit prev_valid = 0;
  int n_stall = 0, n_wrap = 0, n_old = 0, n_clear = 0, n_full = 0, n_code = 0, n_acq = 0;
  bit full_prev = 0;

  recursive_odd_correlator dut (
    .clk, .rst_n, .clear, .code, .in_valid, .d_in, .out_valid, .r_full, .r_bar
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endfunction

  // direct evaluation of row m of C̄ times the data vector
  function automatic int ref_lag(int m);
    int s = 0;
    for (int k = 0; k < N; k++) begin
      int idx = hist.size() - N + k;         // position of d_{n-(N-1)+k}
      int d = (idx >= 0) ? hist[idx] : 0;
      int coef = (k >= m) ? c[k-m] : -c[N+k-m];
      s += coef * d;
    end
    return s;
  endfunction

  function automatic int mag(int v);
    return (v < 0) ? -v : v;
  endfunction

  task automatic set_code(input int v [N]);
    for (int k = 0; k < N; k++) begin c[k] = v[k]; code[k] = CW'(v[k]); end
    n_code++;
  endtask

  task automatic do_clear();
    @(negedge clk);
    clear = 1; in_valid = 0;
    @(posedge clk);
    #1 clear = 0;
    hist.delete();
    prev_valid = 0;
    full_prev = 0;
    n_clear++;
    checks++;
    if (r_full) fail("r_full high after clear");
    for (int m = 0; m < N; m++) begin
      checks++;
      if (r_bar[m] != 0) fail($sformatf("lag %0d not zero after clear", m));
    end
  endtask

  // one clock: present (v, d), then compare everything after the edge
  task automatic step(input bit v, input int d);
    @(negedge clk);
    in_valid = v;
    d_in = DW'(d);
    if (!v) n_stall++;
    if (v && hist.size() >= N && hist[hist.size()-N] != 0) n_old++;
    if (v && dut.r_bar[0] != 0) n_wrap++;
    @(posedge clk);
    #1;
    if (v) hist.push_back(d);
    checks++;
    if (out_valid !== v) fail("out_valid does not follow in_valid by one cycle");
    checks++;
    if (r_full != (hist.size() >= N)) fail($sformatf("r_full=%0b after %0d samples", r_full, hist.size()));
    if (r_full && !full_prev) n_full++;
    full_prev = r_full;
    for (int m = 0; m < N; m++) begin
      int e = ref_lag(m);
      checks++;
      if (int'(r_bar[m]) != e)
        fail($sformatf("sample %0d lag %0d: got %0d expected %0d", hist.size(), m, r_bar[m], e));
    end
  endtask

  int mseq [N];
  int rnd  [N];

  initial begin
    // length-31 m-sequence from the primitive polynomial x^5 + x^2 + 1
    automatic logic [4:0] lfsr = 5'b00001;
    for (int k = 0; k < N; k++) begin
      mseq[k] = lfsr[0] ? 1 : -1;
      lfsr = {lfsr[0] ^ lfsr[3], lfsr[4:1]};
    end
    for (int k = 0; k < N; k++) rnd[k] = $urandom_range(0, 3) - 2;   // -2..1
    set_code(mseq);

    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // run 1: m-sequence, random full-range samples, random stalls
    for (int t = 0; t < 300; t++) step($urandom_range(3) != 0, $urandom_range(0, 255) - 128);
    // extreme samples to reach the largest correlation magnitudes
    for (int t = 0; t < 2 * N; t++) step(1, (mseq[t % N] > 0) ? 127 : -128);

    // run 2: code using every chip value, changed together with clear
    do_clear();
    set_code(rnd);
    for (int t = 0; t < 300; t++) step($urandom_range(4) != 0, $urandom_range(0, 255) - 128);
    for (int t = 0; t < 2 * N; t++) step(1, -128);

    // run 3: acquisition of a data-modulated DSSS signal
    do_clear();
    set_code(mseq);
    begin
      automatic int phase = $urandom_range(0, N - 1);
      automatic int sym [40];
      automatic int j = 0;                                   // index of the next sample
      for (int s = 0; s < 40; s++) sym[s] = $urandom_range(1) ? 1 : -1;
      sym[1] = -sym[0];                            // at least one transition
      while (j < 38 * N) begin
        automatic bit v = ($urandom_range(5) != 0);
        automatic int symidx = (j + N - phase) / N;          // symbol holding sample j
        automatic int chip   = (j + N - phase) % N;
        automatic int d      = AMP * sym[symidx] * mseq[chip];
        step(v, d);
        if (v) begin
          j++;
          if (j >= N) begin
            // window is samples j-N .. j-1; code period starts at lag m
            automatic int first = j - N;
            automatic int m = (phase - first % N + N) % N;
            automatic int s_lo = sym[(first + N - phase) / N];
            automatic int s_hi = sym[(first + m + N - phase) / N];
            if (m == 0 || s_lo != s_hi) begin
              automatic int best = 0;
              for (int k = 1; k < N; k++)
                if (mag(int'(r_bar[k])) > mag(int'(r_bar[best])))
                  best = k;
              checks++;
              if (best != m || mag(int'(r_bar[m])) != int'(N) * AMP)
                fail($sformatf("acquisition: peak at lag %0d (|%0d|), expected lag %0d", best, r_bar[best], m));
              else
                n_acq++;
              for (int k = 0; k < N; k++) begin
                checks++;
                if (k != m && mag(int'(r_bar[k])) >= int'(N) * AMP)
                  fail($sformatf("acquisition: lag %0d ties the peak", k));
              end
            end
          end
        end
      end
    end

    $display("mechanisms: stalls=%0d wraps=%0d old_term=%0d clears=%0d full=%0d code_changes=%0d acquisitions=%0d",
             n_stall, n_wrap, n_old, n_clear, n_full, n_code, n_acq);
    checks++; if (n_stall == 0) fail("no stall");
    checks++; if (n_wrap  == 0) fail("no nonzero wrap-around");
    checks++; if (n_old   == 0) fail("d_{n-N} term never nonzero");
    checks++; if (n_clear == 0) fail("no clear");
    checks++; if (n_full  == 0) fail("r_full never rose");
    checks++; if (n_code  < 2)  fail("code never changed");
    checks++; if (n_acq   == 0) fail("no acquisition checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for sample_shift_register: random samples with in_valid
// low on about a quarter of the cycles, one synchronous clear part-way and an
// asynchronous reset at the start. A software history of accepted samples gives
// the expected d_old: the sample accepted N accepted-samples ago, or zero if
// fewer than N have been accepted since the last clear.
module tb_sample_shift_register;
  localparam int unsigned N  = 31;
  localparam int unsigned DW = 8;

  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic signed [DW-1:0] d_in = '0, d_old;
  int checks = 0, failures = 0;
  int hist[$];           // accepted samples, newest first

  sample_shift_register #(.N(N), .DW(DW)) dut (.clk, .rst_n, .clear, .in_valid, .d_in, .d_old);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected_old();
    return (hist.size() >= N) ? hist[N-1] : 0;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // check what the register offers for the sample about to be presented
      checks++;
      if (int'(d_old) != expected_old()) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d d_old=%0d exp=%0d", t, d_old, expected_old());
      end
      clear    = (t == 1500);
      in_valid = ($urandom_range(3) != 0);
      d_in     = DW'($urandom);
      @(posedge clk);
      #1;
      if (clear) hist.delete();
      else if (in_valid) hist.push_front(int'(d_in));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

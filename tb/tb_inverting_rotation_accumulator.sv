// Self-checking testbench for inverting_rotation_accumulator: random product
// vectors, in_valid low on some cycles and one synchronous clear. The reference
// applies r <- S̄ r + p in software (element i takes element i+1, element N-1
// takes minus element 0, then the product is added) and compares all N stored
// values after every clock edge. A separate count confirms that the wrap-around
// path carried a nonzero value, so the sign inversion was really exercised.
module tb_inverting_rotation_accumulator;
  localparam int unsigned N  = 31;
  localparam int unsigned PW = 11;
  localparam int unsigned AW = 15;

  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic signed [PW-1:0] prod  [N];
  logic signed [AW-1:0] r_bar [N];
  int checks = 0, failures = 0, wraps = 0;
  int model [N];

  inverting_rotation_accumulator #(.N(N), .PW(PW), .AW(AW)) dut (
    .clk, .rst_n, .clear, .in_valid, .prod, .r_bar
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin model[i] = 0; prod[i] = '0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      clear    = (t == 1000);
      in_valid = ($urandom_range(4) != 0);
      // keep products small enough that the model never leaves AW bits
      for (int i = 0; i < N; i++) prod[i] = PW'($urandom_range(0, 40) - 20);
      @(posedge clk);
      #1;
      if (clear) begin
        for (int i = 0; i < N; i++) model[i] = 0;
      end else if (in_valid) begin
        automatic int first = model[0];
        if (first != 0) wraps++;
        for (int i = 0; i < N - 1; i++) model[i] = model[i+1] + int'(prod[i]);
        model[N-1] = -first + int'(prod[N-1]);
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (int'(r_bar[i]) != model[i]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d lag %0d got %0d exp %0d", t, i, r_bar[i], model[i]);
        end
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL wrap-around never carried a nonzero value"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

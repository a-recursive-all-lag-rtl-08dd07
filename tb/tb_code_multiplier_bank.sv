// Self-checking testbench for code_multiplier_bank: random combined samples and
// random signed codes (every 2-bit value, so -2 as well as ±1), plus the extreme
// corners of both ranges. Output i must equal e * c_{N-1-i}: the bank multiplies
// by the last column of the odd-correlation matrix, which is the code reversed.
module tb_code_multiplier_bank;
  localparam int unsigned N  = 31;
  localparam int unsigned EW = 9;
  localparam int unsigned CW = 2;

  logic signed [EW-1:0]    e;
  logic signed [CW-1:0]    code [N];
  logic signed [EW+CW-1:0] prod [N];
  int checks = 0, failures = 0;

  code_multiplier_bank #(.N(N), .EW(EW), .CW(CW)) dut (.e, .code, .prod);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    #1;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (int'(prod[i]) != int'(e) * int'(code[N-1-i])) begin
        failures++;
        if (failures < 10)
          $display("FAIL i=%0d e=%0d c=%0d prod=%0d", i, e, code[N-1-i], prod[i]);
      end
    end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      e = EW'($urandom);
      for (int k = 0; k < N; k++) code[k] = CW'($urandom);
      if (t == 0) e = {1'b1, {(EW-1){1'b0}}};        // most negative
      if (t == 1) e = {1'b0, {(EW-1){1'b1}}};        // most positive
      if (t < 2) for (int k = 0; k < N; k++) code[k] = {1'b1, {(CW-1){1'b0}}};
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

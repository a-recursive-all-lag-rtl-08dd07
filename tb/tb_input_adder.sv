// Self-checking testbench for input_adder: applies every pair of 8-bit signed
// samples and compares e with the integer sum d_new + d_old, so both the width
// extension and the sign handling are covered, including the two extremes
// -128 + -128 and 127 + 127.
module tb_input_adder;
  localparam int unsigned DW = 8;

  logic signed [DW-1:0] d_new, d_old;
  logic signed [DW:0]   e;
  int checks = 0, failures = 0;

  input_adder #(.DW(DW)) dut (.d_new, .d_old, .e);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = -(1 << (DW-1)); a < (1 << (DW-1)); a++) begin
      for (int b = -(1 << (DW-1)); b < (1 << (DW-1)); b++) begin
        d_new = DW'(a);
        d_old = DW'(b);
        #1;
        checks++;
        if (int'(e) != a + b) begin
          failures++;
          if (failures < 10) $display("FAIL %0d + %0d gave %0d", a, b, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

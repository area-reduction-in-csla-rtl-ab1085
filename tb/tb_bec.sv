// tb_bec: self-checking test of the Binary to Excess-1 Converter.
//
// Checks the default 3-bit instance and a 9-bit instance over every input
// value: the output must equal the input plus one, modulo 2^N (so the
// all-ones input wraps to zero).
module tb_bec;
  int checks = 0;
  int failures = 0;

  logic [2:0] b3, x3;
  logic [8:0] b9, x9;

  bec dut3 (.b(b3), .x(x3));
  bec #(.N(9)) dut9 (.b(b9), .x(x9));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      b3 = 3'(i);
      #1;
      checks++;
      if (x3 !== 3'(i + 1)) begin
        failures++;
        $display("N=3 mismatch b=%0d x=%0d", b3, x3);
      end
    end
    for (int i = 0; i < 512; i++) begin
      b9 = 9'(i);
      #1;
      checks++;
      if (x9 !== 9'(i + 1)) begin
        failures++;
        if (failures < 10) $display("N=9 mismatch b=%0d x=%0d", b9, x9);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

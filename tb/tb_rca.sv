// tb_rca: self-checking test of the ripple-carry adder.
//
// Checks the default 2-bit instance exhaustively (all a, b, cin) and a
// 6-bit instance exhaustively against integer addition. Combinational:
// each vector settles for one time unit before it is compared.
module tb_rca;
  int checks = 0;
  int failures = 0;

  logic [1:0] a2, b2, s2;
  logic       c2, co2;
  logic [5:0] a6, b6, s6;
  logic       c6, co6;

  rca dut2 (.a(a2), .b(b2), .cin(c2), .s(s2), .cout(co2));
  rca #(.N(6)) dut6 (.a(a6), .b(b6), .cin(c6), .s(s6), .cout(co6));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {c2, a2, b2} = 5'(i);
      #1;
      checks++;
      if ({co2, s2} !== 3'(a2) + 3'(b2) + 3'(c2)) begin
        failures++;
        $display("N=2 mismatch a=%0d b=%0d cin=%0d got %0d", a2, b2, c2, {co2, s2});
      end
    end
    for (int i = 0; i < 8192; i++) begin
      {c6, a6, b6} = 13'(i);
      #1;
      checks++;
      if ({co6, s6} !== 7'(a6) + 7'(b6) + 7'(c6)) begin
        failures++;
        if (failures < 10)
          $display("N=6 mismatch a=%0d b=%0d cin=%0d got %0d", a6, b6, c6, {co6, s6});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_csla_bec_group: self-checking test of one carry-select group.
//
// For every a, b and select carry, the group's {cout, s} must equal
// a + b + c_sel: with c_sel = 0 the ripple-carry result passes, with
// c_sel = 1 the BEC (add one) result passes. Checks the default 2-bit group
// and a 5-bit group exhaustively, and counts how often each path was chosen.
module tb_csla_bec_group;
  int checks = 0;
  int failures = 0;
  int n_rca_path = 0;
  int n_bec_path = 0;

  logic [1:0] a2, b2, s2;
  logic       c2, co2;
  logic [4:0] a5, b5, s5;
  logic       c5, co5;

  csla_bec_group dut2 (.a(a2), .b(b2), .c_sel(c2), .s(s2), .cout(co2));
  csla_bec_group #(.N(5)) dut5 (.a(a5), .b(b5), .c_sel(c5), .s(s5), .cout(co5));

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
        $display("N=2 mismatch a=%0d b=%0d c_sel=%0d got %0d", a2, b2, c2, {co2, s2});
      end
    end
    for (int i = 0; i < 2048; i++) begin
      {c5, a5, b5} = 11'(i);
      #1;
      checks++;
      if (c5) n_bec_path++; else n_rca_path++;
      if ({co5, s5} !== 6'(a5) + 6'(b5) + 6'(c5)) begin
        failures++;
        if (failures < 10)
          $display("N=5 mismatch a=%0d b=%0d c_sel=%0d got %0d", a5, b5, c5, {co5, s5});
      end
    end
    $display("selected: RCA path %0d times, BEC path %0d times", n_rca_path, n_bec_path);
    checks++;
    if (n_rca_path == 0 || n_bec_path == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sqrt_csla_bec: end-to-end test of the 128-bit SQRT CSLA with BEC.
//
// Runs the adder at its default width (128 bits, no parameter override)
// and compares {cout, s} with a 129-bit behavioural sum a + b + cin for:
//   - the vector of the published simulation: a = b = 8c41 repeated eight
//     times, cin = 1, expected s = 1883 repeated eight times and cout = 1;
//   - corner cases: zero, all ones, and carries that ripple through every
//     group (all-ones plus carry in);
//   - 20000 random vectors, half of them with b close to ~a so that long
//     carry chains occur.
// For every group above the first it counts how often the carry arriving
// from below selected the ripple-carry result (carry 0) and how often it
// selected the BEC result (carry 1), using a carry worked out from the
// operands alone, and counts a failure for a group where either never
// happened. It also counts vectors whose carry crossed every group.
module tb_sqrt_csla_bec;
  import csla_pkg::*;

  localparam int unsigned W  = 128;
  localparam int unsigned NG = num_groups(W);

  int checks = 0;
  int failures = 0;
  int n_sel0 [NG];
  int n_sel1 [NG];
  int n_full_chain = 0;

  logic [W-1:0] a, b, s;
  logic         cin, cout;

  sqrt_csla_bec dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rand_word();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // carry into bit position k of a + b + cin, from the operands alone
  function automatic logic carry_into(input logic [W-1:0] x, input logic [W-1:0] y,
                                      input logic c, input int unsigned k);
    logic [W:0] mask, sum;
    mask = ({{W{1'b0}}, 1'b1} << k) - 1;
    sum  = ({1'b0, x} & mask) + ({1'b0, y} & mask) + (W+1)'(c);
    return sum[k];
  endfunction

  task automatic apply(input logic [W-1:0] x, input logic [W-1:0] y, input logic c);
    logic [W:0] expected;
    logic       all_carry;
    a   = x;
    b   = y;
    cin = c;
    #1;
    expected = {1'b0, x} + {1'b0, y} + (W+1)'(c);
    checks++;
    if ({cout, s} !== expected) begin
      failures++;
      if (failures < 10)
        $display("mismatch a=%h b=%h cin=%0d got %h expected %h", x, y, c, {cout, s}, expected);
    end
    all_carry = 1'b1;
    for (int unsigned g = 1; g < NG; g++) begin
      if (carry_into(x, y, c, group_lsb(W, g))) n_sel1[g]++;
      else begin
        n_sel0[g]++;
        all_carry = 1'b0;
      end
    end
    if (all_carry && expected[W]) n_full_chain++;
  endtask

  initial begin
    logic [W-1:0] x, y;
    for (int g = 0; g < NG; g++) begin
      n_sel0[g] = 0;
      n_sel1[g] = 0;
    end

    // vector of the published 128-bit simulation
    apply({8{16'h8c41}}, {8{16'h8c41}}, 1'b1);
    checks++;
    if (s !== {8{16'h1883}} || cout !== 1'b1) begin
      failures++;
      $display("published vector: got s=%h cout=%0d", s, cout);
    end
    apply({8{16'h8c41}}, {8{16'h8c41}}, 1'b0);
    checks++;
    if (s !== {{7{16'h1883}}, 16'h1882} || cout !== 1'b1) begin
      failures++;
      $display("published vector, cin=0: got s=%h cout=%0d", s, cout);
    end

    // corner cases
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '0, 1'b1);   // carry ripples through every group
    apply('0, '1, 1'b1);
    apply('1, '1, 1'b1);
    apply('1, '1, 1'b0);
    apply('1, '0, 1'b0);

    // random vectors
    for (int i = 0; i < 20000; i++) begin
      x = rand_word();
      if (i % 2 == 0) y = rand_word();
      else            y = ~x ^ (rand_word() & rand_word() & rand_word() & rand_word());
      apply(x, y, 1'($urandom));
    end

    for (int unsigned g = 1; g < NG; g++) begin
      $display("group %0d (bits %0d..%0d): RCA result selected %0d times, BEC result %0d times",
               g, group_lsb(W, g), group_lsb(W, g) + group_size(W, g) - 1, n_sel0[g], n_sel1[g]);
      checks++;
      if (n_sel0[g] == 0 || n_sel1[g] == 0) begin
        failures++;
        $display("group %0d: a select path was never used", g);
      end
    end
    $display("carry through every group: %0d times", n_full_chain);
    checks++;
    if (n_full_chain == 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

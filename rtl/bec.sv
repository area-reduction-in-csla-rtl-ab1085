// bec: N-bit Binary to Excess-1 Converter (the "add one" circuit).
//
// Outputs x = b + 1 (modulo 2^N) without a full adder chain: bit 0 is
// inverted, and bit i flips when all lower input bits are 1,
//   x[0] = ~b[0],  x[i] = b[i] ^ (b[0] & b[1] & ... & b[i-1]).
// In a carry-select group it replaces the second ripple-carry adder, the one
// that assumes a carry in of 1: adding one to the carry-in-0 result gives
// the carry-in-1 result. Interface: b in, x out. Purely combinational.
// The function (add one) is the source publication's; the AND-chain form is the usual
// BEC gate structure.
module bec #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] b,
  output logic [N-1:0] x
);
  // all_ones[i] = AND of b[i-1:0]; all_ones[0] = 1
  logic [N-1:0] all_ones;

  assign all_ones[0] = 1'b1;
  for (genvar i = 1; i < N; i++) begin : g_and
    assign all_ones[i] = all_ones[i-1] & b[i-1];
  end

  assign x = b ^ all_ones;
endmodule

// csla_bec_group: one carry-select group of the SQRT CSLA with BEC.
//
// The group computes its result for both possible incoming carries before
// that carry arrives: an N-bit RCA with carry in 0 gives {c0, s0}, and an
// (N+1)-bit BEC turns it into {c1, s1} = {c0, s0} + 1, the result for carry
// in 1. A 2:1 multiplexer then picks one of the two with c_sel, the carry
// from the group below. Only the multiplexer lies on the adder's carry path.
// Interface: a, b, c_sel in; s, cout out. Purely combinational.
// RCA + BEC + multiplexer is the source publication's structure; the BEC width N+1
// (sum bits plus carry) is the usual arrangement.
module csla_bec_group #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         c_sel,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N:0] r0;  // {carry, sum} for carry in 0
  logic [N:0] r1;  // {carry, sum} for carry in 1

  rca #(.N(N)) u_rca (
    .a   (a),
    .b   (b),
    .cin (1'b0),
    .s   (r0[N-1:0]),
    .cout(r0[N])
  );

  bec #(.N(N+1)) u_bec (
    .b(r0),
    .x(r1)
  );

  always_comb begin
    {cout, s} = c_sel ? r1 : r0;
  end
endmodule

// rca: N-bit ripple-carry adder.
//
// A chain of N full adders; the carry ripples from bit 0 to bit N-1, so the
// delay grows linearly with N. In the carry-select adder the first group is
// an RCA fed by the adder's carry in, and every other group uses an RCA with
// its carry in tied to 0. Interface: a, b, cin in; s, cout out.
// Purely combinational, no clock. The ripple structure follows the usual
// CSLA description; N is set by the instantiating group.
module rca #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .s   (s[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[N];
endmodule

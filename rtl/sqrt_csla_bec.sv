// sqrt_csla_bec: square-root carry-select adder with BEC, WIDTH bits.
//
// Computes {cout, s} = a + b + cin. The word is split into groups of growing
// size (layout in csla_pkg: 2, 2, 3, 4, ... bits, last group clipped; for
// WIDTH = 128 that is sixteen groups 2-2-3-...-15-7). Group 0 is a plain
// ripple-carry adder fed by cin. Every higher group is a csla_bec_group:
// it adds its slice with carry in 0, derives the carry-in-1 result with a
// Binary to Excess-1 Converter instead of a second adder, and selects one
// of the two with the carry coming out of the group below. The carry path
// is thus one RCA of two bits followed by one multiplexer per group.
// Interface: a, b (WIDTH bits), cin in; s (WIDTH bits), cout out.
// Purely combinational, no clock and no latency in cycles.
// WIDTH = 128 and the RCA/BEC/multiplexer structure follow the source publication;
// the group sizes are this design's choice within the square-root scheme.
module sqrt_csla_bec
  import csla_pkg::*;
#(
  parameter int unsigned WIDTH = 128
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);
  localparam int unsigned NG = num_groups(WIDTH);

  // c[g] is the carry into group g, c[NG] the carry out of the adder
  logic [NG:0] c;

  assign c[0] = cin;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    localparam int unsigned LSB = group_lsb(WIDTH, g);
    localparam int unsigned SZ  = group_size(WIDTH, g);

    if (g == 0) begin : g_first
      rca #(.N(SZ)) u_rca (
        .a   (a[LSB +: SZ]),
        .b   (b[LSB +: SZ]),
        .cin (c[g]),
        .s   (s[LSB +: SZ]),
        .cout(c[g+1])
      );
    end else begin : g_sel
      csla_bec_group #(.N(SZ)) u_grp (
        .a    (a[LSB +: SZ]),
        .b    (b[LSB +: SZ]),
        .c_sel(c[g]),
        .s    (s[LSB +: SZ]),
        .cout (c[g+1])
      );
    end
  end

  assign cout = c[NG];
endmodule

// tb_sqrt_csla_widths: the adder at every word size that was evaluated.
//
// Builds the SQRT CSLA with BEC at 8, 16, 32, 64 and 128 bits side by side,
// drives all five from one random 128-bit operand pair (each takes its low
// WIDTH bits) and compares every {cout, s} with a behavioural sum of the
// same width. Also runs, at each width, the all-ones-plus-carry vector whose
// carry crosses every group.
module tb_sqrt_csla_widths;
  localparam int NW = 5;
  localparam int WIDTHS [NW] = '{8, 16, 32, 64, 128};

  int checks = 0;
  int failures = 0;

  logic [127:0] a, b;
  logic         cin;
  logic [128:0] res [NW];   // {cout, s} of each width, zero-extended

  for (genvar k = 0; k < NW; k++) begin : g_w
    localparam int W = WIDTHS[k];
    logic [W-1:0] s;
    logic         co;
    sqrt_csla_bec #(.WIDTH(W)) dut (.a(a[W-1:0]), .b(b[W-1:0]), .cin(cin), .s(s), .cout(co));
    assign res[k] = 129'({co, s});
  end

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [127:0] x, input logic [127:0] y, input logic c);
    logic [128:0] mask, expected;
    a   = x;
    b   = y;
    cin = c;
    #1;
    for (int k = 0; k < NW; k++) begin
      mask     = (129'd1 << WIDTHS[k]) - 1;
      expected = ({1'b0, x} & mask) + ({1'b0, y} & mask) + 129'(c);
      checks++;
      if (res[k] !== expected) begin
        failures++;
        if (failures < 10)
          $display("width %0d mismatch: got %h expected %h", WIDTHS[k], res[k], expected);
      end
    end
  endtask

  initial begin
    apply('1, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply('0, '0, 1'b0);
    for (int i = 0; i < 10000; i++) begin
      logic [127:0] x;
      x = {$urandom, $urandom, $urandom, $urandom};
      if (i % 2 == 0) apply(x, {$urandom, $urandom, $urandom, $urandom}, 1'($urandom));
      else            apply(x, ~x ^ ({$urandom, $urandom, $urandom, $urandom} &
                                     {$urandom, $urandom, $urandom, $urandom} &
                                     {$urandom, $urandom, $urandom, $urandom}), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

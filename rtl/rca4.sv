// rca4: ripple-carry adder of N full adders (N = 4 by default).
//
// {cout, s} = a + b + cin, with the carry rippling from bit 0 to bit N-1.
// In the multiplier it adds the two rows left in the accurate columns 11 to
// 14 and produces the top product bit as its carry out. Combinational.
//
// Ports: a[N-1:0], b[N-1:0], cin -> s[N-1:0], cout.
module rca4 #(
  parameter int unsigned N = 4
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
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(s[i]), .cout(c[i+1]));
  end
  assign cout = c[N];
endmodule

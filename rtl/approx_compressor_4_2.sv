// approx_compressor_4_2: approximate 4:2 compressor.
//
// Replaces the exact x1+x2+x3+x4 count by carry = x1 & (x3 | x4) and a sum
// bit that is always 1. Input x2 is not used, so the multiplier does not
// generate the partial product that would feed it. One OR cell and one AND
// cell realise it; the physical version is a five-transistor MGDI circuit.
// There is no carry input or carry output to neighbouring columns.
// Combinational, no clock.
//
// The sum output is constant by design; it is kept as a port so that the
// reduction tree shows where the constant bit enters.
//
// Ports: x1, x3, x4 -> sum (weight 1, always 1), carry (weight 2).
module approx_compressor_4_2 (
  input  logic x1,
  input  logic x3,
  input  logic x4,
  output logic sum,
  output logic carry
);
  logic x34;

  mgdi_or2  u_or  (.a(x3), .b(x4),  .y(x34));
  mgdi_and2 u_and (.a(x1), .b(x34), .y(carry));
  assign sum = 1'b1;
endmodule

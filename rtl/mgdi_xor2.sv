// mgdi_xor2: two-input XOR cell.
//
// The sum path of every half adder, full adder and exact compressor is built
// from this cell. The physical cell is a four-transistor MGDI circuit (two
// two-transistor stages) on carbon-nanotube FETs; this model keeps only its
// logic function. Purely combinational.
//
// Ports: a, b -> y = a ^ b.
module mgdi_xor2 (
  input  logic a,
  input  logic b,
  output logic y
);
  assign y = a ^ b;
endmodule

// mgdi_or2: two-input OR cell.
//
// Used as the OR half of the approximate 4:2 compressor (x3 | x4). The
// physical cell is a two-transistor MGDI gate on carbon-nanotube FETs; this
// model keeps only its logic function. Purely combinational.
//
// Ports: a, b -> y = a | b.
module mgdi_or2 (
  input  logic a,
  input  logic b,
  output logic y
);
  assign y = a | b;
endmodule

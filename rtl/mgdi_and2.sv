// mgdi_and2: two-input AND cell.
//
// In the multiplier this cell forms a partial product a[j] & b[i] and the
// AND half of the approximate 4:2 compressor. The physical cell is a
// two-transistor modified-gate-diffusion-input (MGDI) gate on carbon-nanotube
// FETs; this model keeps only its logic function. Purely combinational,
// no clock and no reset.
//
// Ports: a, b -> y = a & b.
module mgdi_and2 (
  input  logic a,
  input  logic b,
  output logic y
);
  assign y = a & b;
endmodule

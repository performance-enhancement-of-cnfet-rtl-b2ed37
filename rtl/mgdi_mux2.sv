// mgdi_mux2: 2:1 multiplexer cell.
//
// The full adder uses it as its carry generator: the XOR of two inputs
// selects either one of those inputs or the incoming carry. The physical
// cell is a two-transistor MGDI multiplexer on carbon-nanotube FETs; this
// model keeps only its logic function. Purely combinational.
//
// Ports: d0, d1, sel -> y = sel ? d1 : d0.
module mgdi_mux2 (
  input  logic d0,
  input  logic d1,
  input  logic sel,
  output logic y
);
  always_comb begin
    if (sel) y = d1;
    else     y = d0;
  end
endmodule

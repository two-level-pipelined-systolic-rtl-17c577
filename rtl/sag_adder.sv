// sag_adder: the single adder of a processing element.
//
// A W-bit carry-ripple adder built from one full-adder cell per bit, the
// structure chosen for the engine because it is compact (the original cell
// is a mirror-type CMOS full adder; here each cell is its Boolean function).
// Besides the sum and the final carry it brings out the carry from bit
// TAP_BIT-1 into bit TAP_BIT, called C12 for TAP_BIT = 12. When the 12-bit
// processor address X sits in the low 12 bits and all-ones is added to it
// (X - 1), C12 is 0 exactly when X was zero: that is how a PE recognises its
// own location without a separate comparator.
//
// Purely combinational: a, b, cin in; sum, cout, c_tap out in the same cycle.
module sag_adder #(
  parameter int unsigned W       = 36,
  parameter int unsigned TAP_BIT = 12
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout,
  output logic         c_tap
);

  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    assign sum[i] = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end

  assign cout  = c[W];
  assign c_tap = c[TAP_BIT];

endmodule

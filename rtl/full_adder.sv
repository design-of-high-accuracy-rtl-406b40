// full_adder: one-bit full adder, the FA cell of the carry-save rows and of
// the carry-propagate adder. Purely combinational:
//   s    = a ^ b ^ cin
//   cout = majority(a, b, cin)
// A cell whose third input is tied to 0 acts as the half adder (HA) drawn at
// the edge of a carry-save row.
// The cell is the standard one of the carry-save structures this design
// follows; writing it as Boolean equations is this design's choice.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  always_comb begin
    s    = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end
endmodule

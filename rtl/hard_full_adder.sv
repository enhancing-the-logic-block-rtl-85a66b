// hard_full_adder: the 1-bit hardened full adder placed in each logic
// element.
//
// sumout = a ^ b ^ cin and cout = majority(a, b, cin). The two operands are
// the "sumin" inputs fed by the logic element's LUTs; cin and cout form the
// carry chain. The reference cell is characterised at 47.7 minimum-width
// transistor areas with 11 ps cin->cout, 56 ps sumin->cout, 30 ps
// cin->sumout and 83 ps sumin->sumout; this model keeps only the logic
// function. Purely combinational.
module hard_full_adder (
  input  logic a,       // first operand (sumin)
  input  logic b,       // second operand (sumin)
  input  logic cin,     // carry in from the previous bit
  output logic sumout,  // sum bit
  output logic cout     // carry out to the next bit
);

  always_comb begin
    sumout = a ^ b ^ cin;
    cout   = (a & b) | (cin & (a ^ b));
  end

endmodule

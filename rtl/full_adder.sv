// full_adder: one-bit full adder, the cell the ripple adders are made of.
//
// sum  = a ^ b ^ cin, cout = majority(a, b, cin). Purely combinational.
// The gate form is the textbook one; only the function is given originally.
// Interface: a, b, cin in; sum, cout out.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic p;

  always_comb begin
    p    = a ^ b;
    sum  = p ^ cin;
    cout = (a & b) | (p & cin);
  end

endmodule

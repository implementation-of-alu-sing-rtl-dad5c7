// full_adder: one-bit full adder, the basic cell of the ALU.
//
// The cell is meant to be realised as a 9-transistor gate-diffusion-input
// (GDI) circuit; at the logic level it is an ordinary full adder. It is
// written here in the multiplexer form that GDI cells use: the half sum
// h = a ^ b selects the carry, cout = h ? cin : a, and sum = h ^ cin.
// The transistor-level circuit itself is not represented.
//
// Ports: a, b, cin in; sum, cout out. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic h;

  always_comb begin
    h    = a ^ b;
    sum  = h ^ cin;
    cout = h ? cin : a;
  end

endmodule

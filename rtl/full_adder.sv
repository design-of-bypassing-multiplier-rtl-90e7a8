// One-bit full adder, the cell every adder and array in this design is built of.
//
// Sum is the XOR of the three inputs. The carry is formed from the bit
// generate g = a&b and propagate p = a^b as cout = g | (p & cin): two XOR, two
// AND and one OR gate, the classic gate-level full adder.
//
// Interface: a, b, cin in; s, cout out. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic p, g;

  always_comb begin
    p    = a ^ b;
    g    = a & b;
    s    = p ^ cin;
    cout = g | (p & cin);
  end
endmodule

// half_adder: one-bit half adder, the building cell of the 2x2 Vedic
// multiplier.
//
// Adds two bits and returns their sum (s = a ^ b) and carry (c = a & b).
// Purely combinational; the outputs settle within one gate delay of the
// inputs. The 2x2 multiplier uses two of these, as its block diagram shows;
// writing the cell as plain XOR/AND logic is this design's choice.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);

  always_comb begin
    s = a ^ b;
    c = a & b;
  end

endmodule

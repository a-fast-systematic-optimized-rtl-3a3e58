// vhc_min_cell -- the 2-input Min operation of the comparison network.
//
// One magnitude comparator and one 2-to-1 multiplexer: y is the smaller of
// the two unsigned magnitudes a and b. Messages are kept in sign-magnitude
// form, so only the w magnitude bits take part in the comparison; the sign
// is handled separately. On a tie operand a is passed, which does not change
// the value. Purely combinational: one comparator plus one multiplexer delay.
module vhc_min_cell #(
  parameter int unsigned W = vhc_pkg::W_DEFAULT
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  logic a_le_b;

  always_comb begin
    a_le_b = (a <= b);
    y      = a_le_b ? a : b;
  end

endmodule

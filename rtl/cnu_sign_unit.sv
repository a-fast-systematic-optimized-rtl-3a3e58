// cnu_sign_unit -- sign part of the min-sum check node update.
//
// The message a check node sends to input r carries the product of the signs
// of all the other inputs. With sign bit 1 meaning negative, a product of
// signs is an XOR of sign bits, so the unit forms the XOR of all N_IN signs
// once and removes the own sign of each output with one more XOR. Purely
// combinational: an XOR tree of depth ceil(log2 N_IN) plus one XOR gate.
module cnu_sign_unit #(
  parameter int unsigned N_IN = vhc_pkg::N_IN_DEFAULT
) (
  input  logic [N_IN-1:0] sign_in,
  output logic [N_IN-1:0] sign_out
);

  logic sign_all;

  always_comb begin
    sign_all = ^sign_in;
    for (int unsigned i = 0; i < N_IN; i++) sign_out[i] = sign_all ^ sign_in[i];
  end

endmodule

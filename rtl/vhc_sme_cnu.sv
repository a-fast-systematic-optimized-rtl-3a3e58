// vhc_sme_cnu -- unfolded self-message-excluded min-sum check node unit.
//
// Each clock cycle the unit takes N_IN variable-to-check messages in
// sign-magnitude form ({sign, w-bit magnitude}, sign 1 = negative) and
// produces the N_IN check-to-variable messages of the min-sum rule: output r
// has the sign product and the minimum magnitude of all inputs except input
// r. The magnitudes go through the shared comparison network
// (vhc_min_network), the signs through an XOR unit (cnu_sign_unit); both are
// combinational and run in parallel, so every output is independent of the
// others and no minimum/second-minimum selection or index decoding is needed.
//
// Timing: the comparison logic is combinational as in an unfolded CNU. This
// design adds one output register, so out_msg/out_valid show the result of
// the in_msg/in_valid sampled on the previous rising clock edge: latency one
// cycle, one message set per cycle. rst_n is an asynchronous active-low reset
// of the output register.
module vhc_sme_cnu #(
  parameter int unsigned N_IN = vhc_pkg::N_IN_DEFAULT,
  parameter int unsigned W    = vhc_pkg::W_DEFAULT
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [W:0]     in_msg  [N_IN],
  output logic           out_valid,
  output logic [W:0]     out_msg [N_IN]
);

  logic [W-1:0]    mag      [N_IN];
  logic [W-1:0]    excl_min [N_IN];
  logic [N_IN-1:0] sign_in;
  logic [N_IN-1:0] sign_out;

  always_comb begin
    for (int unsigned i = 0; i < N_IN; i++) begin
      sign_in[i] = in_msg[i][W];
      mag[i]     = in_msg[i][W-1:0];
    end
  end

  vhc_min_network #(.N_IN(N_IN), .W(W)) u_net (
    .mag      (mag),
    .excl_min (excl_min)
  );

  cnu_sign_unit #(.N_IN(N_IN)) u_sign (
    .sign_in  (sign_in),
    .sign_out (sign_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int unsigned i = 0; i < N_IN; i++) out_msg[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int unsigned i = 0; i < N_IN; i++) out_msg[i] <= {sign_out[i], excl_min[i]};
      end
    end
  end

endmodule

// tb_cnu_sign_unit -- exhaustive check of the self-excluded sign product.
// For every sign pattern, output r must be the XOR of all sign bits except r,
// computed here with an explicit loop over the other inputs.
module tb_cnu_sign_unit;
  localparam int unsigned N = 7;
  logic [N-1:0] sign_in, sign_out;
  int checks = 0, failures = 0;

  cnu_sign_unit #(.N_IN(N)) dut (.sign_in(sign_in), .sign_out(sign_out));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expect_bit;
    for (int p = 0; p < 2**N; p++) begin
      sign_in = N'(p);
      #1;
      for (int r = 0; r < N; r++) begin
        expect_bit = 1'b0;
        for (int k = 0; k < N; k++) if (k != r) expect_bit ^= sign_in[k];
        checks++;
        if (sign_out[r] !== expect_bit) begin
          failures++;
          if (failures < 10) $display("FAIL pattern=%b r=%0d got=%b", sign_in, r, sign_out[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

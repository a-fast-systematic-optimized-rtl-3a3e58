// tb_vhc_sme_cnu -- end-to-end test of the check node unit at its default
// size (seven inputs, 6-bit sign-magnitude messages).
//
// Random message sets are offered with random gaps in in_valid. A reference
// model computes, for every output, the XOR of the other signs and the
// minimum of the other magnitudes; the DUT's registered output must match it
// exactly one clock later, and out_valid must follow in_valid by one cycle.
// The test counts how often each situation of the min-sum update occurred
// and fails if one never did: the receiving input holds the unique smallest
// magnitude (so it must get the second minimum), the smallest magnitude is
// tied, an output is negative, an idle cycle holds the previous output, and
// a reset in the middle of traffic clears the outputs.
module tb_vhc_sme_cnu;
  import vhc_pkg::*;
  localparam int unsigned N = N_IN_DEFAULT;
  localparam int unsigned W = W_DEFAULT;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         in_valid;
  logic [W:0]   in_msg  [N];
  logic         out_valid;
  logic [W:0]   out_msg [N];

  int checks = 0, failures = 0;
  int n_unique_min = 0, n_tie = 0, n_negative = 0, n_hold = 0, n_reset = 0;

  logic [W:0] exp_msg [N];
  logic [W:0] held    [N];
  logic       exp_valid;

  vhc_sme_cnu dut (
    .clk, .rst_n, .in_valid, .in_msg, .out_valid, .out_msg
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model of one check node update
  task automatic reference(input logic [W:0] msg [N], output logic [W:0] res [N],
                           output bit uniq_min, output bit tie);
    int minv, cnt;
    logic s;
    int m;
    minv = 2**W;
    cnt = 0;
    for (int k = 0; k < N; k++) if (int'(msg[k][W-1:0]) < minv) minv = int'(msg[k][W-1:0]);
    for (int k = 0; k < N; k++) if (int'(msg[k][W-1:0]) == minv) cnt++;
    uniq_min = (cnt == 1);
    tie      = (cnt > 1);
    for (int r = 0; r < N; r++) begin
      s = 1'b0;
      m = 2**W - 1;
      for (int k = 0; k < N; k++) begin
        if (k != r) begin
          s ^= msg[k][W];
          if (int'(msg[k][W-1:0]) < m) m = int'(msg[k][W-1:0]);
        end
      end
      res[r] = {s, W'(m)};
    end
  endtask

  task automatic compare(string tag);
    checks++;
    if (out_valid !== exp_valid) begin
      failures++;
      if (failures < 10) $display("FAIL %s out_valid=%b exp=%b", tag, out_valid, exp_valid);
    end
    for (int r = 0; r < N; r++) begin
      checks++;
      if (out_msg[r] !== exp_msg[r]) begin
        failures++;
        if (failures < 10) $display("FAIL %s r=%0d got=%h exp=%h", tag, r, out_msg[r], exp_msg[r]);
      end
    end
  endtask

  initial begin
    bit uq, ti;
    logic [W:0] res [N];
    rst_n    = 1'b0;
    in_valid = 1'b0;
    for (int k = 0; k < N; k++) in_msg[k] = '0;
    repeat (3) @(posedge clk);
    #1;
    exp_valid = 1'b0;
    for (int r = 0; r < N; r++) exp_msg[r] = '0;
    compare("reset");
    rst_n = 1'b1;

    for (int t = 0; t < 20000; t++) begin
      // mid-traffic reset once
      if (t == 10000) begin
        @(negedge clk);
        rst_n = 1'b0;
        #1;
        exp_valid = 1'b0;
        for (int r = 0; r < N; r++) exp_msg[r] = '0;
        compare("async-reset");
        n_reset++;
        @(negedge clk);
        rst_n = 1'b1;
      end
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      for (int k = 0; k < N; k++) begin
        // small magnitude range so that ties are frequent
        in_msg[k] = {1'($urandom), ($urandom_range(0, 1) == 0) ? W'($urandom_range(0, 7)) : W'($urandom)};
      end
      for (int r = 0; r < N; r++) held[r] = out_msg[r];
      reference(in_msg, res, uq, ti);
      @(posedge clk);
      #1;
      exp_valid = in_valid;
      if (in_valid) begin
        for (int r = 0; r < N; r++) exp_msg[r] = res[r];
        if (uq) n_unique_min++;
        if (ti) n_tie++;
        for (int r = 0; r < N; r++) if (res[r][W]) n_negative++;
      end else begin
        for (int r = 0; r < N; r++) exp_msg[r] = held[r];
        n_hold++;
      end
      compare("traffic");
    end

    $display("events: unique_min=%0d tie=%0d negative=%0d hold=%0d reset=%0d",
             n_unique_min, n_tie, n_negative, n_hold, n_reset);
    checks++; if (n_unique_min == 0) begin failures++; $display("FAIL no unique-minimum case"); end
    checks++; if (n_tie == 0)        begin failures++; $display("FAIL no tied-minimum case"); end
    checks++; if (n_negative == 0)   begin failures++; $display("FAIL no negative output"); end
    checks++; if (n_hold == 0)       begin failures++; $display("FAIL no idle cycle"); end
    checks++; if (n_reset == 0)      begin failures++; $display("FAIL no reset in traffic"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

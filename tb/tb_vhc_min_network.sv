// tb_vhc_min_network -- checks the seven-input shared minimum network.
// Directed patterns (all equal, a unique minimum at each position, a tied
// minimum, extreme values) and random patterns are applied; every output must
// equal the minimum over the other six inputs, computed here by a plain loop.
// The generated network must also use 18 Min cells in 3 levels, the figures
// published for the seven-input unit, against 35 cells for seven separate
// trees.
module tb_vhc_min_network;
  localparam int unsigned N = 7;
  localparam int unsigned W = 5;
  logic [W-1:0] mag [N];
  logic [W-1:0] excl_min [N];
  int checks = 0, failures = 0;

  vhc_min_network #(.N_IN(N), .W(W)) dut (.mag(mag), .excl_min(excl_min));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(string tag);
    int m;
    #1;
    for (int r = 0; r < N; r++) begin
      m = 2**W - 1;
      for (int k = 0; k < N; k++) if (k != r && int'(mag[k]) < m) m = int'(mag[k]);
      checks++;
      if (int'(excl_min[r]) != m) begin
        failures++;
        if (failures < 10) $display("FAIL %s r=%0d got=%0d exp=%0d", tag, r, excl_min[r], m);
      end
    end
  endtask

  initial begin
    checks++;
    if (dut.NUM_CMP != 18) begin
      failures++;
      $display("FAIL Min cell count %0d, expected 18", dut.NUM_CMP);
    end
    checks++;
    if (dut.DEPTH != 3) begin
      failures++;
      $display("FAIL depth %0d, expected 3", dut.DEPTH);
    end
    // all equal
    for (int k = 0; k < N; k++) mag[k] = 5'd9;
    check_all("equal");
    // unique minimum at each position, second minimum elsewhere
    for (int p = 0; p < N; p++) begin
      for (int k = 0; k < N; k++) mag[k] = W'(20 + k);
      mag[p] = 5'd2;
      mag[(p + 3) % N] = 5'd4;
      check_all("unique-min");
    end
    // tied minimum at every pair of positions
    for (int p = 0; p < N; p++) begin
      for (int s = p + 1; s < N; s++) begin
        for (int k = 0; k < N; k++) mag[k] = W'(31 - k);
        mag[p] = 5'd1;
        mag[s] = 5'd1;
        check_all("tie");
      end
    end
    // each input alone at zero / at maximum
    for (int p = 0; p < N; p++) begin
      for (int k = 0; k < N; k++) mag[k] = '1;
      mag[p] = '0;
      check_all("zero");
      for (int k = 0; k < N; k++) mag[k] = '0;
      mag[p] = '1;
      check_all("max");
    end
    // random
    for (int t = 0; t < 3000; t++) begin
      for (int k = 0; k < N; k++) mag[k] = W'($urandom);
      check_all("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

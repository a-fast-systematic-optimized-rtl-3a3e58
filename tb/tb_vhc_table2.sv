// tb_vhc_table2 -- the shared minimum network at every size of the published
// comparator-count table (6 to 14 inputs).
//
// For each size the network is elaborated, driven with random and directed
// magnitudes and checked against a plain loop reference. Its Min cell count
// and depth are printed next to the published count and next to the
// unshared design (N*(N-2) cells). Checked: every output value, a depth of
// exactly ceil(log2(N-1)) levels, and fewer cells than the unshared design.
// The sizes where the generated count equals the published one (6, 7, 8, 12)
// are also checked.
module tb_vhc_table2;
  import vhc_pkg::*;
  localparam int unsigned W = 5;
  localparam int NSIZES = 9;
  localparam int SIZES     [NSIZES] = '{6, 7, 8, 9, 10, 11, 12, 13, 14};
  localparam int PUBLISHED [NSIZES] = '{12, 18, 22, 28, 25, 41, 36, 49, 38};
  localparam bit MUST_EQ   [NSIZES] = '{1, 1, 1, 0, 0, 0, 1, 0, 0};

  int checks = 0, failures = 0;
  bit done [NSIZES];

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar s = 0; s < NSIZES; s++) begin : g_size
    localparam int unsigned N = SIZES[s];
    logic [W-1:0] mag [N];
    logic [W-1:0] excl_min [N];

    vhc_min_network #(.N_IN(N), .W(W)) dut (.mag(mag), .excl_min(excl_min));

    initial begin
      int m, depth_exp;
      done[s] = 1'b0;
      #(1 + s * 10);
      depth_exp = int'(clog2_u(N - 1));
      $display("N_in=%0d: Min cells %0d (published %0d, unshared %0d), levels %0d",
               N, dut.NUM_CMP, PUBLISHED[s], N * (N - 2), dut.DEPTH);
      checks++;
      if (dut.DEPTH != depth_exp) begin
        failures++;
        $display("FAIL N_in=%0d depth %0d expected %0d", N, dut.DEPTH, depth_exp);
      end
      checks++;
      if (dut.NUM_CMP >= int'(N * (N - 2))) begin
        failures++;
        $display("FAIL N_in=%0d no saving over the unshared design", N);
      end
      if (MUST_EQ[s]) begin
        checks++;
        if (dut.NUM_CMP != PUBLISHED[s]) begin
          failures++;
          $display("FAIL N_in=%0d count %0d expected %0d", N, dut.NUM_CMP, PUBLISHED[s]);
        end
      end
      for (int t = 0; t < 2000 + int'(N); t++) begin
        if (t < int'(N)) begin
          // unique minimum at position t
          for (int k = 0; k < int'(N); k++) mag[k] = W'(10 + k);
          mag[t] = W'(3);
        end else begin
          for (int k = 0; k < int'(N); k++) mag[k] = W'($urandom);
        end
        #1;
        for (int r = 0; r < int'(N); r++) begin
          m = 2**W - 1;
          for (int k = 0; k < int'(N); k++) if (k != r && int'(mag[k]) < m) m = int'(mag[k]);
          checks++;
          if (int'(excl_min[r]) != m) begin
            failures++;
            if (failures < 10) $display("FAIL N_in=%0d r=%0d got=%0d exp=%0d", N, r, excl_min[r], m);
          end
        end
      end
      done[s] = 1'b1;
    end
  end

  initial begin
    bit all;
    all = 1'b0;
    while (!all) begin
      #100;
      all = 1'b1;
      for (int s = 0; s < NSIZES; s++) if (!done[s]) all = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

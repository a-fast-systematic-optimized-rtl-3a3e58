// tb_vhc_min_cell -- exhaustive check of the 2-input Min cell.
// Every pair of W-bit magnitudes is applied; y must equal the smaller one.
module tb_vhc_min_cell;
  localparam int unsigned W = 5;
  logic [W-1:0] a, b, y;
  int checks = 0, failures = 0;

  vhc_min_cell #(.W(W)) dut (.a(a), .b(b), .y(y));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2**W; i++) begin
      for (int j = 0; j < 2**W; j++) begin
        a = W'(i);
        b = W'(j);
        #1;
        checks++;
        if (int'(y) != ((i < j) ? i : j)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d y=%0d", i, j, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

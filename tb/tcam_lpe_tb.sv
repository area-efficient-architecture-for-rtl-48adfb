// tcam_lpe_tb: exhaustive test of the layer priority encoder with a
// non-zero base address (the second layer of the default table).
module tcam_lpe_tb;
  localparam int K = 4;
  localparam int AW = 3;
  localparam int BASE = 4;
  logic [K-1:0] hits;
  logic valid;
  logic [AW-1:0] pma;
  int checks = 0, failures = 0;

  tcam_lpe #(.K(K), .AW(AW), .BASE(BASE)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2**K; v++) begin
      int first;
      hits = K'(v);
      #1;
      first = -1;
      for (int k = K - 1; k >= 0; k--) if (v[k]) first = k;
      checks++;
      if (valid !== (first >= 0) || (first >= 0 && pma !== AW'(BASE + first)) ||
          (first < 0 && pma !== '0)) begin
        failures++;
        $display("FAIL hits=%b: valid=%0b pma=%0d expected first=%0d", hits, valid, pma, first);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

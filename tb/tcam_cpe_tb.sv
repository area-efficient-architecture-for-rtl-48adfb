// tcam_cpe_tb: test of the CAM priority encoder over every combination of
// layer valid bits, with random PMAs.
module tcam_cpe_tb;
  localparam int L = 3;
  localparam int AW = 3;
  logic pma_valid [L];
  logic [AW-1:0] pma [L];
  logic match;
  logic [AW-1:0] ma;
  int checks = 0, failures = 0;

  tcam_cpe #(.L(L), .AW(AW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int v = 0; v < 2**L; v++) begin
        int first;
        first = -1;
        for (int l = 0; l < L; l++) begin
          pma_valid[l] = v[l];
          pma[l] = AW'($urandom);
        end
        for (int l = L - 1; l >= 0; l--) if (v[l]) first = l;
        #1;
        checks++;
        if (match !== (first >= 0) || (first >= 0 && ma !== pma[first]) ||
            (first < 0 && ma !== '0)) begin
          failures++;
          $display("FAIL valid=%b: match=%0b ma=%0d first=%0d", v[L-1:0], match, ma, first);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

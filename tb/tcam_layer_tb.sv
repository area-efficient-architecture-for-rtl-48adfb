// tcam_layer_tb: loads random ternary entries into one layer through its
// memory write port (contents computed here from the entries), runs
// back-to-back searches, and compares the PMA two edges after each search
// with a direct ternary comparison of the key against the entries.  Also
// checks that the activation is low exactly when some sub-word is accepted
// by no entry, and that the OATs get no clock pulse then.
module tcam_layer_tb;
  localparam int C = 6, W = 2, N = C / W, K = 3, AW = 3, BASE = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic search = 1'b0;
  logic [W-1:0] sw [N];
  logic wr_en = 1'b0;
  logic [W-1:0] wr_addr = '0;
  logic wr_vm [N];
  logic [K-1:0] wr_oat [N];
  logic activation, pma_valid;
  logic [AW-1:0] pma;

  logic [C-1:0] t_data [K], t_care [K];
  logic t_valid [K];
  int checks = 0, failures = 0, stopped = 0, gated_pulses = 0, matched = 0;

  tcam_layer #(.N(N), .W(W), .K(K), .AW(AW), .BASE(BASE)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge dut.oat_clk) gated_pulses++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic bit sub_ok(int k, int n, logic [W-1:0] s);
    logic [W-1:0] d, m;
    d = t_data[k][C-1-n*W -: W];
    m = t_care[k][C-1-n*W -: W];
    return t_valid[k] && (((d ^ s) & m) == '0);
  endfunction

  task automatic load_table();
    for (int k = 0; k < K; k++) begin
      t_data[k] = C'($urandom);
      t_care[k] = C'($urandom) | C'($urandom);
      t_valid[k] = ($urandom_range(0, 5) != 0);
    end
    for (int s = 0; s < 2**W; s++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = W'(s);
      for (int n = 0; n < N; n++) begin
        for (int k = 0; k < K; k++) wr_oat[n][k] = sub_ok(k, n, W'(s));
        wr_vm[n] = (wr_oat[n] != 0);
      end
    end
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < N; n++) sw[n] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      int p0, s0;
      load_table();
      s0 = stopped;
      p0 = gated_pulses;
      for (int i = 0; i < 40; i++) begin
        logic [C-1:0] key;
        // bias keys towards stored entries so that matches happen
        if ($urandom_range(0, 1) == 1) begin
          int k;
          k = $urandom_range(0, K - 1);
          key = (t_data[k] & t_care[k]) | (C'($urandom) & ~t_care[k]);
        end else begin
          key = C'($urandom);
        end
        @(negedge clk);
        search = 1'b1;
        for (int n = 0; n < N; n++) sw[n] = key[C-1-n*W -: W];
        @(negedge clk);
        search = 1'b0;
        // the sub-words only need to be valid in the search cycle
        for (int n = 0; n < N; n++) sw[n] = W'($urandom);
        begin
          bit exp_act;
          exp_act = 1;
          for (int n = 0; n < N; n++) begin
            bit any;
            any = 0;
            for (int k = 0; k < K; k++) any |= sub_ok(k, n, key[C-1-n*W -: W]);
            exp_act &= any;
          end
          check(activation == exp_act, $sformatf("activation key %b", key));
          if (!exp_act) stopped++;
        end
        @(negedge clk);
        begin
          int first;
          first = -1;
          for (int k = K - 1; k >= 0; k--) begin
            bit all;
            all = 1;
            for (int n = 0; n < N; n++) all &= sub_ok(k, n, key[C-1-n*W -: W]);
            if (all) first = k;
          end
          if (first >= 0) matched++;
          check(pma_valid == (first >= 0) && (first < 0 || pma == AW'(BASE + first)),
                $sformatf("key %b: valid %0b pma %0d, expected first %0d", key, pma_valid, pma, first));
        end
      end
      // one pulse per activated search, none otherwise
      check(gated_pulses - p0 == 40 - (stopped - s0),
            $sformatf("OAT clock pulses %0d for %0d activated searches", gated_pulses - p0, 40 - (stopped - s0)));
    end
    check(stopped > 0 && matched > 0, $sformatf("coverage stopped=%0d matched=%0d", stopped, matched));
    $display("searches stopped at VM: %0d, matched: %0d", stopped, matched);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tcam_mapper_tb: checks the expansion of the ternary table into VM and OAT
// contents.  The written rows are captured into shadow memories and compared
// with contents computed directly from the ternary entries.  The first table
// is the four-entry example (10 10 / 01 01 / 0x 11 / 11 1x), whose second
// layer must give VM rows 1101 and 0011 (rows 0..3) and OAT rows
// 10,10,01,00 and 01,01,01,11 (original addresses 2 and 3).  Random tables
// follow.  Also checks busy lasting 2**W cycles per write.
module tcam_mapper_tb;
  localparam int L = 2, K = 2, C = 4, W = 2, N = C / W, AW = 2, E = L * K;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, wr_valid = 1'b0;
  logic [AW-1:0] wr_addr = '0;
  logic [C-1:0] wr_data = '0, wr_care = '0;
  logic busy, mem_we;
  logic [W-1:0] mem_addr;
  logic mem_vm [L][N];
  logic [K-1:0] mem_oat [L][N];

  logic         sh_vm  [L][N][2**W];
  logic [K-1:0] sh_oat [L][N][2**W];
  logic [C-1:0] t_data [E], t_care [E];
  logic         t_valid [E];
  int checks = 0, failures = 0;

  tcam_mapper #(.L(L), .K(K), .C(C), .W(W)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (mem_we) begin
      for (int l = 0; l < L; l++)
        for (int n = 0; n < N; n++) begin
          sh_vm[l][n][mem_addr]  <= mem_vm[l][n];
          sh_oat[l][n][mem_addr] <= mem_oat[l][n];
        end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Does entry e accept sub-word value s in partition n?  (bit by bit)
  function automatic bit accepts(int e, int n, int s);
    if (!t_valid[e]) return 0;
    for (int b = 0; b < W; b++) begin
      int pos;
      pos = C - 1 - n * W - (W - 1 - b);
      if (t_care[e][pos] && (t_data[e][pos] != s[b])) return 0;
    end
    return 1;
  endfunction

  task automatic compare_all();
    for (int l = 0; l < L; l++)
      for (int n = 0; n < N; n++)
        for (int s = 0; s < 2**W; s++) begin
          logic [K-1:0] row;
          for (int k = 0; k < K; k++) row[k] = accepts(l * K + k, n, s);
          check(sh_oat[l][n][s] === row && sh_vm[l][n][s] === (row != 0),
                $sformatf("layer %0d part %0d row %0d: vm %0b oat %b exp %b", l, n, s,
                          sh_vm[l][n][s], sh_oat[l][n][s], row));
        end
  endtask

  task automatic write_entry(int e, logic [C-1:0] d, logic [C-1:0] m, logic v);
    int cycles;
    @(negedge clk);
    check(!busy, "idle before write");
    wr_en = 1'b1; wr_addr = AW'(e); wr_data = d; wr_care = m; wr_valid = v;
    t_data[e] = d; t_care[e] = m; t_valid[e] = v;
    @(negedge clk);
    wr_en = 1'b0;
    cycles = 0;
    while (busy) begin
      cycles++;
      @(negedge clk);
    end
    check(cycles == 2**W, $sformatf("busy for %0d cycles", cycles));
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < E; e++) t_valid[e] = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (2**W + 1) @(negedge clk);
    compare_all();   // empty table after reset
    // the four-entry example table
    write_entry(0, 4'b1010, 4'b1111, 1'b1);
    write_entry(1, 4'b0101, 4'b1111, 1'b1);
    write_entry(2, 4'b0011, 4'b1011, 1'b1);   // 0x 11
    write_entry(3, 4'b1110, 4'b1110, 1'b1);   // 11 1x
    compare_all();
    // printed mapping of layer 2
    check({sh_vm[1][0][3], sh_vm[1][0][2], sh_vm[1][0][1], sh_vm[1][0][0]} == 4'b1011, "VM21");
    check({sh_vm[1][1][3], sh_vm[1][1][2], sh_vm[1][1][1], sh_vm[1][1][0]} == 4'b1100, "VM22");
    check(sh_oat[1][0][0] == 2'b01 && sh_oat[1][0][1] == 2'b01 && sh_oat[1][0][2] == 2'b00 &&
          sh_oat[1][0][3] == 2'b10, "OAT21 rows (bit 0 = address 2)");
    check(sh_oat[1][1][0] == 2'b00 && sh_oat[1][1][1] == 2'b00 && sh_oat[1][1][2] == 2'b10 &&
          sh_oat[1][1][3] == 2'b11, "OAT22 rows (bit 0 = address 2)");
    for (int i = 0; i < 60; i++) begin
      write_entry($urandom_range(0, E - 1), C'($urandom), C'($urandom), 1'($urandom_range(0, 4) != 0));
      compare_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

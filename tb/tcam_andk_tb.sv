// tcam_andk_tb: randomised test of the K-bit AND operation, including the
// worked example rows 10 and 11 giving 10.
module tcam_andk_tb;
  localparam int N = 2;
  localparam int K = 2;
  logic activated;
  logic [K-1:0] rows [N];
  logic [K-1:0] hits;
  int checks = 0, failures = 0;

  tcam_andk #(.N(N), .K(K)) dut (.*);

  task automatic check(input logic [K-1:0] exp);
    #1;
    checks++;
    if (hits !== exp) begin
      failures++;
      $display("FAIL act=%0b rows=%b %b: got %b expected %b", activated, rows[0], rows[1], hits, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    activated = 1'b1; rows[0] = 2'b10; rows[1] = 2'b11;
    check(2'b10);
    for (int i = 0; i < 200; i++) begin
      logic [K-1:0] exp;
      activated = 1'($urandom_range(0, 3) != 0);
      exp = {K{activated}};
      for (int n = 0; n < N; n++) begin
        rows[n] = K'($urandom);
        exp &= rows[n];
      end
      check(exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

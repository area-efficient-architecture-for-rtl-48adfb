// tcam_and1_tb: exhaustive test of the 1-bit AND operation.
module tcam_and1_tb;
  localparam int N = 2;
  logic search;
  logic [N-1:0] vm_bits;
  logic activation;
  int checks = 0, failures = 0;

  tcam_and1 #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      for (int v = 0; v < 2**N; v++) begin
        logic exp;
        search = 1'(s); vm_bits = N'(v);
        #1;
        exp = (s == 1) && (v == 2**N - 1);
        checks++;
        if (activation !== exp) begin
          failures++;
          $display("FAIL search=%0d vm=%b: got %0b", s, vm_bits, activation);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

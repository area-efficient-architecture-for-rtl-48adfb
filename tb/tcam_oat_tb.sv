// tcam_oat_tb: self-checking test of the original address table.
//
// Writes random K-bit rows, reads them back against a model array, and
// checks read-before-write and that the row holds while rd_en is low.
module tcam_oat_tb;
  localparam int W = 2;
  localparam int K = 2;
  logic clk = 1'b0;
  logic rd_en = 1'b0, we = 1'b0;
  logic [W-1:0] rd_addr = '0, wr_addr = '0;
  logic [K-1:0] wr_row = '0, rd_row;
  logic [K-1:0] model [2**W];
  int checks = 0, failures = 0;

  tcam_oat #(.W(W), .K(K)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [K-1:0] got, input logic [K-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int round = 0; round < 20; round++) begin
      for (int a = 0; a < 2**W; a++) begin
        @(negedge clk);
        we = 1'b1; wr_addr = W'(a); wr_row = K'($urandom); model[a] = wr_row;
      end
      @(negedge clk); we = 1'b0;
      for (int a = 0; a < 2**W; a++) begin
        @(negedge clk); rd_en = 1'b1; rd_addr = W'(a);
        @(negedge clk); rd_en = 1'b0; rd_addr = W'(a + 1);
        check(rd_row, model[a], $sformatf("read row %0d", a));
        @(negedge clk);
        check(rd_row, model[a], "hold");
      end
      @(negedge clk);
      rd_en = 1'b1; rd_addr = W'(round); we = 1'b1; wr_addr = W'(round);
      wr_row = ~model[round % (2**W)];
      @(negedge clk);
      rd_en = 1'b0; we = 1'b0;
      check(rd_row, model[round % (2**W)], "read before write");
      model[round % (2**W)] = wr_row;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tcam_vm_tb: self-checking test of the validation memory.
//
// Writes random bits to every row, reads every row back and compares with
// a model array; checks that a read at the same edge as a write to the same
// row returns the old bit, and that the output holds while rd_en is low.
module tcam_vm_tb;
  localparam int W = 2;
  logic clk = 1'b0;
  logic rd_en = 1'b0, we = 1'b0, wr_bit = 1'b0, rd_bit;
  logic [W-1:0] rd_addr = '0, wr_addr = '0;
  logic model [2**W];
  int checks = 0, failures = 0;

  tcam_vm #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
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
        we = 1'b1; wr_addr = W'(a); wr_bit = 1'($urandom); model[a] = wr_bit;
      end
      @(negedge clk); we = 1'b0;
      for (int a = 0; a < 2**W; a++) begin
        @(negedge clk); rd_en = 1'b1; rd_addr = W'(a);
        @(negedge clk); rd_en = 1'b0;
        check(rd_bit, model[a], $sformatf("read row %0d", a));
        // output holds while rd_en is low
        rd_addr = W'(a + 1);
        @(negedge clk);
        check(rd_bit, model[a], "hold");
      end
      // read-before-write on the same row
      @(negedge clk);
      rd_en = 1'b1; rd_addr = W'(round); we = 1'b1; wr_addr = W'(round);
      wr_bit = ~model[round % (2**W)];
      @(negedge clk);
      rd_en = 1'b0; we = 1'b0;
      check(rd_bit, model[round % (2**W)], "read before write");
      model[round % (2**W)] = wr_bit;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

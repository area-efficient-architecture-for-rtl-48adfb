// tcam_vm: validation memory (VM) of one horizontal partition of a layer.
//
// A 2**W x 1 memory addressed by a W-bit sub-word of the search word.  The
// stored bit is 1 when at least one entry of the layer accepts that sub-word
// value in this partition, so a 0 tells the layer that no entry can match and
// the search stops there.  Size and meaning follow the design description;
// the synchronous read and the separate write port are choices of this RTL.
//
// Timing: read is synchronous.  With rd_en high at a rising clock edge,
// rd_bit shows mem[rd_addr] after that edge and holds while rd_en is low.
// A write (we) at the same edge as a read of the same row returns the old
// bit (read-before-write).  The contents are not reset: tcam_mapper rewrites
// every row after reset.
module tcam_vm #(
  parameter int W = tcam_pkg::W_DEF
) (
  input  logic         clk,
  // search read port
  input  logic         rd_en,
  input  logic [W-1:0] rd_addr,
  output logic         rd_bit,
  // write port, driven by the table expansion
  input  logic         we,
  input  logic [W-1:0] wr_addr,
  input  logic         wr_bit
);

  logic mem [2**W];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_bit;
    if (rd_en) rd_bit <= mem[rd_addr];
  end

endmodule

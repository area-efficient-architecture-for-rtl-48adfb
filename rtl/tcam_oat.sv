// tcam_oat: original address table (OAT) of one horizontal partition of a layer.
//
// A 2**W x K memory.  In the area-efficient architecture the sub-word
// addresses the OAT directly (there is no address-translation memory in
// front of it).  Bit k of row s is 1 when entry k of the layer accepts the
// sub-word value s in this partition.  The row is read only when the
// layer's activation signal (rd_en) is high.
//
// Timing: synchronous read and write on clk.  In a layer, clk is the gated
// clock from tcam_clk_gate, which only pulses when the layer is activated or
// being rewritten, so the OAT is idle otherwise.  rd_row holds its value
// while rd_en is low.  A read and a write of the same row at one edge return
// the old row.  Contents are not reset; tcam_mapper writes every row.
module tcam_oat #(
  parameter int W = tcam_pkg::W_DEF,
  parameter int K = tcam_pkg::K_DEF
) (
  input  logic         clk,
  // search read port
  input  logic         rd_en,
  input  logic [W-1:0] rd_addr,
  output logic [K-1:0] rd_row,
  // write port, driven by the table expansion
  input  logic         we,
  input  logic [W-1:0] wr_addr,
  input  logic [K-1:0] wr_row
);

  logic [K-1:0] mem [2**W];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_row;
    if (rd_en) rd_row <= mem[rd_addr];
  end

endmodule

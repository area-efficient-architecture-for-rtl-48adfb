// tcam_cpe: CAM priority encoder (CPE).
//
// Receives the probable match address of every layer together with its
// valid bit and selects the match address (MA) of the TCAM.  The lowest
// layer that reports a match wins; since layers hold consecutive address
// ranges this gives the lowest matching address overall.  The direction of
// priority is a choice of this RTL.  `match` is low, and ma is 0, when no
// layer matches.  Combinational.
module tcam_cpe #(
  parameter int L  = tcam_pkg::L_DEF,
  parameter int AW = tcam_pkg::addr_width(tcam_pkg::L_DEF * tcam_pkg::K_DEF)
) (
  input  logic          pma_valid [L],
  input  logic [AW-1:0] pma [L],
  output logic          match,
  output logic [AW-1:0] ma
);

  always_comb begin
    match = 1'b0;
    ma    = '0;
    for (int l = L - 1; l >= 0; l--) begin
      if (pma_valid[l]) begin
        match = 1'b1;
        ma    = pma[l];
      end
    end
  end

endmodule

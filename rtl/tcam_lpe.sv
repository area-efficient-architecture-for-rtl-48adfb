// tcam_lpe: layer priority encoder (LPE).
//
// Turns the K-bit match vector of a layer into the probable match address
// (PMA).  The PMA is the address of the entry in the whole table, as in the
// worked search example where the layer holding entries 2 and 3 reports
// PMA = 2, so the encoder adds the layer's first address BASE to the local
// index.  When several entries match, the lowest address wins (a linear
// scan from bit 0); the direction of priority is a choice of this RTL.
// `valid` is low when no bit is set, and pma is then 0.  Combinational.
module tcam_lpe #(
  parameter int K    = tcam_pkg::K_DEF,
  parameter int AW   = tcam_pkg::addr_width(tcam_pkg::L_DEF * tcam_pkg::K_DEF),
  parameter int BASE = 0
) (
  input  logic [K-1:0]  hits,
  output logic          valid,
  output logic [AW-1:0] pma
);

  always_comb begin
    valid = 1'b0;
    pma   = '0;
    for (int k = K - 1; k >= 0; k--) begin
      if (hits[k]) begin
        valid = 1'b1;
        pma   = AW'(BASE + k);
      end
    end
  end

endmodule

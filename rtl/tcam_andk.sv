// tcam_andk: the "K-bit AND operation" of a layer.
//
// Bitwise AND of the N K-bit rows read from the layer's OATs.  Bit k of the
// result is 1 when every sub-word of the search word is accepted by entry k
// of the layer, i.e. entry k matches the whole word.  The rows are only
// meaningful when the layer was activated, so the result is forced to zero
// when `activated` is low (the OATs were not read and hold stale rows).
// Purely combinational.
module tcam_andk #(
  parameter int N = tcam_pkg::C_DEF / tcam_pkg::W_DEF,
  parameter int K = tcam_pkg::K_DEF
) (
  input  logic         activated,
  input  logic [K-1:0] rows [N],
  output logic [K-1:0] hits
);

  always_comb begin
    hits = {K{activated}};
    for (int n = 0; n < N; n++) hits &= rows[n];
  end

endmodule

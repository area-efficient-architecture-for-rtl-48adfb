// tcam_and1: the "1-bit AND operation" of a layer.
//
// ANDs the N one-bit outputs of the layer's validation memories.  The result
// is the activation signal: high only when every sub-word of the search word
// is accepted by some entry of the layer, which is the condition for the
// search to go on into the OATs.  Purely combinational.  The extra `search`
// input, which qualifies the result with a valid search in flight, is a
// choice of this RTL.
module tcam_and1 #(
  parameter int N = tcam_pkg::C_DEF / tcam_pkg::W_DEF
) (
  input  logic         search,
  input  logic [N-1:0] vm_bits,
  output logic         activation
);

  assign activation = search & (&vm_bits);

endmodule

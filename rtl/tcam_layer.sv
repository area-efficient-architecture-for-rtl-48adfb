// tcam_layer: one layer of the area-efficient SRAM-based TCAM.
//
// A layer holds K consecutive entries of the ternary table (addresses BASE
// to BASE+K-1).  Each of the N sub-words of the search word addresses its
// own validation memory (VM_n).  The N VM bits are ANDed (tcam_and1) into
// the activation signal; if any sub-word is unknown to the layer the search
// stops there and the OATs are not clocked.  Otherwise each sub-word reads
// its original address table (OAT_n) directly -- the area-efficient form has
// no address-translation memory between VM and OAT -- and the K-bit AND of
// the N rows marks the entries that match the whole word.  The layer
// priority encoder turns that vector into the probable match address (PMA).
//
// Pipeline (all on rising edges of clk):
//   edge 1: the VMs are read with the sub-words; sub-words and the search
//           strobe are registered.
//   edge 2: the OATs, clocked by a gated clock that pulses only when the
//           layer is activated or being rewritten, read their rows; the
//           activation is registered.
//   after edge 2: pma_valid / pma are valid (combinational from the OAT
//           rows), so a search presented at edge 1 gives its PMA after edge 2.
// One search can start every cycle.
//
// The write port is driven by tcam_mapper: at each write edge it writes
// row wr_addr of every VM and every OAT of the layer.  Searches must not be
// issued while it writes.  The partition structure and the data flow follow
// the published area-efficient layer; the pipeline cut, the
// gated clock per layer and the write port are this design's choices.
module tcam_layer #(
  parameter int N    = tcam_pkg::C_DEF / tcam_pkg::W_DEF,
  parameter int W    = tcam_pkg::W_DEF,
  parameter int K    = tcam_pkg::K_DEF,
  parameter int AW   = tcam_pkg::addr_width(tcam_pkg::L_DEF * tcam_pkg::K_DEF),
  parameter int BASE = 0
) (
  input  logic          clk,
  input  logic          rst_n,
  // search
  input  logic          search,
  input  logic [W-1:0]  sw [N],
  // memory write port (table expansion)
  input  logic          wr_en,
  input  logic [W-1:0]  wr_addr,
  input  logic          wr_vm [N],
  input  logic [K-1:0]  wr_oat [N],
  // result
  output logic          activation,   // search went past the VMs (cycle after edge 1)
  output logic          pma_valid,
  output logic [AW-1:0] pma
);

  logic         vm_bit [N];
  logic [N-1:0] vm_bits;
  logic [W-1:0] sw_q [N];
  logic         search_q;
  logic         activation_q;
  logic         oat_clk;
  logic [K-1:0] oat_row [N];
  logic [K-1:0] hits;

  // Validation memories, read with the incoming sub-words.
  for (genvar n = 0; n < N; n++) begin : g_vm
    tcam_vm #(.W(W)) u_vm (
      .clk    (clk),
      .rd_en  (search),
      .rd_addr(sw[n]),
      .rd_bit (vm_bit[n]),
      .we     (wr_en),
      .wr_addr(wr_addr),
      .wr_bit (wr_vm[n])
    );
    assign vm_bits[n] = vm_bit[n];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      search_q     <= 1'b0;
      activation_q <= 1'b0;
    end else begin
      search_q     <= search;
      activation_q <= activation;
    end
  end

  always_ff @(posedge clk) begin
    if (search) sw_q <= sw;
  end

  tcam_and1 #(.N(N)) u_and1 (
    .search    (search_q),
    .vm_bits   (vm_bits),
    .activation(activation)
  );

  // The OATs of the layer only see clock pulses when they have work.
  tcam_clk_gate u_cg (
    .clk (clk),
    .en  (activation | wr_en),
    .gclk(oat_clk)
  );

  for (genvar n = 0; n < N; n++) begin : g_oat
    tcam_oat #(.W(W), .K(K)) u_oat (
      .clk    (oat_clk),
      .rd_en  (activation),
      .rd_addr(sw_q[n]),
      .rd_row (oat_row[n]),
      .we     (wr_en),
      .wr_addr(wr_addr),
      .wr_row (wr_oat[n])
    );
  end

  tcam_andk #(.N(N), .K(K)) u_andk (
    .activated(activation_q),
    .rows     (oat_row),
    .hits     (hits)
  );

  tcam_lpe #(.K(K), .AW(AW), .BASE(BASE)) u_lpe (
    .hits (hits),
    .valid(pma_valid),
    .pma  (pma)
  );

endmodule

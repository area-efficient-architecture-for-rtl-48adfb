// tcam_top: area-efficient ternary CAM built from partitioned SRAM.
//
// A ternary CAM returns the address of the first stored word that matches a
// search key, where stored words may contain don't-care bits.  Here the
// table is cut two ways: into L layers of K consecutive entries, and each
// entry into N = C/W sub-words of W bits.  Every (layer, sub-word) pair owns
// a small validation memory (2**W x 1) and an original address table
// (2**W x K), both addressed by the sub-word itself.  A search splits the key
// into its sub-words, sends them to all layers at once, and each layer
// answers with a probable match address (PMA); the CAM priority encoder
// picks the match address MA.  A layer's OATs are only clocked when all its
// validation memories accept the key (gated clocking).
//
// Interface (one request per cycle while ready is high):
//   req & r_wb=1 : search for key c.
//   req & r_wb=0 : write entry wr_addr with data c, care mask care (1 = bit
//                  compared, 0 = don't care) and valid bit wr_valid.  The
//                  layer memories are then rewritten, which holds ready low
//                  for 2**W cycles.  After reset ready is also low for 2**W
//                  cycles while the empty table is written.
//   A request made while ready is low is ignored.
//   layer_active[l] is high in the cycle after a search was accepted when
//   layer l passed its validation memories, i.e. when its OATs are clocked.
// Timing: a search presented in cycle 0 (sampled by the rising edge ending
// it) has ma_valid high in cycle 3, with match (any entry matched) and ma
// (lowest matching address): VM read, OAT read, output register.
// Searches can be issued back to back.  A search issued after a write has
// been accepted and ready has returned high sees the new table.
//
// The layer and top-level structure follow the published architecture; the request
// interface, the write/expansion path, the match flag and the 3-cycle
// pipeline are this design's choices.
module tcam_top #(
  parameter int C  = tcam_pkg::C_DEF,
  parameter int W  = tcam_pkg::W_DEF,
  parameter int L  = tcam_pkg::L_DEF,
  parameter int K  = tcam_pkg::K_DEF,
  parameter int AW = tcam_pkg::addr_width(L * K)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,
  input  logic          r_wb,
  input  logic [C-1:0]  c,
  input  logic [C-1:0]  care,
  input  logic [AW-1:0] wr_addr,
  input  logic          wr_valid,
  output logic          ready,
  output logic          layer_active [L],
  output logic          ma_valid,
  output logic          match,
  output logic [AW-1:0] ma
);

  localparam int N = C / W;

  logic          busy;
  logic          search;
  logic          write;
  logic [W-1:0]  sw [N];
  logic          mem_we;
  logic [W-1:0]  mem_addr;
  logic          mem_vm  [L][N];
  logic [K-1:0]  mem_oat [L][N];
  logic          pma_valid [L];
  logic [AW-1:0] pma [L];
  logic          cpe_match;
  logic [AW-1:0] cpe_ma;
  logic [1:0]    search_pipe;

  assign ready  = !busy;
  assign search = req & r_wb & !busy;
  assign write  = req & !r_wb & !busy;

  // Partition the input word into N sub-words, sub-word 0 being the most
  // significant W bits.
  for (genvar n = 0; n < N; n++) begin : g_split
    assign sw[n] = c[C-1-n*W -: W];
  end

  tcam_mapper #(.L(L), .K(K), .C(C), .W(W), .N(N), .AW(AW)) u_mapper (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (write),
    .wr_addr (wr_addr),
    .wr_data (c),
    .wr_care (care),
    .wr_valid(wr_valid),
    .busy    (busy),
    .mem_we  (mem_we),
    .mem_addr(mem_addr),
    .mem_vm  (mem_vm),
    .mem_oat (mem_oat)
  );

  for (genvar l = 0; l < L; l++) begin : g_layer
    tcam_layer #(.N(N), .W(W), .K(K), .AW(AW), .BASE(l * K)) u_layer (
      .clk       (clk),
      .rst_n     (rst_n),
      .search    (search),
      .sw        (sw),
      .wr_en     (mem_we),
      .wr_addr   (mem_addr),
      .wr_vm     (mem_vm[l]),
      .wr_oat    (mem_oat[l]),
      .activation(layer_active[l]),
      .pma_valid (pma_valid[l]),
      .pma       (pma[l])
    );
  end

  tcam_cpe #(.L(L), .AW(AW)) u_cpe (
    .pma_valid(pma_valid),
    .pma      (pma),
    .match    (cpe_match),
    .ma       (cpe_ma)
  );

  // Search strobe travels beside the layer pipeline; the result is registered.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      search_pipe <= '0;
      ma_valid    <= 1'b0;
      match       <= 1'b0;
      ma          <= '0;
    end else begin
      search_pipe <= {search_pipe[0], search};
      ma_valid    <= search_pipe[1];
      if (search_pipe[1]) begin
        match <= cpe_match;
        ma    <= cpe_ma;
      end
    end
  end

endmodule

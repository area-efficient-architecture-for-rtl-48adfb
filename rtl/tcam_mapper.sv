// tcam_mapper: holds the ternary table and expands it into the layer memories.
//
// The table has L*K entries of C bits, each with a care mask (a 0 in the
// mask is a don't-care "x") and a valid bit.  Entry e belongs to layer
// e / K as its local entry e % K, and its C bits are cut into N = C/W
// sub-words, the most significant sub-word being partition 0.  Expanding a
// hybrid partition into binary form means, for every sub-word value s:
//   OAT[l][n][s] bit k = entry l*K+k is valid and its sub-word n, with its
//                        don't-care bits ignored, equals s
//   VM [l][n][s]       = OR of the K bits of OAT[l][n][s]
// so a 0x sub-word fills rows 00 and 01, and so on.
//
// Operation: after reset every entry is invalid and the engine runs one
// expansion, which clears all memories.  A write (wr_en while busy is low)
// replaces one entry and starts a new expansion.  An expansion takes 2**W
// cycles: in each it presents row s of every VM and OAT of every layer on
// mem_* with mem_we high, s counting from 0 up.  `busy` is high from the
// edge that accepts a write until the last row has been written; the TCAM
// must not be searched meanwhile.  Holding the table in registers and
// rewriting the memories in hardware are this design's choices; the
// published architecture gives the mapping itself.
module tcam_mapper #(
  parameter int L  = tcam_pkg::L_DEF,
  parameter int K  = tcam_pkg::K_DEF,
  parameter int C  = tcam_pkg::C_DEF,
  parameter int W  = tcam_pkg::W_DEF,
  parameter int N  = C / W,
  parameter int AW = tcam_pkg::addr_width(L * K)
) (
  input  logic          clk,
  input  logic          rst_n,
  // entry write
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [C-1:0]  wr_data,
  input  logic [C-1:0]  wr_care,
  input  logic          wr_valid,
  output logic          busy,
  // memory write bundle to every layer
  output logic          mem_we,
  output logic [W-1:0]  mem_addr,
  output logic          mem_vm  [L][N],
  output logic [K-1:0]  mem_oat [L][N]
);

  import tcam_pkg::*;

  localparam int E = L * K;

  logic [C-1:0] ent_data  [E];
  logic [C-1:0] ent_care  [E];
  logic         ent_valid [E];
  map_state_e   state;
  logic [W-1:0] s;

  initial begin
    if (C % W != 0) $error("tcam_mapper: C must be a multiple of W");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= MAP_EXPAND;
      s     <= '0;
      for (int e = 0; e < E; e++) ent_valid[e] <= 1'b0;
    end else begin
      case (state)
        MAP_IDLE: begin
          if (wr_en) begin
            ent_valid[wr_addr] <= wr_valid;
            state              <= MAP_EXPAND;
            s                  <= '0;
          end
        end
        default: begin
          s <= s + 1'b1;
          if (s == {W{1'b1}}) state <= MAP_IDLE;
        end
      endcase
    end
  end

  // Data and mask need no reset: they are ignored while the entry is invalid.
  always_ff @(posedge clk) begin
    if (state == MAP_IDLE && wr_en) begin
      ent_data[wr_addr] <= wr_data;
      ent_care[wr_addr] <= wr_care;
    end
  end

  assign busy     = (state == MAP_EXPAND);
  assign mem_we   = busy;
  assign mem_addr = s;

  always_comb begin
    for (int l = 0; l < L; l++) begin
      for (int n = 0; n < N; n++) begin
        for (int k = 0; k < K; k++) begin
          logic [W-1:0] d, m;
          d = ent_data[l*K+k][C-1-n*W -: W];
          m = ent_care[l*K+k][C-1-n*W -: W];
          mem_oat[l][n][k] = ent_valid[l*K+k] && (((d ^ s) & m) == '0);
        end
        mem_vm[l][n] = |mem_oat[l][n];
      end
    end
  end

  // A write may only be presented while the memories are not being rewritten.
  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> !busy)
    else $error("tcam_mapper: entry write while busy");

endmodule

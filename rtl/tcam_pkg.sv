// tcam_pkg: constants and types shared by the SRAM-based TCAM.
//
// The default geometry is the worked example of the design: a table of
// four 4-bit ternary words (C = 4), cut into two sub-words of w = 2 bits
// (N = C / w = 2 horizontal partitions) and into L = 2 layers of K = 2
// entries each.  Every module takes these values as its parameter defaults.
// The table-expansion state type used by tcam_mapper is also defined here.
package tcam_pkg;

  // Width of the search word (bits).
  localparam int C_DEF = 4;
  // Width of one sub-word (bits); each validation memory and OAT has 2**W rows.
  localparam int W_DEF = 2;
  // Number of layers (groups of table entries searched side by side).
  localparam int L_DEF = 2;
  // Number of table entries per layer (width of an OAT row).
  localparam int K_DEF = 2;

  // Width of an address with at least one bit.
  function automatic int addr_width(input int depth);
    return (depth > 1) ? $clog2(depth) : 1;
  endfunction

  // State of the table expansion engine.
  typedef enum logic [0:0] {
    MAP_IDLE   = 1'b0,  // memories hold the current table
    MAP_EXPAND = 1'b1   // rewriting the memories, one sub-word value per cycle
  } map_state_e;

endpackage

// tri_add_pkg: types and constants shared by the three-operand adder family.
//
// The adder family has one datapath (bit addition, base logic, prefix
// network, sum logic) and five interchangeable prefix networks. The
// prefix_e enum names the network; a module that holds several adders uses
// the enum value as an index. OPERAND_WIDTH is the operand size the design is
// built and evaluated for (24 bits). The level-count functions give the
// logic depth, in prefix-cell levels, of each network so that testbenches
// and users can compare the topologies without synthesis.
package tri_add_pkg;

  // The operand width the adders are built for.
  localparam int unsigned OPERAND_WIDTH = 24;

  // Prefix network topologies, in the order they are compared.
  typedef enum logic [2:0] {
    KOGGE_STONE    = 3'd0,
    BRENT_KUNG     = 3'd1,
    SKLANSKY       = 3'd2,
    LADNER_FISCHER = 3'd3,
    HAN_CARLSON    = 3'd4
  } prefix_e;

  localparam int unsigned NUM_TOPOLOGIES = 5;

  // ceil(log2(n)) for n >= 1, with 0 for n = 1.
  function automatic int unsigned clog2(input int unsigned n);
    int unsigned r = 0;
    while ((1 << r) < n) r++;
    return r;
  endfunction

  // Brent-Kung up-sweep levels: every l with a full 2^l block, 2^l <= n.
  function automatic int unsigned bk_up_levels(input int unsigned n);
    int unsigned r = 0;
    while ((2 << r) <= n) r++;
    return r;
  endfunction

  // Brent-Kung down-sweep levels: every l whose first fill-in node
  // 2^l + 2^(l-1) - 1 lies inside the word, i.e. 3 * 2^(l-1) <= n.
  function automatic int unsigned bk_down_levels(input int unsigned n);
    int unsigned r = 0;
    while ((3 << r) <= n) r++;
    return r;
  endfunction

  // Prefix-cell levels of each network for an n-position prefix problem.
  function automatic int unsigned prefix_levels(input prefix_e t, input int unsigned n);
    if (n <= 1) return 0;
    case (t)
      KOGGE_STONE, SKLANSKY:       return clog2(n);
      BRENT_KUNG:                  return bk_up_levels(n) + bk_down_levels(n);
      LADNER_FISCHER, HAN_CARLSON: return clog2(n) + 1;
      default:                     return 0;
    endcase
  endfunction

endpackage

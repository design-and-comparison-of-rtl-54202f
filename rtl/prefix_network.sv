// prefix_network: selects one of the five parallel prefix (PG) networks by
// the TOPOLOGY parameter, so the adders can be built around any of them.
// Input g/p are per-bit generate and propagate of positions 0 .. N-1;
// output gx[i] = G[i:0]. Purely combinational; the depth in cell levels
// is tri_add_pkg::prefix_levels(TOPOLOGY, N).
module prefix_network
  import tri_add_pkg::*;
#(
  parameter int unsigned N        = 24,
  parameter prefix_e     TOPOLOGY = SKLANSKY
) (
  input  logic [N-1:0] g,
  input  logic [N-1:0] p,
  output logic [N-1:0] gx
);
  case (TOPOLOGY)
    KOGGE_STONE:    begin : g_ks kogge_stone_pg    #(.N(N)) u_pg (.g, .p, .gx); end
    BRENT_KUNG:     begin : g_bk brent_kung_pg     #(.N(N)) u_pg (.g, .p, .gx); end
    LADNER_FISCHER: begin : g_lf ladner_fischer_pg #(.N(N)) u_pg (.g, .p, .gx); end
    HAN_CARLSON:    begin : g_hc han_carlson_pg    #(.N(N)) u_pg (.g, .p, .gx); end
    default:        begin : g_sk sklansky_pg       #(.N(N)) u_pg (.g, .p, .gx); end
  endcase
endmodule

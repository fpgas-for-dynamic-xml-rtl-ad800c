// path_engine: the path-matching NFA, a chain of N_SEG segment matchers.
//
// The segment matchers are built as N_SEG/SHARE groups that each share one
// tag RAM. The chain is strictly linear: every link is a registered
// neighbour-to-neighbour connection, so the clock rate does not depend on
// N_SEG. Projection paths are allocated to consecutive sections of the
// chain at run time; the first matcher sees match_in low and conf_in high,
// and the global match flag starts low and collects the results of all
// configured paths.
//
// Interface: din is the cooked stream from the parser; dout and match
// leave N_SEG cycles later (counted in advancing cycles). match is the flag
// for the byte in dout: high when some configured path matches the element
// level that byte belongs to. adv low stalls the whole chain.
module path_engine
  import xp_pkg::*;
#(
  parameter int unsigned N_SEG      = 600,
  parameter int unsigned SHARE      = 3,
  parameter int unsigned TAG_DEPTH  = 512,
  parameter int unsigned HIST_DEPTH = 32
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    adv,
  input  cooked_t din,
  output cooked_t dout,
  output logic    match
);

  localparam int unsigned N_GRP = N_SEG / SHARE;

  cooked_t      d [N_GRP+1];
  logic [N_GRP:0] m, g, c;

  assign d[0] = din;
  assign m[0] = 1'b0;
  assign g[0] = 1'b0;
  assign c[0] = 1'b1;

  for (genvar i = 0; i < N_GRP; i++) begin : g_grp
    matcher_group #(.SHARE(SHARE), .TAG_DEPTH(TAG_DEPTH), .HIST_DEPTH(HIST_DEPTH)) u_grp (
      .clk, .rst, .adv,
      .din(d[i]), .match_in(m[i]), .global_in(g[i]), .conf_in(c[i]),
      .dout(d[i+1]), .match_out(m[i+1]), .global_out(g[i+1]), .conf_out(c[i+1])
    );
  end

  assign dout  = d[N_GRP];
  assign match = g[N_GRP];

  // N_SEG must be a whole number of groups.
  initial assert (N_SEG % SHARE == 0 && N_SEG > 0)
    else $error("path_engine: N_SEG must be a positive multiple of SHARE");

endmodule

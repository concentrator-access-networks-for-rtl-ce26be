// dist_net: output-side access network, M programmable-logic output pins
// fanned out to N potential sinks.
//
// The output-side network is the input-side concentrator (conc_net) run
// backwards: every 2x2 crossbar and every sparse-crossbar crosspoint is
// kept, and signals travel from the M pins towards the N sinks. Pins
// 0 .. ceil(M/2)-1 feed the upper half-network, the rest the lower half;
// crossbar i delivers one half-network output to sink 2i and the other to
// sink 2i+1, and the directly wired sinks take their half's last output.
// Given the configuration that conc_router computes for a set of at most M
// active sinks, each active sink receives a different pin, and the mapping
// is the exact inverse of what conc_net would do with the same
// configuration (sink i gets pin j whenever conc_net would send input i to
// output j). Using the concentrator in reverse for the output side is the
// published idea; the mirrored crossbar and leaf cells are this design's
// rendering of it. Sinks outside the active set carry some pin's value and
// must be ignored. Combinational, same depth as conc_net.
//
// cfg: same layout and contents as conc_net #(N, M) (see conc_pkg).
//
// The module instantiates itself for its two halves. Verilator's -Wall
// lint, when this module is the top of a lint run, also checks the
// generic body behind the recursion and reports its internal signals as
// undriven or unused; under any parent, every instance is complete (the
// testbenches exercise all of them), so those warnings are left standing.
module dist_net
  import conc_pkg::*;
#(
  parameter int unsigned N = 5000,
  parameter int unsigned M = 1024,
  parameter int unsigned W = 1,
  localparam int unsigned CFG = atleast1(cfg_bits(N, M))
) (
  input  logic [CFG-1:0]       cfg,
  input  logic [M-1:0][W-1:0]  din,
  output logic [N-1:0][W-1:0]  dout
);

  if (M <= 2) begin : g_leaf
    sparse_dist #(.N(N), .M(M), .W(W)) u_leaf (
      .cfg (cfg),
      .din (din),
      .dout(dout)
    );
  end else begin : g_split
    localparam int unsigned NX  = n_xbar(N, M);
    localparam int unsigned NU  = n_up(N);
    localparam int unsigned NL  = n_lo(N);
    localparam int unsigned MU  = m_up(M);
    localparam int unsigned ML  = m_lo(M);
    localparam int unsigned CU  = cfg_bits(NU, MU);
    localparam int unsigned CL  = cfg_bits(NL, ML);
    localparam int unsigned CU1 = atleast1(CU);
    localparam int unsigned CL1 = atleast1(CL);

    logic [NU-1:0][W-1:0] up_out;
    logic [NL-1:0][W-1:0] lo_out;
    logic [CU1-1:0]       up_cfg;
    logic [CL1-1:0]       lo_cfg;

    if (CU == 0) begin : g_up_nocfg
      assign up_cfg = '0;
    end else begin : g_up_cfg
      assign up_cfg = cfg[NX +: CU];
    end
    if (CL == 0) begin : g_lo_nocfg
      assign lo_cfg = '0;
    end else begin : g_lo_cfg
      assign lo_cfg = cfg[NX + CU +: CL];
    end

    dist_net #(.N(NU), .M(MU), .W(W)) u_up (
      .cfg (up_cfg),
      .din (din[MU-1:0]),
      .dout(up_out)
    );
    dist_net #(.N(NL), .M(ML), .W(W)) u_lo (
      .cfg (lo_cfg),
      .din (din[M-1:MU]),
      .dout(lo_out)
    );

    for (genvar i = 0; i < NX; i++) begin : g_xbar
      xbar2x2 #(.W(W)) u_xbar (
        .swap(cfg[i]),
        .a   (up_out[i]),
        .b   (lo_out[i]),
        .y0  (dout[2*i]),
        .y1  (dout[2*i+1])
      );
    end
    if (has_dir_up(N, M)) begin : g_dir_up
      assign dout[2*NX] = up_out[NX];
    end
    if (has_dir_lo(N, M)) begin : g_dir_lo
      assign dout[2*NX+1] = lo_out[NX];
    end
  end

endmodule

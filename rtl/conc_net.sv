// conc_net: the recursive (N,M) concentrator of the access network.
//
// Any set of at most M active inputs out of N is connected, one to one, to
// M outputs; which output an input reaches does not matter, because the
// programmable logic behind the outputs can adapt to any pin assignment.
// One level is a stage of 2x2 crossbars followed by two half-size
// concentrators. Crossbar i takes inputs 2i and 2i+1 and sends one to each
// half; the last inputs that are not paired are wired straight to a half.
// The halves are built the same way until a half has at most two outputs,
// where a single-stage sparse crossbar (sparse_conc) takes over. Outputs
// 0 .. ceil(M/2)-1 come from the upper half, the rest from the lower half.
//
// The two-halves-plus-crossbars structure, the two directly wired inputs
// and the sparse-crossbar leaves follow the published construction. For odd
// sizes this implementation makes its own choice (see conc_pkg): the lower
// half gets floor(N/2) inputs and floor(M/2) outputs, and when N is even
// but M odd the last two inputs also go through a crossbar, so that a
// balanced split of the active inputs always fits both halves.
//
// cfg: conc_pkg::n_xbar(N,M) crossbar bits (1 = crossed), then the upper
// half's bits, then the lower half's (conc_pkg::cfg_bits gives the total;
// conc_router fills it). All of it is static configuration; the data path is combinational
// with conc_pkg::mux_depth(N,M) multiplexers on the longest path (13 for
// N = 5000 and M = 1024).
//
// The module instantiates itself for its two halves. Verilator's -Wall
// lint, when this module is the top of a lint run, also checks the
// generic body behind the recursion and reports its internal signals as
// undriven or unused; under any parent, every instance is complete (the
// testbenches exercise all of them), so those warnings are left standing.
module conc_net
  import conc_pkg::*;
#(
  parameter int unsigned N = 5000,
  parameter int unsigned M = 1024,
  parameter int unsigned W = 1,
  localparam int unsigned CFG = atleast1(cfg_bits(N, M))
) (
  input  logic [CFG-1:0]       cfg,
  input  logic [N-1:0][W-1:0]  din,
  output logic [M-1:0][W-1:0]  dout
);

  if (M <= 2) begin : g_leaf
    sparse_conc #(.N(N), .M(M), .W(W)) u_leaf (
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

    logic [NU-1:0][W-1:0] up_in;
    logic [NL-1:0][W-1:0] lo_in;
    logic [CU1-1:0]       up_cfg;
    logic [CL1-1:0]       lo_cfg;

    for (genvar i = 0; i < NX; i++) begin : g_xbar
      xbar2x2 #(.W(W)) u_xbar (
        .swap (cfg[i]),
        .a    (din[2*i]),
        .b    (din[2*i+1]),
        .y0   (up_in[i]),
        .y1   (lo_in[i])
      );
    end
    if (has_dir_up(N, M)) begin : g_dir_up
      assign up_in[NX] = din[2*NX];
    end
    if (has_dir_lo(N, M)) begin : g_dir_lo
      assign lo_in[NX] = din[2*NX+1];
    end

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

    conc_net #(.N(NU), .M(MU), .W(W)) u_up (
      .cfg (up_cfg),
      .din (up_in),
      .dout(dout[MU-1:0])
    );
    conc_net #(.N(NL), .M(ML), .W(W)) u_lo (
      .cfg (lo_cfg),
      .din (lo_in),
      .dout(dout[M-1:MU])
    );
  end

endmodule

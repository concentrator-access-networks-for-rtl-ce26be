// conc_router: computes the configuration of conc_net (same N and M) from
// the set of inputs that must reach an output.
//
// Each level balances the active inputs between its two halves so that the
// upper half never receives more than ceil(M/2) of them and the lower half
// never more than floor(M/2):
//   * a crossbar with two active or two idle inputs stays straight;
//   * the directly wired inputs count for their own half;
//   * a crossbar with one active input sends it to the half that has so far
//     received fewer active inputs, the upper half on a tie. After the
//     direct inputs this alternates between the halves.
// This is the published balancing procedure; the tie-break and the order
// (direct inputs first, then crossbars from input 0 up) are this
// implementation's choice. A leaf with at most two outputs takes its
// active inputs in increasing order and gives each the output
// max(previous + 1, i - (N-M)), the first one whose window still holds it.
//
// fail is 1 when some active input got no output; with the balancing above
// that happens exactly when more than M inputs are active, so it doubles as
// the overflow flag of a configuration request. The block is purely
// combinational and is meant to be evaluated once per configuration, not
// per data word: its longest path runs through the ripple of the
// balance state along each level.
//
// The module instantiates itself for its two halves. Verilator's -Wall
// lint, when this module is the top of a lint run, also checks the
// generic body behind the recursion and reports its internal signals as
// undriven or unused; under any parent, every instance is complete (the
// testbenches exercise all of them), so those warnings are left standing.
module conc_router
  import conc_pkg::*;
#(
  parameter int unsigned N = 5000,
  parameter int unsigned M = 1024,
  localparam int unsigned CFG = atleast1(cfg_bits(N, M))
) (
  input  logic [N-1:0]   active,
  output logic [CFG-1:0] cfg,
  output logic           fail
);

  if (M <= 2) begin : g_leaf
    localparam int unsigned SW = leaf_sel_w(N, M);

    if (SW == 0) begin : g_wired
      // N == M: input i is wired to output i, nothing can overflow
      assign cfg  = '0;
      assign fail = 1'b0;
    end else begin : g_greedy
      always_comb begin
        int next_o;
        int o;
        cfg    = '0;
        fail   = 1'b0;
        next_o = 0;
        o      = 0;
        for (int i = 0; i < int'(N); i++) begin
          if (active[i]) begin
            o = i - int'(N - M);
            if (o < next_o) o = next_o;
            if (o >= int'(M)) begin
              fail = 1'b1;
            end else begin
              cfg[o*SW +: SW] = SW'(i - o);
              next_o = o + 1;
            end
          end
        end
      end
    end
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

    logic [NU-1:0]  up_act;
    logic [NL-1:0]  lo_act;
    logic [NX-1:0]  swap;
    logic [CU1-1:0] up_cfg;
    logic [CL1-1:0] lo_cfg;
    logic           up_fail, lo_fail;

    logic [NX-1:0] xb_up, xb_lo;
    logic          dir_u, dir_l;

    if (has_dir_up(N, M)) begin : g_dir_up
      assign dir_u  = active[2*NX];
      assign up_act = {dir_u, xb_up};
    end else begin : g_no_dir_up
      assign dir_u  = 1'b0;
      assign up_act = xb_up;
    end
    if (has_dir_lo(N, M)) begin : g_dir_lo
      assign dir_l  = active[2*NX+1];
      assign lo_act = {dir_l, xb_lo};
    end else begin : g_no_dir_lo
      assign dir_l  = 1'b0;
      assign lo_act = xb_lo;
    end

    // diff = (active inputs sent up) - (active inputs sent down), -1 .. 1,
    // carried from crossbar 0 to crossbar NX-1
    always_comb begin
      logic signed [1:0] diff;
      logic              a, b, to_up;
      diff  = dir_u ? (dir_l ? 2'sd0 : 2'sd1) : (dir_l ? -2'sd1 : 2'sd0);
      a     = 1'b0;
      b     = 1'b0;
      to_up = 1'b0;
      swap  = '0;
      xb_up = '0;
      xb_lo = '0;
      for (int i = 0; i < int'(NX); i++) begin
        a     = active[2*i];
        b     = active[2*i+1];
        to_up = (diff <= 2'sd0);
        if (a == b) begin
          xb_up[i] = a;
          xb_lo[i] = b;
        end else begin
          swap[i]  = a ? !to_up : to_up;
          xb_up[i] = to_up;
          xb_lo[i] = !to_up;
          diff     = to_up ? diff + 2'sd1 : diff - 2'sd1;
        end
      end
    end

    conc_router #(.N(NU), .M(MU)) u_up (
      .active(up_act),
      .cfg   (up_cfg),
      .fail  (up_fail)
    );
    conc_router #(.N(NL), .M(ML)) u_lo (
      .active(lo_act),
      .cfg   (lo_cfg),
      .fail  (lo_fail)
    );

    assign fail = up_fail | lo_fail;

    if (CU == 0 && CL == 0) begin : g_cat0
      assign cfg = CFG'(swap);
    end else if (CL == 0) begin : g_cat_u
      assign cfg = {up_cfg, swap};
    end else if (CU == 0) begin : g_cat_l
      assign cfg = {lo_cfg, swap};
    end else begin : g_cat_ul
      assign cfg = {lo_cfg, up_cfg, swap};
    end
  end

endmodule

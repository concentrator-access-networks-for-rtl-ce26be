// sparse_conc: single-stage sparse crossbar (N,M) concentrator, the leaf of
// the recursive concentrator (used there for M <= 2, but correct for any
// M <= N).
//
// Output j can reach only the window of inputs j .. j+N-M, which gives the
// minimum (N-M+1)*M crosspoints of a single-stage concentrator. Any set of
// at most M active inputs fits: taking the active inputs in increasing
// order, each goes to output max(previous output + 1, i - (N-M)), which is
// always inside both the window and the output range (conc_router computes
// this). Each output is a tree of N-M 2:1 multiplexers, steered by an
// SW-bit offset into its window; offsets beyond the window select the
// window's last input. Combinational, ceil(log2(N-M+1)) multiplexers deep.
// The window layout is the known minimal sparse crossbar; the multiplexer
// trees are this implementation's choice.
//
// cfg: output j's offset sits in bits [j*SW +: SW]. When N == M there is
// nothing to configure and cfg (one bit wide) is ignored.
module sparse_conc
  import conc_pkg::*;
#(
  parameter int unsigned N = 4,
  parameter int unsigned M = 2,
  parameter int unsigned W = 1,
  localparam int unsigned SW  = leaf_sel_w(N, M),
  localparam int unsigned CFG = atleast1(M * SW)
) (
  input  logic [CFG-1:0]       cfg,
  input  logic [N-1:0][W-1:0]  din,
  output logic [M-1:0][W-1:0]  dout
);

  if (M == 0 || M > N) begin : g_bad
    $error("sparse_conc: need 0 < M <= N");
  end

  for (genvar j = 0; j < M; j++) begin : g_out
    if (SW == 0) begin : g_wire
      assign dout[j] = din[j];
    end else begin : g_mux
      // window of N-M+1 inputs, padded up to 2**SW with its last input
      logic [(1<<SW)-1:0][W-1:0] win;
      logic [SW-1:0]             sel;
      for (genvar k = 0; k < (1 << SW); k++) begin : g_win
        assign win[k] = din[j + ((k <= N - M) ? k : N - M)];
      end
      assign sel     = cfg[j*SW +: SW];
      assign dout[j] = win[sel];
    end
  end

endmodule

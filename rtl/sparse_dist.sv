// sparse_dist: single-stage sparse crossbar of the output-side network, the
// mirror image of sparse_conc. M source pins fan out to N sinks.
//
// Sink i is wired to every source pin j whose sparse_conc window
// j .. j+N-M contains i, so the crosspoints are exactly those of the
// concentrator leaf, traversed backwards. It takes the configuration of
// the concentrator leaf unchanged: sink i copies pin j when pin j's offset
// plus j equals i. A sink that no pin selects copies its first candidate
// pin; its value is then of no use to anyone. With M <= 2, as in the
// recursive network, the first and last sinks are plain wires and every
// other sink is one 2:1 multiplexer steered by a compare on pin 1's offset.
// Combinational.
module sparse_dist
  import conc_pkg::*;
#(
  parameter int unsigned N = 4,
  parameter int unsigned M = 2,
  parameter int unsigned W = 1,
  localparam int unsigned SW  = leaf_sel_w(N, M),
  localparam int unsigned CFG = atleast1(M * SW)
) (
  input  logic [CFG-1:0]       cfg,
  input  logic [M-1:0][W-1:0]  din,
  output logic [N-1:0][W-1:0]  dout
);

  if (M == 0 || M > N) begin : g_bad
    $error("sparse_dist: need 0 < M <= N");
  end

  for (genvar i = 0; i < N; i++) begin : g_sink
    // candidate pins: JLO .. JHI
    localparam int unsigned JLO = (i > N - M) ? i - (N - M) : 0;
    localparam int unsigned JHI = (i < M - 1) ? i : M - 1;
    if (SW == 0 || JLO == JHI) begin : g_wire
      assign dout[i] = din[JLO];
    end else begin : g_mux
      always_comb begin
        dout[i] = din[JLO];
        for (int unsigned j = JLO + 1; j <= JHI; j++) begin
          if (int'(cfg[j*SW +: SW]) + int'(j) == int'(i)) dout[i] = din[j];
        end
      end
    end
  end

endmodule

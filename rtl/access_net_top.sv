// access_net_top: configurable access network between the fixed cores of an
// SoC and an embedded programmable logic core.
//
// Two networks, both static once configured:
//   * input side: N_SRC potential source signals, any M_PLC of which are
//     connected to the M_PLC input pins of the programmable core by an
//     (N_SRC, M_PLC) concentrator (conc_net);
//   * output side: the M_PLC output pins of the core reach any M_PLC of
//     N_SINK potential sinks through the same construction run backwards
//     (dist_net).
// Because the programmable core can adapt to any pin assignment, neither
// side needs to honour a particular source-to-pin order; the core is told
// the resulting assignment by whoever reads back the configuration.
//
// Configuration: src_active and sink_active name the signals to connect.
// While cfg_load is high, conc_router computes each side's switch settings
// combinationally; at the rising clk edge a side whose request fits
// (at most M_PLC active) takes its new settings and its selection mask,
// and a side whose request does not fit keeps its old settings and raises
// its *_overflow flag until the next load. From the cycle after the load
// the data paths follow the new settings. Data paths are combinational
// multiplexer trees of conc_pkg::mux_depth(N, M_PLC) 2:1 multiplexers (13
// for 5000 sources): fixed latency, no clock, no flow control.
// rst_n (active low, synchronous) clears all settings to straight crossbars
// and zero leaf offsets, and clears the masks and flags.
//
// Follows the published design: the concentrator construction, its
// balancing rule and the mirrored output side. This design's own choices:
// the registers that hold the settings, the on-chip router, the overflow
// check and the default of 1024 pins (the 5000 sources are the published
// example size).
module access_net_top
  import conc_pkg::*;
#(
  parameter int unsigned N_SRC  = 5000,
  parameter int unsigned M_PLC  = 1024,
  parameter int unsigned N_SINK = 5000,
  parameter int unsigned W      = 1,
  localparam int unsigned CFG_IN  = atleast1(cfg_bits(N_SRC, M_PLC)),
  localparam int unsigned CFG_OUT = atleast1(cfg_bits(N_SINK, M_PLC))
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // configuration request
  input  logic                       cfg_load,
  input  logic [N_SRC-1:0]           src_active,
  input  logic [N_SINK-1:0]          sink_active,
  output logic                       src_overflow,
  output logic                       sink_overflow,
  output logic [N_SRC-1:0]           src_sel,
  output logic [N_SINK-1:0]          sink_sel,
  output logic [CFG_IN-1:0]          cfg_in,
  output logic [CFG_OUT-1:0]         cfg_out,
  // input side: SoC sources to programmable-core input pins
  input  logic [N_SRC-1:0][W-1:0]    src_data,
  output logic [M_PLC-1:0][W-1:0]    plc_in,
  // output side: programmable-core output pins to SoC sinks
  input  logic [M_PLC-1:0][W-1:0]    plc_out,
  output logic [N_SINK-1:0][W-1:0]   sink_data
);

  logic [CFG_IN-1:0]  cfg_in_next;
  logic [CFG_OUT-1:0] cfg_out_next;
  logic               in_fail, out_fail;

  conc_router #(.N(N_SRC), .M(M_PLC)) u_route_in (
    .active(src_active),
    .cfg   (cfg_in_next),
    .fail  (in_fail)
  );

  conc_router #(.N(N_SINK), .M(M_PLC)) u_route_out (
    .active(sink_active),
    .cfg   (cfg_out_next),
    .fail  (out_fail)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg_in        <= CFG_IN'(0);
      cfg_out       <= CFG_OUT'(0);
      src_sel       <= '0;
      sink_sel      <= '0;
      src_overflow  <= 1'b0;
      sink_overflow <= 1'b0;
    end else if (cfg_load) begin
      src_overflow  <= in_fail;
      sink_overflow <= out_fail;
      if (!in_fail) begin
        cfg_in  <= cfg_in_next;
        src_sel <= src_active;
      end
      if (!out_fail) begin
        cfg_out  <= cfg_out_next;
        sink_sel <= sink_active;
      end
    end
  end

  conc_net #(.N(N_SRC), .M(M_PLC), .W(W)) u_conc (
    .cfg (cfg_in),
    .din (src_data),
    .dout(plc_in)
  );

  dist_net #(.N(N_SINK), .M(M_PLC), .W(W)) u_dist (
    .cfg (cfg_out),
    .din (plc_out),
    .dout(sink_data)
  );

  // the router must refuse exactly the requests that do not fit
  a_in_fail_exact : assert property (@(posedge clk) disable iff (!rst_n)
    cfg_load |-> (in_fail == ($countones(src_active) > M_PLC)));
  a_out_fail_exact : assert property (@(posedge clk) disable iff (!rst_n)
    cfg_load |-> (out_fail == ($countones(sink_active) > M_PLC)));

endmodule

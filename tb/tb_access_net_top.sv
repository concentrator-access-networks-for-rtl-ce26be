// tb_access_net_top: end-to-end test of the access network at a reduced
// size (37 sources, 9 core pins, 29 sinks, 8-bit tags as data). It loads a
// long series of configuration requests and after each one checks that
//   * a request with at most 9 active signals per side is accepted the
//     cycle after cfg_load and not before, and one with more is refused
//     (overflow flag set, old settings and old routing kept);
//   * every selected source reaches some core input pin (source i drives
//     tag i+1);
//   * every selected sink receives a different core output pin (pin j
//     drives tag j+1);
//   * settings do not change while cfg_load is low.
// It counts how often each mechanism of the design occurred (crossed and
// straight first-stage crossbars, a directly wired input in use, full and
// empty requests, overflow on either side, reconfiguration, holding) and
// counts a failure for any that never did.
module tb_access_net_top;
  import conc_pkg::*;
  localparam int N = 37, M = 9, NS = 29, W = 8;
  localparam int CI = int'(atleast1(cfg_bits(N, M)));
  localparam int CO = int'(atleast1(cfg_bits(NS, M)));
  localparam int NX = int'(n_xbar(N, M));

  logic clk = 1'b0, rst_n = 1'b0, cfg_load = 1'b0;
  logic [N-1:0]  src_active;
  logic [NS-1:0] sink_active;
  logic src_overflow, sink_overflow;
  logic [N-1:0]  src_sel;
  logic [NS-1:0] sink_sel;
  logic [CI-1:0] cfg_in;
  logic [CO-1:0] cfg_out;
  logic [N-1:0][W-1:0]  src_data;
  logic [M-1:0][W-1:0]  plc_in;
  logic [M-1:0][W-1:0]  plc_out;
  logic [NS-1:0][W-1:0] sink_data;

  int checks = 0, failures = 0, cycles = 0;
  int n_swap = 0, n_straight = 0, n_direct = 0, n_full = 0, n_empty = 0;
  int n_ovf_src = 0, n_ovf_sink = 0, n_reconf = 0, n_hold = 0;

  access_net_top #(.N_SRC(N), .M_PLC(M), .N_SINK(NS), .W(W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] rand_set(int n, int k);
    logic [63:0] s;
    int placed, i;
    s = '0; placed = 0;
    while (placed < k) begin
      i = int'($urandom_range(n - 1));
      if (!s[i]) begin s[i] = 1'b1; placed++; end
    end
    return s;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cycles); end
  endtask

  // the routing the current settings give, for the sets in src_sel/sink_sel
  task automatic check_routing();
    int seen[int];
    int used[int];
    for (int j = 0; j < M; j++) begin
      int t;
      t = int'(plc_in[j]) - 1;
      if (t >= 0 && t < N && src_sel[t]) seen[t] = 1;
    end
    chk(seen.num() == $countones(src_sel), "selected sources all reach core pins");
    for (int i = 0; i < NS; i++) if (sink_sel[i]) begin
      int p;
      p = int'(sink_data[i]) - 1;
      chk(p >= 0 && p < M && !used.exists(p), "selected sink gets a pin of its own");
      used[p] = 1;
    end
  endtask

  initial begin
    logic [CI-1:0] old_in;
    logic [CO-1:0] old_out;
    logic [N-1:0]  old_sel;
    int ks, kk;
    for (int i = 0; i < N; i++) src_data[i] = W'(i + 1);
    for (int j = 0; j < M; j++) plc_out[j] = W'(j + 1);
    src_active = '0; sink_active = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    chk(cfg_in == '0 && cfg_out == '0 && !src_overflow && !sink_overflow, "reset state");

    for (int t = 0; t < 600; t++) begin
      // request sizes: mostly fitting, sometimes empty, full or too many
      case (t % 8)
        0:       begin ks = 0;                          kk = M; end
        1:       begin ks = M;                          kk = 0; end
        2:       begin ks = M + 1 + (t % 5);            kk = int'($urandom_range(M)); end
        3:       begin ks = int'($urandom_range(M));    kk = M + 1 + (t % 4); end
        default: begin ks = int'($urandom_range(M));    kk = int'($urandom_range(M)); end
      endcase
      @(negedge clk);
      src_active  = N'(rand_set(N, ks));
      sink_active = NS'(rand_set(NS, kk));
      cfg_load    = 1'b1;
      old_in = cfg_in; old_out = cfg_out; old_sel = src_sel;
      #1 chk(cfg_in == old_in && cfg_out == old_out, "settings unchanged before the clock edge");
      @(posedge clk);
      #1 cfg_load = 1'b0;
      chk(src_overflow == (ks > M), "source overflow flag");
      chk(sink_overflow == (kk > M), "sink overflow flag");
      if (ks > M) begin
        n_ovf_src++;
        chk(cfg_in == old_in && src_sel == old_sel, "refused source request keeps old settings");
      end else begin
        chk(src_sel == src_active, "accepted source set");
        if (cfg_in != old_in) n_reconf++;
        if (ks == M) n_full++;
        if (ks == 0) n_empty++;
        for (int i = 0; i < NX; i++)
          if (src_active[2*i] != src_active[2*i+1]) begin
            if (cfg_in[i]) n_swap++; else n_straight++;
          end
        if (src_active[N-1]) n_direct++;
      end
      if (kk > M) n_ovf_sink++;
      else chk(sink_sel == sink_active, "accepted sink set");
      check_routing();
      // hold: a few cycles with cfg_load low and changing requests
      old_in = cfg_in;
      src_active = ~src_active;
      repeat (2) @(posedge clk);
      #1 chk(cfg_in == old_in, "settings held while cfg_load is low");
      n_hold++;
    end

    $display("mechanisms: swap=%0d straight=%0d direct=%0d full=%0d empty=%0d ovf_src=%0d ovf_sink=%0d reconf=%0d hold=%0d",
             n_swap, n_straight, n_direct, n_full, n_empty, n_ovf_src, n_ovf_sink, n_reconf, n_hold);
    chk(n_swap > 0, "crossed crossbar seen");
    chk(n_straight > 0, "straight crossbar seen");
    chk(n_direct > 0, "direct input used");
    chk(n_full > 0, "full request seen");
    chk(n_empty > 0, "empty request seen");
    chk(n_ovf_src > 0, "source overflow seen");
    chk(n_ovf_sink > 0, "sink overflow seen");
    chk(n_reconf > 0, "reconfiguration seen");
    chk(n_hold > 0, "hold seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_access_net_full: one complete configure-and-transfer operation on the
// access network at its default size (5000 sources, 1024 core pins, 5000
// sinks, single-wire signals). Because each signal is one bit wide, the
// routing is identified bit-slice by bit-slice: in pass b every source
// drives bit b of its own index and every core output pin bit b of its
// pin number, and the value seen on each core input pin / sink over the
// passes spells out which source / pin reaches it. A final pass drives 1
// on selected sources only, marking which core pins carry a selected
// signal. Checks: a full request of 1024 sources and 1000 sinks is
// accepted in one clock; every selected source reaches a core pin; every
// selected sink gets a pin of its own; a request of 1025 is refused and
// leaves the settings untouched.
module tb_access_net_full;
  import conc_pkg::*;
  localparam int N = 5000, M = 1024, NS = 5000;
  localparam int IB = 13, PB = 10;    // index bits of a source, of a pin

  logic clk = 1'b0, rst_n = 1'b0, cfg_load = 1'b0;
  logic [N-1:0]  src_active;
  logic [NS-1:0] sink_active;
  logic src_overflow, sink_overflow;
  logic [N-1:0]  src_sel;
  logic [NS-1:0] sink_sel;
  logic [$bits(dut.cfg_in)-1:0]  cfg_in;
  logic [$bits(dut.cfg_out)-1:0] cfg_out;
  logic [N-1:0]  src_data;
  logic [M-1:0]  plc_in;
  logic [M-1:0]  plc_out;
  logic [NS-1:0] sink_data;

  int checks = 0, failures = 0;

  access_net_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [N-1:0] rand_set(int n, int k);
    logic [N-1:0] s;
    int placed, i;
    s = '0; placed = 0;
    while (placed < k) begin
      i = int'($urandom_range(n - 1));
      if (!s[i]) begin s[i] = 1'b1; placed++; end
    end
    return s;
  endfunction

  initial begin
    int src_of_pin[M];
    int pin_of_sink[NS];
    bit seen[N];
    bit used[M];
    int nseen;
    logic [$bits(dut.cfg_in)-1:0] kept;

    src_data = '0; plc_out = '0;
    src_active = '0; sink_active = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // configure both sides in one clock
    @(negedge clk);
    src_active  = rand_set(N, M);
    sink_active = NS'(rand_set(NS, 1000));
    cfg_load    = 1'b1;
    @(posedge clk);
    #1 cfg_load = 1'b0;
    chk(!src_overflow && !sink_overflow, "full request accepted");
    chk(src_sel == src_active && sink_sel == sink_active, "selection registered");

    // identify the routing bit-slice by bit-slice
    foreach (src_of_pin[j]) src_of_pin[j] = 0;
    foreach (pin_of_sink[i]) pin_of_sink[i] = 0;
    for (int b = 0; b < IB; b++) begin
      for (int i = 0; i < N; i++) src_data[i] = i[b];
      for (int j = 0; j < M; j++) plc_out[j] = (b < PB) ? j[b] : 1'b0;
      #1;
      for (int j = 0; j < M; j++) src_of_pin[j] |= int'(plc_in[j]) << b;
      for (int i = 0; i < NS; i++) pin_of_sink[i] |= int'(sink_data[i]) << b;
    end
    src_data = src_active;
    #1;
    nseen = 0;
    for (int j = 0; j < M; j++)
      if (plc_in[j] && src_of_pin[j] < N && src_active[src_of_pin[j]] && !seen[src_of_pin[j]]) begin
        seen[src_of_pin[j]] = 1'b1;
        nseen++;
      end
    chk(nseen == M, "all 1024 selected sources reach core pins");
    for (int i = 0; i < NS; i++) if (sink_active[i]) begin
      chk(!used[pin_of_sink[i]], "selected sink gets a pin of its own");
      used[pin_of_sink[i]] = 1'b1;
    end

    // one source too many: refused, settings kept
    kept = cfg_in;
    @(negedge clk);
    src_active = rand_set(N, M + 1);
    cfg_load   = 1'b1;
    @(posedge clk);
    #1 cfg_load = 1'b0;
    chk(src_overflow, "1025 sources refused");
    chk(cfg_in == kept, "settings kept after refusal");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

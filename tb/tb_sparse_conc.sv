// tb_sparse_conc: checks the sparse crossbar leaf in two sizes, (7,2) and
// (5,1). Random settings are compared with the window rule (output j shows
// input j + min(offset, N-M)); then every set of at most M active inputs
// is routed with a greedy assignment worked out here, and every active
// input must appear on some output.
module tb_sparse_conc;
  import conc_pkg::*;
  localparam int W = 4;

  localparam int NA = 7, MA = 2, SA = int'(leaf_sel_w(NA, MA)), CA = int'(atleast1(MA*SA));
  localparam int NB = 5, MB = 1, SB = int'(leaf_sel_w(NB, MB)), CB = int'(atleast1(MB*SB));

  logic [CA-1:0] cfg_a;  logic [NA-1:0][W-1:0] din_a;  logic [MA-1:0][W-1:0] dout_a;
  logic [CB-1:0] cfg_b;  logic [NB-1:0][W-1:0] din_b;  logic [MB-1:0][W-1:0] dout_b;
  int checks = 0, failures = 0;

  sparse_conc #(.N(NA), .M(MA), .W(W)) dut_a (.cfg(cfg_a), .din(din_a), .dout(dout_a));
  sparse_conc #(.N(NB), .M(MB), .W(W)) dut_b (.cfg(cfg_b), .din(din_b), .dout(dout_b));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clampi(int v, int hi);
    return (v > hi) ? hi : v;
  endfunction

  initial begin
    // input i carries tag i+1, so 0 means "nothing"
    for (int i = 0; i < NA; i++) din_a[i] = W'(i + 1);
    for (int i = 0; i < NB; i++) din_b[i] = W'(i + 1);

    // 1. random settings against the window rule
    for (int t = 0; t < 100; t++) begin
      cfg_a = CA'($urandom);
      cfg_b = CB'($urandom);
      #1;
      for (int j = 0; j < MA; j++) begin
        checks++;
        if (dout_a[j] != din_a[j + clampi(int'(cfg_a[j*SA +: SA]), NA-MA)]) begin
          failures++; $display("FAIL A window j=%0d cfg=%b", j, cfg_a);
        end
      end
      checks++;
      if (dout_b[0] != din_b[clampi(int'(cfg_b), NB-MB)]) begin
        failures++; $display("FAIL B window cfg=%b", cfg_b);
      end
    end

    // 2. every active set of size <= M reaches the outputs (A: all pairs/singles)
    for (int s = 0; s < (1 << NA); s++) begin
      if ($countones(s) <= MA) begin
        int nxt, o;
        logic [CA-1:0] c;
        c = '0; nxt = 0;
        for (int i = 0; i < NA; i++) if (s[i]) begin
          o = (i - (NA - MA) > nxt) ? i - (NA - MA) : nxt;
          c[o*SA +: SA] = SA'(i - o);
          nxt = o + 1;
        end
        cfg_a = c;
        #1;
        for (int i = 0; i < NA; i++) if (s[i]) begin
          checks++;
          if (dout_a[0] != W'(i+1) && dout_a[1] != W'(i+1)) begin
            failures++; $display("FAIL A set=%b input %0d lost", s[NA-1:0], i);
          end
        end
      end
    end
    for (int i = 0; i < NB; i++) begin
      cfg_b = CB'(i);
      #1;
      checks++;
      if (dout_b[0] != W'(i+1)) begin failures++; $display("FAIL B input %0d", i); end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

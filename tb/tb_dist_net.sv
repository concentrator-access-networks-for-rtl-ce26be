// tb_dist_net: the output-side network. For a set of at most M active
// sinks, conc_router computes the settings; dist_net then fans the M pins
// (pin j carries tag j+1) out to the sinks. Every active sink must receive
// a different pin, and it must be the pin that a conc_net with the same
// settings would route that sink's index to. Sizes (8,4) over all sets,
// (23,7) and (40,12) over random sets.
module tb_dist_net;
  import conc_pkg::*;
  localparam int W = 8;

  int checks = 0, failures = 0;

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `define TRIO(ID, NN, MM) \
    localparam int N``ID = NN, M``ID = MM, C``ID = int'(atleast1(cfg_bits(NN, MM))); \
    logic [N``ID-1:0] act``ID; logic [C``ID-1:0] cfg``ID; logic fail``ID; \
    logic [N``ID-1:0][W-1:0] cin``ID; logic [M``ID-1:0][W-1:0] cout``ID; \
    logic [M``ID-1:0][W-1:0] pin``ID; logic [N``ID-1:0][W-1:0] sink``ID; \
    conc_router #(.N(NN), .M(MM)) r``ID (.active(act``ID), .cfg(cfg``ID), .fail(fail``ID)); \
    conc_net #(.N(NN), .M(MM), .W(W)) c``ID (.cfg(cfg``ID), .din(cin``ID), .dout(cout``ID)); \
    dist_net #(.N(NN), .M(MM), .W(W)) dut``ID (.cfg(cfg``ID), .din(pin``ID), .dout(sink``ID));

  `TRIO(0, 8, 4)
  `TRIO(1, 23, 7)
  `TRIO(2, 40, 12)

  task automatic check_sinks(string tag, int n, int m, logic [63:0] act,
                             logic [63:0][W-1:0] sinks, logic [63:0][W-1:0] couts);
    int used[int];
    if ($countones(act) > m) return;
    for (int i = 0; i < n; i++) if (act[i]) begin
      int p;
      p = int'(sinks[i]) - 1;
      checks++;
      if (p < 0 || p >= m || used.exists(p)) begin
        failures++; $display("FAIL %s sink %0d got pin %0d (bad or shared)", tag, i, p);
      end else begin
        used[p] = 1;
        checks++;
        if (int'(couts[p]) != i + 1) begin
          failures++; $display("FAIL %s sink %0d gets pin %0d but input %0d goes there", tag, i, p, int'(couts[p]) - 1);
        end
      end
    end
  endtask

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

  initial begin
    for (int i = 0; i < N0; i++) cin0[i] = W'(i + 1);
    for (int i = 0; i < N1; i++) cin1[i] = W'(i + 1);
    for (int i = 0; i < N2; i++) cin2[i] = W'(i + 1);
    for (int j = 0; j < M0; j++) pin0[j] = W'(j + 1);
    for (int j = 0; j < M1; j++) pin1[j] = W'(j + 1);
    for (int j = 0; j < M2; j++) pin2[j] = W'(j + 1);
    for (int s = 0; s < 256; s++) begin
      act0 = N0'(s);
      #1;
      check_sinks("(8,4)", N0, M0, 64'(act0), 512'(sink0), 512'(cout0));
    end
    for (int t = 0; t < 400; t++) begin
      act1 = N1'(rand_set(N1, t % (M1 + 1)));
      act2 = N2'(rand_set(N2, t % (M2 + 1)));
      #1;
      check_sinks("(23,7)", N1, M1, 64'(act1), 512'(sink1), 512'(cout1));
      check_sinks("(40,12)", N2, M2, 64'(act2), 512'(sink2), 512'(cout2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

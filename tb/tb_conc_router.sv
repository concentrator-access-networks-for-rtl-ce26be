// tb_conc_router: the router drives a conc_net of the same size, and every
// active input must then appear on an output. Sizes: (8,4) over
// all 256 input sets, and (23,7), (20,7), (40,12) over random sets of every
// size from 0 to N. The fail flag must be raised exactly when more than M
// inputs are active.
module tb_conc_router;
  import conc_pkg::*;
  localparam int W = 8;

  int checks = 0, failures = 0;

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one router + network pair per size
  `define PAIR(ID, NN, MM) \
    localparam int N``ID = NN, M``ID = MM, C``ID = int'(atleast1(cfg_bits(NN, MM))); \
    logic [N``ID-1:0] act``ID; logic [C``ID-1:0] cfg``ID; logic fail``ID; \
    logic [N``ID-1:0][W-1:0] din``ID; logic [M``ID-1:0][W-1:0] dout``ID; \
    conc_router #(.N(NN), .M(MM)) r``ID (.active(act``ID), .cfg(cfg``ID), .fail(fail``ID)); \
    conc_net #(.N(NN), .M(MM), .W(W)) n``ID (.cfg(cfg``ID), .din(din``ID), .dout(dout``ID));

  `PAIR(0, 8, 4)
  `PAIR(1, 23, 7)
  `PAIR(2, 20, 7)
  `PAIR(3, 40, 12)

  // every active input on some output (an output carries one signal, so
  // k distinct active inputs seen means k distinct outputs serve them; an
  // output nobody needs may repeat a signal, which does no harm)
  task automatic check_set(string tag, int n, int m, logic [63:0] act, logic fail,
                           logic [63:0][W-1:0] dout);
    int seen[int];
    int k;
    k = $countones(act);
    checks++;
    if (fail != (k > m)) begin
      failures++; $display("FAIL %s fail=%0b with %0d active", tag, fail, k);
    end
    if (k <= m) begin
      for (int j = 0; j < m; j++) begin
        int tg;
        tg = int'(dout[j]) - 1;
        if (tg >= 0 && tg < n && act[tg]) seen[tg] = 1;
      end
      checks++;
      if (seen.num() != k) begin
        failures++; $display("FAIL %s %0d of %0d active inputs reach outputs", tag, seen.num(), k);
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
    for (int i = 0; i < N0; i++) din0[i] = W'(i + 1);
    for (int i = 0; i < N1; i++) din1[i] = W'(i + 1);
    for (int i = 0; i < N2; i++) din2[i] = W'(i + 1);
    for (int i = 0; i < N3; i++) din3[i] = W'(i + 1);
    for (int s = 0; s < 256; s++) begin
      act0 = N0'(s);
      #1;
      check_set("(8,4)", N0, M0, 64'(act0), fail0, 512'(dout0));
    end
    for (int t = 0; t < 400; t++) begin
      act1 = N1'(rand_set(N1, t % (N1 + 1)));
      act2 = N2'(rand_set(N2, t % (N2 + 1)));
      act3 = N3'(rand_set(N3, t % (N3 + 1)));
      #1;
      check_set("(23,7)", N1, M1, 64'(act1), fail1, 512'(dout1));
      check_set("(20,7)", N2, M2, 64'(act2), fail2, 512'(dout2));
      check_set("(40,12)", N3, M3, 64'(act3), fail3, 512'(dout3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

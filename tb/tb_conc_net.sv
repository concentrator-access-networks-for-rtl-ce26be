// tb_conc_net: checks the recursive concentrator's wiring against the
// reference model in conc_model_pkg. Three sizes cover the three ways a
// level splits: (23,7) with odd N, (20,7) with even N and odd M, (40,12)
// with even N and M. Each input carries its own tag; random configurations
// are applied and every output must carry the tag the model predicts. It
// also checks the multiplexer depth of the full-size network: 13 levels of
// 2:1 multiplexers for 5000 inputs, as the published depth plot shows for
// output counts up to 1024.
module tb_conc_net;
  import conc_pkg::*;
  import conc_model_pkg::*;
  localparam int W = 8;

  localparam int N0 = 23, M0 = 7,  C0 = int'(atleast1(cfg_bits(N0, M0)));
  localparam int N1 = 20, M1 = 7,  C1 = int'(atleast1(cfg_bits(N1, M1)));
  localparam int N2 = 40, M2 = 12, C2 = int'(atleast1(cfg_bits(N2, M2)));

  logic [C0-1:0] cfg0; logic [N0-1:0][W-1:0] din0; logic [M0-1:0][W-1:0] dout0;
  logic [C1-1:0] cfg1; logic [N1-1:0][W-1:0] din1; logic [M1-1:0][W-1:0] dout1;
  logic [C2-1:0] cfg2; logic [N2-1:0][W-1:0] din2; logic [M2-1:0][W-1:0] dout2;
  int checks = 0, failures = 0;

  conc_net #(.N(N0), .M(M0), .W(W)) dut0 (.cfg(cfg0), .din(din0), .dout(dout0));
  conc_net #(.N(N1), .M(M1), .W(W)) dut1 (.cfg(cfg1), .din(din1), .dout(dout1));
  conc_net #(.N(N2), .M(M2), .W(W)) dut2 (.cfg(cfg2), .din(din2), .dout(dout2));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit c[];
    int tin[], tout[];
    for (int i = 0; i < N0; i++) din0[i] = W'(i + 1);
    for (int i = 0; i < N1; i++) din1[i] = W'(i + 1);
    for (int i = 0; i < N2; i++) din2[i] = W'(i + 1);
    for (int t = 0; t < 300; t++) begin
      for (int k = 0; k < C0; k++) cfg0[k] = 1'($urandom);
      for (int k = 0; k < C1; k++) cfg1[k] = 1'($urandom);
      for (int k = 0; k < C2; k++) cfg2[k] = 1'($urandom);
      #1;
      c = new[C0]; foreach (c[k]) c[k] = cfg0[k];
      tin = new[N0]; foreach (tin[i]) tin[i] = i + 1;
      conc_model(N0, M0, c, tin, tout);
      for (int j = 0; j < M0; j++) begin
        checks++;
        if (int'(dout0[j]) != tout[j]) begin failures++; $display("FAIL (23,7) out %0d: %0d vs %0d", j, dout0[j], tout[j]); end
      end
      c = new[C1]; foreach (c[k]) c[k] = cfg1[k];
      tin = new[N1]; foreach (tin[i]) tin[i] = i + 1;
      conc_model(N1, M1, c, tin, tout);
      for (int j = 0; j < M1; j++) begin
        checks++;
        if (int'(dout1[j]) != tout[j]) begin failures++; $display("FAIL (20,7) out %0d: %0d vs %0d", j, dout1[j], tout[j]); end
      end
      c = new[C2]; foreach (c[k]) c[k] = cfg2[k];
      tin = new[N2]; foreach (tin[i]) tin[i] = i + 1;
      conc_model(N2, M2, c, tin, tout);
      for (int j = 0; j < M2; j++) begin
        checks++;
        if (int'(dout2[j]) != tout[j]) begin failures++; $display("FAIL (40,12) out %0d: %0d vs %0d", j, dout2[j], tout[j]); end
      end
    end
    // depth of the full-size network (5000 inputs)
    begin
      automatic int ms[5] = '{1, 2, 64, 512, 1024};
      foreach (ms[k]) begin
        checks++;
        if (mux_depth(5000, ms[k]) != 13) begin
          failures++; $display("FAIL depth(5000,%0d)=%0d", ms[k], mux_depth(5000, ms[k]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

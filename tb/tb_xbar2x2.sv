// tb_xbar2x2: exhaustive check of the 2x2 crossbar over both settings and
// random 8-bit data: straight passes a->y0, b->y1, crossed swaps them.
module tb_xbar2x2;
  localparam int W = 8;
  logic         swap;
  logic [W-1:0] a, b, y0, y1;
  int checks = 0, failures = 0;

  xbar2x2 #(.W(W)) dut (.swap(swap), .a(a), .b(b), .y0(y0), .y1(y1));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      swap = t[0];
      a    = W'($urandom);
      b    = W'($urandom);
      #1;
      checks++;
      if (y0 !== (swap ? b : a) || y1 !== (swap ? a : b)) begin
        failures++;
        $display("FAIL swap=%0b a=%h b=%h y0=%h y1=%h", swap, a, b, y0, y1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

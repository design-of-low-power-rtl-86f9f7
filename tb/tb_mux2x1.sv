// tb_mux2x1: exhaustive self-checking test of the 2:1 multiplexer.
//
// Applies all eight combinations of i0, i1 and sel and checks that y equals
// i1 when sel is 1 and i0 otherwise. A watchdog ends the run with a failure if
// it does not finish in time.
module tb_mux2x1;

  logic clk;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  logic i0, i1, sel, y;
  int   checks = 0, failures = 0;

  mux2x1 dut (.i0(i0), .i1(i1), .sel(sel), .y(y));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {sel, i1, i0} = v[2:0];
      @(posedge clk);
      checks++;
      if (y !== (v[2] ? v[1] : v[0])) begin
        failures++;
        $display("FAIL sel=%b i1=%b i0=%b: y=%b", v[2], v[1], v[0], y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_feynman_gate: exhaustive self-checking test of the reversible Feynman gate.
//
// Applies all four input vectors and checks p = a and q = a ^ b. It then feeds
// the outputs of one gate into a second gate and checks that the pair returns
// the original inputs (the gate is its own inverse). A watchdog ends the run
// with a failure if it does not finish in time.
module tb_feynman_gate;

  logic clk;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  logic a, b, p, q, p2, q2;
  int   checks = 0, failures = 0;

  feynman_gate dut  (.a(a),  .b(b),  .p(p),  .q(q));
  feynman_gate back (.a(p),  .b(q),  .p(p2), .q(q2));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = v[1:0];
      @(posedge clk);
      checks++;
      if (p !== v[1] || q !== (v[1] != v[0])) begin
        failures++;
        $display("FAIL ab=%02b: pq=%b%b", v[1:0], p, q);
      end
      checks++;
      if ({p2, q2} !== v[1:0]) begin
        failures++;
        $display("FAIL ab=%02b: inverse gave %b%b", v[1:0], p2, q2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

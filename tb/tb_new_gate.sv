// tb_new_gate: exhaustive self-checking test of the reversible New Gate.
//
// Applies all eight input vectors, one per clock of a testbench clock, and
// compares p, q and r with the gate equations p = a, q = ab ^ c and
// r = a'c' ^ b' evaluated here from the inputs. It also checks reversibility:
// every input vector must give a different output vector. A watchdog ends the
// run with a failure if it does not finish in time.
module tb_new_gate;

  logic clk;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  logic a, b, c, p, q, r;
  int   checks = 0, failures = 0;
  bit   seen [8];

  new_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ep, eq, er;
    for (int v = 0; v < 8; v++) seen[v] = 1'b0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = v[2:0];
      @(posedge clk);
      ep = v[2];
      eq = (v[2] && v[1]) != v[0];
      er = (!v[2] && !v[0]) != !v[1];
      checks++;
      if ({p, q, r} !== {ep, eq, er}) begin
        failures++;
        $display("FAIL abc=%03b: pqr=%b%b%b expected %b%b%b", v[2:0], p, q, r, ep, eq, er);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL abc=%03b: output %b%b%b already produced, gate not reversible",
                 v[2:0], p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

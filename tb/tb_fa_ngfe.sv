// tb_fa_ngfe: exhaustive self-checking test of the NGFE reversible full adder.
//
// Applies all eight combinations of a, b and carry-in c. Checks the sum r and
// carry u against the arithmetic a + b + c, and the garbage outputs against
// their expected functions (p = a, q = c, s = a ^ b, t = c & (a ^ b)).
// Also checks that the full set of outputs differs for every input vector, so
// no information is lost. A watchdog ends the run with a failure if it does not
// finish in time.
module tb_fa_ngfe;

  logic clk;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  logic a, b, c, p, q, r, s, t, u;
  int   checks = 0, failures = 0;
  bit   seen [64];

  fa_ngfe dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r), .s(s), .t(t), .u(u));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    logic [5:0] outv;
    for (int v = 0; v < 64; v++) seen[v] = 1'b0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = v[2:0];
      @(posedge clk);
      total = int'(v[2]) + int'(v[1]) + int'(v[0]);
      checks++;
      if (r !== total[0] || u !== total[1]) begin
        failures++;
        $display("FAIL abc=%03b: sum=%b carry=%b expected %0d", v[2:0], r, u, total);
      end
      checks++;
      if (p !== v[2] || q !== v[0] || s !== (v[2] != v[1]) ||
          t !== (v[0] && (v[2] != v[1]))) begin
        failures++;
        $display("FAIL abc=%03b: garbage pqst=%b%b%b%b", v[2:0], p, q, s, t);
      end
      outv = {p, q, r, s, t, u};
      checks++;
      if (seen[outv]) begin
        failures++;
        $display("FAIL abc=%03b: output vector %b repeated", v[2:0], outv);
      end
      seen[outv] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_csa_ngfe: end-to-end self-checking test of the carry select adder, the top
// of the design, at its default parameters (WIDTH = 4).
//
// Every combination of a, b and cin (512 vectors) is applied. For each one the
// test checks:
//   - {cout, sum} against the integer sum a + b + cin,
//   - garbage0 and garbage1 against the garbage outputs expected from ripple
//     adders with carry-in 0 and 1 (so both precomputed adders are exercised),
//   - that the outputs are valid 1 time unit after the inputs change: the adder
//     is combinational and takes no clock cycles.
// Each operand pair is applied with cin = 0 and then cin = 1, without changing
// a or b, so the multiplexer selection is seen switching between the two
// precomputed results.
//
// Mechanisms counted, each of which must occur at least once:
//   sel0       result taken from the carry-in-0 adder (cin = 0)
//   sel1       result taken from the carry-in-1 adder (cin = 1)
//   cout_sel   carry-out differs between the two adders, so cin decides it
//   ripple     carry-in propagates through all four stages (a ^ b all ones)
//   cout       a carry-out of 1 is produced
// A watchdog ends the run with a failure if it does not finish in time.
module tb_csa_ngfe;

  import ngfe_pkg::*;

  localparam int unsigned W = ADDER_WIDTH;

  logic clk;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  logic [W-1:0]            a, b, sum;
  logic                    cin, cout;
  logic [W*FA_GARBAGE-1:0] garbage0, garbage1;

  int checks = 0, failures = 0;
  int n_sel0 = 0, n_sel1 = 0, n_cout_sel = 0, n_ripple = 0, n_cout = 0;

  csa_ngfe dut (
    .a(a), .b(b), .cin(cin),
    .sum(sum), .cout(cout), .garbage0(garbage0), .garbage1(garbage1)
  );

  // Garbage outputs {t, s, q, p} per stage of a ripple adder with carry-in ci.
  function automatic logic [W*FA_GARBAGE-1:0] exp_garbage(
      input logic [W-1:0] x, input logic [W-1:0] y, input logic ci);
    logic [W*FA_GARBAGE-1:0] g = '0;
    logic c = ci;
    for (int i = 0; i < W; i++) begin
      g[i*FA_GARBAGE +: FA_GARBAGE] = {c & (x[i] ^ y[i]), x[i] ^ y[i], c, x[i]};
      c = (x[i] & y[i]) | (c & (x[i] ^ y[i]));
    end
    return g;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0] exp, exp0, exp1;
    for (int v = 0; v < (1 << (2 * W)); v++) begin
      a = v[2*W-1:W];
      b = v[W-1:0];
      exp0 = {1'b0, a} + {1'b0, b};
      exp1 = exp0 + 1'b1;
      for (int ci = 0; ci < 2; ci++) begin
        cin = ci[0];
        #1;
        exp = cin ? exp1 : exp0;
        checks++;
        if ({cout, sum} !== exp) begin
          failures++;
          $display("FAIL %h+%h+%b: got %b_%h expected %h", a, b, cin, cout, sum, exp);
        end
        checks++;
        if (garbage0 !== exp_garbage(a, b, 1'b0) || garbage1 !== exp_garbage(a, b, 1'b1)) begin
          failures++;
          $display("FAIL %h+%h: garbage0 %h garbage1 %h", a, b, garbage0, garbage1);
        end
        if (cin) n_sel1++; else n_sel0++;
        if (cout) n_cout++;
        if (cin && exp0[W] != exp1[W]) n_cout_sel++;
        if (cin && (a ^ b) == {W{1'b1}}) n_ripple++;
        @(posedge clk);
      end
    end
    $display("mechanisms: sel0=%0d sel1=%0d cout_sel=%0d ripple=%0d cout=%0d",
             n_sel0, n_sel1, n_cout_sel, n_ripple, n_cout);
    checks++;
    if (n_sel0 == 0 || n_sel1 == 0 || n_cout_sel == 0 || n_ripple == 0 || n_cout == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_rca_ngfe: self-checking test of the NGFE ripple carry adder.
//
// The default 4-bit adder is checked exhaustively over all 512 combinations of
// a, b and cin against the integer sum a + b + cin. A second, 8-bit instance
// checks that the WIDTH parameter scales the carry chain, with 2000 random
// vectors plus the all-ones case where a carry ripples through every stage.
// Garbage outputs of every stage are checked against p = a[i], q = c[i],
// s = a[i] ^ b[i], t = c[i] & (a[i] ^ b[i]), with c[i] the carry into stage i
// computed here from the operands. A watchdog ends the run with a failure if
// it does not finish in time.
module tb_rca_ngfe;

  import ngfe_pkg::*;

  localparam int unsigned W4 = 4;
  localparam int unsigned W8 = 8;

  logic clk;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  logic [W4-1:0]            a4, b4, s4;
  logic                     ci4, co4;
  logic [W4*FA_GARBAGE-1:0] g4;
  logic [W8-1:0]            a8, b8, s8;
  logic                     ci8, co8;
  logic [W8*FA_GARBAGE-1:0] g8;

  int checks = 0, failures = 0;

  rca_ngfe dut4 (.a(a4), .b(b4), .cin(ci4), .sum(s4), .cout(co4), .garbage(g4));
  rca_ngfe #(.WIDTH(W8)) dut8 (.a(a8), .b(b8), .cin(ci8), .sum(s8), .cout(co8), .garbage(g8));

  // Expected garbage outputs of an adder for the given operands and carry-in.
  function automatic logic [W8*FA_GARBAGE-1:0] exp_garbage(
      input logic [W8-1:0] a, input logic [W8-1:0] b, input logic cin, input int width);
    logic [W8*FA_GARBAGE-1:0] g = '0;
    logic c = cin;
    for (int i = 0; i < width; i++) begin
      g[i*FA_GARBAGE +: FA_GARBAGE] = {c & (a[i] ^ b[i]), a[i] ^ b[i], c, a[i]};
      c = (a[i] & b[i]) | (c & (a[i] ^ b[i]));
    end
    return g;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check8(input logic [W8-1:0] a, input logic [W8-1:0] b, input logic ci);
    logic [W8:0] exp;
    logic [W8*FA_GARBAGE-1:0] eg;
    a8 = a; b8 = b; ci8 = ci;
    @(posedge clk);
    exp = {1'b0, a} + {1'b0, b} + {{W8{1'b0}}, ci};
    eg  = exp_garbage(a, b, ci, W8);
    checks++;
    if ({co8, s8} !== exp || g8 !== eg) begin
      failures++;
      $display("FAIL 8-bit %h+%h+%b: got %b_%h garbage %h, expected %h garbage %h",
               a, b, ci, co8, s8, g8, exp, eg);
    end
  endtask

  initial begin
    logic [W4:0] exp;
    logic [W8*FA_GARBAGE-1:0] eg;
    a8 = '0; b8 = '0; ci8 = 1'b0;
    for (int v = 0; v < 512; v++) begin
      {ci4, a4, b4} = v[8:0];
      @(posedge clk);
      exp = {1'b0, a4} + {1'b0, b4} + {{W4{1'b0}}, ci4};
      eg  = exp_garbage({4'b0, a4}, {4'b0, b4}, ci4, W4);
      checks++;
      if ({co4, s4} !== exp) begin
        failures++;
        $display("FAIL 4-bit %h+%h+%b: got %b_%h expected %h", a4, b4, ci4, co4, s4, exp);
      end
      checks++;
      if (g4 !== eg[W4*FA_GARBAGE-1:0]) begin
        failures++;
        $display("FAIL 4-bit %h+%h+%b: garbage %h expected %h",
                 a4, b4, ci4, g4, eg[W4*FA_GARBAGE-1:0]);
      end
    end
    check8(8'hff, 8'h00, 1'b1);
    check8(8'hff, 8'hff, 1'b1);
    for (int n = 0; n < 2000; n++)
      check8(W8'($urandom), W8'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_rca8 -- exhaustive self-checking testbench for the 8-bit ripple carry adder rca8.
//
// Applies every combination of the two 8-bit addends and the carry in (131072
// cases), one per clock cycle, and compares {cout, sum} with the integer sum
// a + b + cin. Counts the cases that produce a carry out and the case where a
// carry runs the full width (all propagate, carry in set), and fails if either
// never occurs. The adder is combinational and is checked in the same cycle.
module tb_rca8;

  localparam int W = 8;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  logic         clk;
  int           checks = 0, failures = 0, couts = 0, full_ripples = 0;

  rca8 #(.WIDTH(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    repeat (140000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; cin = 1'b0;
    for (int c = 0; c < 2; c++) begin
      for (int i = 0; i < (1 << W); i++) begin
        for (int j = 0; j < (1 << W); j++) begin
          @(negedge clk);
          a = W'(i); b = W'(j); cin = 1'(c);
          #1;
          checks++;
          if ({cout, sum} !== (W+1)'(i + j + c)) begin
            failures++;
            if (failures < 10)
              $display("FAIL %0d + %0d + %0d: got cout=%0d sum=%0d", i, j, c, cout, sum);
          end
          if (i + j + c >= (1 << W)) couts++;
          if ((i ^ j) == (1 << W) - 1 && c == 1) full_ripples++;
        end
      end
    end
    if (couts == 0)        begin failures++; $display("FAIL: no carry out exercised"); end
    if (full_ripples == 0) begin failures++; $display("FAIL: no full-width carry exercised"); end
    $display("carry outs: %0d, full-width carries: %0d", couts, full_ripples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

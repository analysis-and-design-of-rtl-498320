// tb_vedic_mul4 -- exhaustive self-checking testbench for vedic_mul4.
//
// Applies all 256 operand pairs, one per clock cycle, and compares the product
// with the integer product a * b. It also counts how often a column count
// reaches 4 or more, i.e. a carry is forwarded past the neighbouring column,
// using its own column model, and fails if that never happens. The multiplier is
// combinational: the result is checked in the same cycle the operands are set.
module tb_vedic_mul4;

  logic [3:0] a, b;
  logic [7:0] p;
  logic       clk;
  int         checks = 0, failures = 0, cycles = 0, skips = 0;

  vedic_mul4 dut (.a(a), .b(b), .p(p));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end
  always_ff @(posedge clk) cycles <= cycles + 1;

  // Watchdog
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference column counts: does any column of a*b see a count >= 4?
  function automatic bit forwards_two(input logic [3:0] x, input logic [3:0] y);
    int c1 [8];
    int c2 [8];
    int s;
    bit any = 0;
    for (int k = 0; k < 8; k++) begin c1[k] = 0; c2[k] = 0; end
    for (int k = 0; k < 7; k++) begin
      s = 0;
      for (int i = 0; i < 4; i++)
        if (k - i >= 0 && k - i < 4) s += int'(x[i]) * int'(y[k-i]);
      if (k >= 1) s += c1[k-1];
      if (k >= 2) s += c2[k-2];
      c1[k] = (s >> 1) & 1;
      c2[k] = (s >> 2) & 1;
      if (s >= 4) any = 1;
    end
    return any;
  endfunction

  initial begin
    a = '0; b = '0;
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        @(negedge clk);
        a = 4'(i); b = 4'(j);
        #1;
        checks++;
        if (p !== 8'(i * j)) begin
          failures++;
          $display("FAIL %0d * %0d: got %0d", i, j, p);
        end
        if (forwards_two(a, b)) skips++;
      end
    end
    if (skips == 0) begin
      failures++;
      $display("FAIL: no operand pair forwarded a carry two columns");
    end
    $display("two-column carry forwards exercised: %0d, cycles: %0d", skips, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

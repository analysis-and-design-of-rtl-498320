// tb_vedic_mul8 -- exhaustive end-to-end testbench for the 8x8 Vedic multiplier.
//
// Runs the top level at its only configuration through all 65536 operand pairs,
// one per clock cycle, and compares the 16-bit product with the integer product
// a * b. Alongside, an independent model of the nibble decomposition counts how
// often each carry path of the design is used and fails if any never is:
//   - the carry lookahead adder overflows (M2 + M3 >= 256),
//   - Adder 2 overflows (low byte of M2 + M3 plus M1[7:4] >= 256),
//   - a 4x4 multiplier forwards a carry two columns (column count >= 4),
//   - the product uses its top bit (p >= 32768).
// The multiplier is combinational and is checked in the cycle its operands are
// set. A directed set of corner values (0, 1, 255, powers of two) runs first.
module tb_vedic_mul8;

  logic [7:0]  a, b;
  logic [15:0] p;
  logic        clk;
  int          checks = 0, failures = 0;
  int          n_cla_carry = 0, n_add2_carry = 0, n_col_forward = 0, n_top_bit = 0;

  vedic_mul8 dut (.a(a), .b(b), .p(p));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Does the Urdhva column scheme of x*y (4 bits each) see a column count >= 4?
  function automatic bit forwards_two(input int x, input int y);
    int c1 [8];
    int c2 [8];
    int s;
    bit any = 0;
    for (int k = 0; k < 8; k++) begin c1[k] = 0; c2[k] = 0; end
    for (int k = 0; k < 7; k++) begin
      s = 0;
      for (int i = 0; i < 4; i++)
        if (k - i >= 0 && k - i < 4) s += ((x >> i) & (y >> (k - i)) & 1);
      if (k >= 1) s += c1[k-1];
      if (k >= 2) s += c2[k-2];
      c1[k] = (s >> 1) & 1;
      c2[k] = (s >> 2) & 1;
      if (s >= 4) any = 1;
    end
    return any;
  endfunction

  task automatic apply(input int x, input int y);
    int al, ah, bl, bh, m1, m2, m3, mid;
    @(negedge clk);
    a = 8'(x); b = 8'(y);
    #1;
    checks++;
    if (p !== 16'(x * y)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d: got %0d", x, y, p);
    end
    al = x & 15; ah = x >> 4; bl = y & 15; bh = y >> 4;
    m1 = al * bl; m2 = al * bh; m3 = ah * bl;
    mid = m2 + m3;
    if (mid >= 256) n_cla_carry++;
    if ((mid & 255) + (m1 >> 4) >= 256) n_add2_carry++;
    if (forwards_two(al, bl) || forwards_two(al, bh) ||
        forwards_two(ah, bl) || forwards_two(ah, bh)) n_col_forward++;
    if (x * y >= 32768) n_top_bit++;
  endtask

  initial begin
    automatic int corner [12] = '{0, 1, 2, 15, 16, 127, 128, 170, 85, 240, 254, 255};
    a = '0; b = '0;
    foreach (corner[i]) foreach (corner[j]) apply(corner[i], corner[j]);
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        apply(i, j);
    if (n_cla_carry == 0)   begin failures++; $display("FAIL: carry lookahead adder never overflowed"); end
    if (n_add2_carry == 0)  begin failures++; $display("FAIL: Adder 2 never overflowed"); end
    if (n_col_forward == 0) begin failures++; $display("FAIL: no two-column carry forward"); end
    if (n_top_bit == 0)     begin failures++; $display("FAIL: product top bit never set"); end
    $display("CLA carries %0d, Adder 2 carries %0d, two-column forwards %0d, top-bit products %0d",
             n_cla_carry, n_add2_carry, n_col_forward, n_top_bit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_carry_skip_adder: self-checking test of carry_skip_adder.
//
// Checks sum and carry-out against a + b + cin computed with plain integer
// arithmetic, for the 16-bit / 4-bit-group default adder and for a 32-bit /
// 8-bit-group instance. Besides random operands it builds operands in which
// one or more groups propagate fully (a ^ b all ones in the group) with a
// carry arriving from below, so that the skip path is the one that sets the
// carry; it counts how often that happened and fails if it never did.
module tb_carry_skip_adder;
  int checks = 0, failures = 0, skips = 0;

  logic [15:0] a16, b16, s16;
  logic        c16_in, c16_out;
  logic [31:0] a32, b32, s32;
  logic        c32_in, c32_out;

  carry_skip_adder dut16 (.a(a16), .b(b16), .cin(c16_in), .sum(s16), .cout(c16_out));
  carry_skip_adder #(.WIDTH(32), .BLOCK(8)) dut32 (.a(a32), .b(b32), .cin(c32_in), .sum(s32), .cout(c32_out));

  // Watchdog: this test has no clock; bound it in time.
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count middle groups (1 and 2 of 16-bit adder) whose carry-out is set by
  // the skip path: group fully propagates and the carry into it is 1.
  function automatic int skip_events16(logic [15:0] a, logic [15:0] b, logic ci);
    logic [16:0] full;
    int n = 0;
    full = {1'b0, a} + {1'b0, b} + 17'(ci);
    for (int k = 1; k <= 2; k++) begin
      logic [3:0] p;
      logic       cin_k;
      p     = a[k*4 +: 4] ^ b[k*4 +: 4];
      cin_k = full[k*4] ^ p[0];  // sum bit = propagate ^ carry-in
      if (&p && cin_k) n++;
    end
    return n;
  endfunction

  task automatic check16(logic [15:0] a, logic [15:0] b, logic ci);
    logic [16:0] exp;
    a16 = a; b16 = b; c16_in = ci;
    #1;
    exp = {1'b0, a} + {1'b0, b} + 17'(ci);
    checks++;
    if ({c16_out, s16} !== exp) begin
      failures++;
      $display("FAIL 16: %h + %h + %b = %b_%h, expected %h", a, b, ci, c16_out, s16, exp);
    end
    skips += skip_events16(a, b, ci);
  endtask

  task automatic check32(logic [31:0] a, logic [31:0] b, logic ci);
    logic [32:0] exp;
    a32 = a; b32 = b; c32_in = ci;
    #1;
    exp = {1'b0, a} + {1'b0, b} + 33'(ci);
    checks++;
    if ({c32_out, s32} !== exp) begin
      failures++;
      $display("FAIL 32: %h + %h + %b = %b_%h, expected %h", a, b, ci, c32_out, s32, exp);
    end
  endtask

  initial begin
    // Directed: the long carry chain through every group.
    check16(16'hFFFF, 16'h0001, 1'b0);
    check16(16'hFFFF, 16'h0000, 1'b1);
    check16(16'h0FFF, 16'h0001, 1'b0);
    check16(16'h00F0, 16'h0F0F, 1'b1);
    check16(16'h0FF0, 16'h000F, 1'b1);
    check16(16'h0000, 16'h0000, 1'b0);
    check16(16'h8000, 16'h8000, 1'b0);
    check32(32'hFFFF_FFFF, 32'h0000_0001, 1'b0);
    check32(32'h00FF_FF00, 32'h0000_00FF, 1'b1);
    // Skip-oriented: middle groups propagate, lowest group generates a carry.
    for (int n = 0; n < 2000; n++) begin
      logic [15:0] a, b;
      logic [15:0] pmask;
      a = 16'($urandom);
      pmask = 16'h0FF0;
      b = (~a & pmask) | (16'($urandom) & ~pmask);
      check16(a, b, 1'($urandom));
    end
    // Random.
    for (int n = 0; n < 20000; n++) begin
      check16(16'($urandom), 16'($urandom), 1'($urandom));
      check32($urandom, $urandom, 1'($urandom));
    end
    // Exhaustive over an 8-bit window crossing the group 0 / group 1 / group 2
    // boundaries, with the other bits random.
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y += 7) begin
        logic [15:0] r;
        r = 16'($urandom);
        check16((r & 16'hF00F) | 16'(x << 4), (~r & 16'hF00F) | 16'(y << 4), 1'($urandom));
      end
    end
    $display("skip events (middle group propagates with carry-in 1): %0d", skips);
    checks++;
    if (skips == 0) begin
      failures++;
      $display("FAIL: skip path never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

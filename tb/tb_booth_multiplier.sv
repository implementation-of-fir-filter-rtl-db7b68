// tb_booth_multiplier: self-checking test of booth_multiplier.
//
// The 8 x 8 default multiplier is checked exhaustively (all 65536 signed
// operand pairs) against the simulator's own signed multiplication. A 4 x 4
// instance reproduces the textbook worked example 3 x (-4) = -12 and is also
// checked exhaustively. The test counts which Booth recoding actions
// (add m, subtract m, no operation) the multiplier bits called for and fails
// if any of them never occurred.
module tb_booth_multiplier;
  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_nop = 0;

  logic signed [7:0]  m8, r8;
  logic signed [15:0] p8;
  logic signed [3:0]  m4, r4;
  logic signed [7:0]  p4;

  booth_multiplier dut8 (.m(m8), .r(r8), .product(p8));
  booth_multiplier #(.XW(4), .YW(4)) dut4 (.m(m4), .r(r4), .product(p4));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count Booth actions from the multiplier's bit pairs (r[i], r[i-1]).
  task automatic count_actions(logic [7:0] r);
    logic [8:0] rr;
    rr = {r, 1'b0};
    for (int i = 0; i < 8; i++) begin
      case (rr[i+1 -: 2])
        2'b01:   n_add++;
        2'b10:   n_sub++;
        default: n_nop++;
      endcase
    end
  endtask

  initial begin
    // Worked example: m = 3, r = -4 gives -12 (1111 0100).
    m4 = 4'sd3; r4 = -4'sd4;
    #1;
    checks++;
    if (p4 !== -8'sd12 || p4 !== 8'b1111_0100) begin
      failures++;
      $display("FAIL: 3 x -4 = %0d, expected -12", p4);
    end

    for (int a = -8; a < 8; a++) begin
      for (int b = -8; b < 8; b++) begin
        m4 = 4'(a); r4 = 4'(b);
        #1;
        checks++;
        if (int'(p4) != a * b) begin
          failures++;
          $display("FAIL 4x4: %0d x %0d = %0d", a, b, p4);
        end
      end
    end

    for (int a = -128; a < 128; a++) begin
      for (int b = -128; b < 128; b++) begin
        m8 = 8'(a); r8 = 8'(b);
        #1;
        checks++;
        if (int'(p8) != a * b) begin
          failures++;
          if (failures < 20) $display("FAIL 8x8: %0d x %0d = %0d, expected %0d", a, b, p8, a * b);
        end
        if (a == 0) count_actions(8'(b));
      end
    end

    $display("Booth actions over all multipliers: add %0d, subtract %0d, none %0d", n_add, n_sub, n_nop);
    checks++;
    if (n_add == 0 || n_sub == 0 || n_nop == 0) begin
      failures++;
      $display("FAIL: a Booth action was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fir_delay_line: self-checking test of fir_delay_line.
//
// Drives random samples into the default three-register, 8-bit delay line
// and compares every tap after every clock edge with a reference history
// kept in the testbench: taps[i] must equal the sample applied i+1 edges
// earlier. Also checks that reset clears all taps, including a reset in the
// middle of the stream.
module tb_fir_delay_line;
  int checks = 0, failures = 0;
  logic clk = 1'b0, reset;
  logic [7:0] din;
  logic [2:0][7:0] taps;
  logic [7:0] hist [3];

  fir_delay_line dut (.clk(clk), .reset(reset), .din(din), .taps(taps));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (taps[i] !== hist[i]) begin
        failures++;
        $display("FAIL: taps[%0d] = %h, expected %h", i, taps[i], hist[i]);
      end
    end
  endtask

  initial begin
    reset = 1'b1; din = 8'h5A;
    @(posedge clk); @(negedge clk);
    hist = '{default: 8'h00};
    compare();
    reset = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      din = 8'($urandom);
      if (n == 500) reset = 1'b1;
      @(posedge clk);
      if (reset) hist = '{default: 8'h00};
      else begin
        hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = din;
      end
      @(negedge clk);
      reset = 1'b0;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_position_sum: exhaustive check of the position-sum adder.
// For K = 4 (default) and K = 2 every pair of (K+1)-bit two's complement
// digits is applied and the (K+2)-bit result is compared with the integer
// sum a + b. Combinational: values are applied with #1 steps.
module tb_position_sum;

  int checks = 0;
  int failures = 0;

  logic [4:0] a4, b4;
  logic [5:0] p4;
  logic [2:0] a2, b2;
  logic [3:0] p2;

  position_sum                 dut4 (.a(a4), .b(b4), .p(p4));
  position_sum #(.K(2))        dut2 (.a(a2), .b(b2), .p(p2));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = -16; x <= 15; x++) begin
      for (int y = -16; y <= 15; y++) begin
        a4 = 5'(x);
        b4 = 5'(y);
        #1;
        checks++;
        if ($signed(p4) != x + y) begin
          failures++;
          $display("K=4 a=%0d b=%0d p=%0d", x, y, $signed(p4));
        end
      end
    end
    for (int x = -4; x <= 3; x++) begin
      for (int y = -4; y <= 3; y++) begin
        a2 = 3'(x);
        b2 = 3'(y);
        #1;
        checks++;
        if ($signed(p2) != x + y) begin
          failures++;
          $display("K=2 a=%0d b=%0d p=%0d", x, y, $signed(p2));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

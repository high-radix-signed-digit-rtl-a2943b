// tb_interim_sum: checks w = p - r*t for every legal position sum
// p in [-(2r-2), 2r-2], with t chosen by the half-radix rule, for r = 16
// (default K = 4) and r = 8. Also checks |w| <= r-2, the bound that keeps the
// final sum inside the digit set.
module tb_interim_sum;

  int checks = 0;
  int failures = 0;

  logic [5:0] p4;
  logic [4:0] w4;
  logic [4:0] p3;
  logic [3:0] w3;

  interim_sum          dut4 (.p(p4), .w(w4));
  interim_sum #(.K(3)) dut3 (.p(p3), .w(w3));

  function automatic int expected_w(int p, int r);
    int t;
    t = (p >= r / 2) ? 1 : (p < -r / 2) ? -1 : 0;
    return p - r * t;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = -30; p <= 30; p++) begin
      p4 = 6'(p);
      #1;
      checks++;
      if ($signed(w4) != expected_w(p, 16) || $signed(w4) > 14 || $signed(w4) < -14) begin
        failures++;
        $display("K=4 p=%0d w=%0d expected %0d", p, $signed(w4), expected_w(p, 16));
      end
    end
    for (int p = -14; p <= 14; p++) begin
      p3 = 5'(p);
      #1;
      checks++;
      if ($signed(w3) != expected_w(p, 8)) begin
        failures++;
        $display("K=3 p=%0d w=%0d expected %0d", p, $signed(w3), expected_w(p, 8));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

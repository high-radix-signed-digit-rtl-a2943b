// tb_hrsd_digit_slice: exhaustive check of one digit position for r = 16
// (default K = 4) and r = 8. For every pair of digits in [-(r-1), r-1] and
// every incoming transfer it checks
//   s + r * t_out == a + b + t_in,   |s| <= r-1,
// and that t_out follows the half-radix rule on p = a + b. A final pass
// uses the less redundant digit set [-9, 9] of r = 16 and checks that it is
// preserved.
module tb_hrsd_digit_slice
  import hrsd_pkg::*;
;

  int checks = 0;
  int failures = 0;

  logic [4:0] a4, b4, s4;
  logic [3:0] a3, b3, s3;
  transfer_t  tin, tout4, tout3;

  hrsd_digit_slice          dut4 (.a(a4), .b(b4), .t_in(tin), .s(s4), .t_out(tout4));
  hrsd_digit_slice #(.K(3)) dut3 (.a(a3), .b(b3), .t_in(tin), .s(s3), .t_out(tout3));

  function automatic transfer_t enc(int v);
    return (v > 0) ? T_PLUS : (v < 0) ? T_MINUS : T_ZERO;
  endfunction

  function automatic int dec(transfer_t t);
    return (t == T_PLUS) ? 1 : (t == T_MINUS) ? -1 : (t == T_ZERO) ? 0 : 99;
  endfunction

  function automatic int rule(int p, int r);
    return (p >= r / 2) ? 1 : (p < -r / 2) ? -1 : 0;
  endfunction

  task automatic check(int k, int x, int y, int tv, int s, transfer_t to);
    int r = 1 << k;
    checks++;
    if (s + r * dec(to) != x + y + tv || s > r - 1 || s < -(r - 1)
        || dec(to) != rule(x + y, r)) begin
      failures++;
      $display("K=%0d a=%0d b=%0d t_in=%0d -> s=%0d t_out=%0d", k, x, y, tv, s, dec(to));
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int tv = -1; tv <= 1; tv++) begin
      tin = enc(tv);
      for (int x = -15; x <= 15; x++)
        for (int y = -15; y <= 15; y++) begin
          a4 = 5'(x);
          b4 = 5'(y);
          a3 = 4'(x < -7 ? -7 : x > 7 ? 7 : x);
          b3 = 4'(y < -7 ? -7 : y > 7 ? 7 : y);
          #1;
          check(4, x, y, tv, $signed(s4), tout4);
          if (x >= -7 && x <= 7 && y >= -7 && y <= 7)
            check(3, x, y, tv, $signed(s3), tout3);
        end
    end
    // Less redundant digit set alpha = r/2 + 1 = 9 (r = 16): the same logic
    // must keep every sum digit inside [-9, 9].
    for (int tv = -1; tv <= 1; tv++) begin
      tin = enc(tv);
      for (int x = -9; x <= 9; x++)
        for (int y = -9; y <= 9; y++) begin
          a4 = 5'(x);
          b4 = 5'(y);
          #1;
          checks++;
          if ($signed(s4) > 9 || $signed(s4) < -9 ||
              $signed(s4) + 16 * dec(tout4) != x + y + tv) begin
            failures++;
            $display("alpha=9 a=%0d b=%0d t_in=%0d -> s=%0d", x, y, tv, $signed(s4));
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

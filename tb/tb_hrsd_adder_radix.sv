// tb_hrsd_adder_radix: runs the carry-free adder at radices other than the
// default (r = 4, 8 and 64) and at other lengths, to show that the transfer
// and interim-sum logic, which only looks at three bits of the position sum,
// is correct for every K.
module tb_hrsd_adder_radix;

  int c2, f2, c3, f3, c6, f6;
  logic d2, d3, d6;
  int checks, failures;

  hrsd_adder_check #(.K(2), .N(5)) u_k2 (.checks(c2), .failures(f2), .done(d2));
  hrsd_adder_check #(.K(3), .N(7)) u_k3 (.checks(c3), .failures(f3), .done(d3));
  hrsd_adder_check #(.K(6), .N(3)) u_k6 (.checks(c6), .failures(f6), .done(d6));

  initial begin : watchdog
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c3 + c6, f2 + f3 + f6 + 1);
    $finish;
  end

  initial begin
    #1;
    wait (d2 && d3 && d6);
    checks   = c2 + c3 + c6;
    failures = f2 + f3 + f6;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

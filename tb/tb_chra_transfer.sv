// tb_chra_transfer: checks the CHRA transfer logic against the rule it
// implements. For every position sum p in [-(2r-2), 2r-2] of radix r = 16 and
// r = 4 the three top bits of p are applied; the expected transfer is +1 for
// p >= r/2, -1 for p < -r/2 and 0 otherwise (p = -r/2 gives 0).
module tb_chra_transfer
  import hrsd_pkg::*;
;

  int checks = 0;
  int failures = 0;
  int n_plus = 0, n_minus = 0, n_zero = 0;

  logic [2:0] p_top;
  transfer_t  t;

  chra_transfer dut (.p_top(p_top), .t(t));

  function automatic int expected_t(int p, int r);
    if (p >= r / 2)  return 1;
    if (p < -r / 2)  return -1;
    return 0;
  endfunction

  task automatic sweep(int k);
    int r = 1 << k;
    logic [31:0] pv;
    int got;
    for (int p = -(2 * r - 2); p <= 2 * r - 2; p++) begin
      pv = 32'(p);
      p_top = pv[k+1 -: 3];
      #1;
      got = (t == T_PLUS) ? 1 : (t == T_MINUS) ? -1 : (t == T_ZERO) ? 0 : 99;
      checks++;
      if (got != expected_t(p, r)) begin
        failures++;
        $display("k=%0d p=%0d t=%b expected %0d", k, p, t, expected_t(p, r));
      end
      if (got == 1) n_plus++;
      else if (got == -1) n_minus++;
      else n_zero++;
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sweep(4);
    sweep(2);
    sweep(6);
    if (n_plus == 0 || n_minus == 0 || n_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

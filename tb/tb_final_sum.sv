// tb_final_sum: checks s = w + t for every interim sum w in [-(r-2), r-2]
// and every transfer t in {-1, 0, +1}, for r = 16 (default) and r = 4.
module tb_final_sum
  import hrsd_pkg::*;
;

  int checks = 0;
  int failures = 0;

  logic [4:0] w4, s4;
  logic [2:0] w2, s2;
  transfer_t  t;

  final_sum          dut4 (.w(w4), .t_in(t), .s(s4));
  final_sum #(.K(2)) dut2 (.w(w2), .t_in(t), .s(s2));

  function automatic transfer_t enc(int v);
    return (v > 0) ? T_PLUS : (v < 0) ? T_MINUS : T_ZERO;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int tv = -1; tv <= 1; tv++) begin
      t = enc(tv);
      for (int w = -14; w <= 14; w++) begin
        w4 = 5'(w);
        #1;
        checks++;
        if ($signed(s4) != w + tv) begin
          failures++;
          $display("K=4 w=%0d t=%0d s=%0d", w, tv, $signed(s4));
        end
      end
      for (int w = -2; w <= 2; w++) begin
        w2 = 3'(w);
        #1;
        checks++;
        if ($signed(s2) != w + tv) begin
          failures++;
          $display("K=2 w=%0d t=%0d s=%0d", w, tv, $signed(s2));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// hrsd_adder_check: testbench helper that runs one hrsd_adder of a given
// radix 2^K and length N through random and directed operands and reports
// how many checks it made and how many failed. The check is the same exact
// digit-serial one as in tb_hrsd_adder: sum((a_i + b_i - s_i) r^i) must equal
// t_N r^N, and every sum digit must lie in [-(r-1), r-1]. It also fails when
// no positive or negative transfer, p = -r/2 case or overflow of either sign
// was seen.
module hrsd_adder_check #(
  parameter int K     = 2,
  parameter int N     = 4,
  parameter int NRAND = 5000
) (
  output int   checks,
  output int   failures,
  output logic done
);

  localparam int R     = 1 << K;
  localparam int ALPHA = R - 1;

  logic [N-1:0][K:0] a, b, s;
  logic [1:0]        t_n;
  logic              overflow;

  hrsd_adder #(.K(K), .N(N)) dut (.a(a), .b(b), .s(s), .t_n(t_n), .overflow(overflow));

  int n_tplus, n_tminus, n_half, n_ovf_pos, n_ovf_neg;

  task automatic apply_and_check();
    int c, x, tn, p, si;
    bit bad;
    #1;
    checks++;
    bad = 0;
    tn  = (t_n == 2'b01) ? 1 : (t_n == 2'b11) ? -1 : (t_n == 2'b00) ? 0 : 99;
    c = 0;
    for (int i = 0; i < N; i++) begin
      si = int'($signed(s[i]));
      p  = int'($signed(a[i])) + int'($signed(b[i]));
      if (si > ALPHA || si < -ALPHA) bad = 1;
      x = p - si + c;
      if (x % R != 0) bad = 1;
      c = x / R;
      if (p >= R / 2) n_tplus++;
      if (p < -R / 2) n_tminus++;
      if (p == -R / 2) n_half++;
    end
    if (c != tn || overflow != (tn != 0)) bad = 1;
    if (tn == 1) n_ovf_pos++;
    if (tn == -1) n_ovf_neg++;
    if (bad) begin
      failures++;
      if (failures <= 5) $display("K=%0d N=%0d: a=%h b=%h s=%h t_n=%b", K, N, a, b, s, t_n);
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 0;
    n_tplus = 0; n_tminus = 0; n_half = 0; n_ovf_pos = 0; n_ovf_neg = 0;
    for (int i = 0; i < N; i++) begin a[i] = (K+1)'(ALPHA);  b[i] = (K+1)'(ALPHA);  end
    apply_and_check();
    for (int i = 0; i < N; i++) begin a[i] = (K+1)'(-ALPHA); b[i] = (K+1)'(-ALPHA); end
    apply_and_check();
    for (int n = 0; n < NRAND; n++) begin
      for (int i = 0; i < N; i++) begin
        a[i] = (K+1)'(int'($urandom_range(0, 2 * ALPHA)) - ALPHA);
        b[i] = (K+1)'(int'($urandom_range(0, 2 * ALPHA)) - ALPHA);
      end
      apply_and_check();
    end
    if (n_tplus == 0 || n_tminus == 0 || n_half == 0 || n_ovf_pos == 0 || n_ovf_neg == 0) begin
      failures++;
      $display("K=%0d N=%0d: a mechanism was never exercised", K, N);
    end
    done = 1;
  end

endmodule

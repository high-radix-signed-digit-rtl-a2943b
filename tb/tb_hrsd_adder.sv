// tb_hrsd_adder: end-to-end test of the N-digit carry-free adder at its
// default size (K = 4, radix 16, N = 16 digits).
//
// Operands are random digit vectors over [-(r-1), r-1], with a bias towards
// the extreme and half-radix digit values, plus directed cases. The result is
// checked without trusting the adder's structure: with d_i = a_i + b_i - s_i
// the identity sum(d_i r^i) == t_N r^N is verified by exact digit-serial
// division by r, and every sum digit must lie in [-(r-1), r-1].
// The testbench also counts how often each mechanism of the algorithm
// occurred (positive and negative transfers, the p = -r/2 point where the
// half-radix rule picks 0, positive and negative overflow, and sum digits at
// +-alpha) and fails if any never did.
module tb_hrsd_adder
  import hrsd_pkg::*;
;

  localparam int K     = 4;
  localparam int N     = 16;
  localparam int R     = 1 << K;
  localparam int ALPHA = R - 1;
  localparam int NRAND = 20000;

  int checks = 0;
  int failures = 0;
  int n_tplus = 0, n_tminus = 0, n_half = 0;
  int n_ovf_pos = 0, n_ovf_neg = 0, n_smax = 0, n_smin = 0;

  logic [N-1:0][K:0] a, b, s;
  logic [1:0]        t_n;
  logic              overflow;

  hrsd_adder dut (.a(a), .b(b), .s(s), .t_n(t_n), .overflow(overflow));

  function automatic int digit(logic [N-1:0][K:0] v, int i);
    return int'($signed(v[i]));
  endfunction

  function automatic int rand_digit();
    int sel = int'($urandom_range(0, 9));
    int mag;
    case (sel)
      0: mag = ALPHA;
      1: mag = R / 2;
      2: mag = R / 2 - 1;
      default: return int'($urandom_range(0, 2 * ALPHA)) - ALPHA;
    endcase
    return ($urandom_range(0, 1) != 0) ? mag : -mag;
  endfunction

  task automatic apply_and_check(string tag);
    int c, x, tn, p;
    bit bad;
    #1;
    checks++;
    bad = 0;
    tn  = (t_n == 2'b01) ? 1 : (t_n == 2'b11) ? -1 : (t_n == 2'b00) ? 0 : 99;
    c = 0;
    for (int i = 0; i < N; i++) begin
      if (digit(s, i) > ALPHA || digit(s, i) < -ALPHA) bad = 1;
      x = digit(a, i) + digit(b, i) - digit(s, i) + c;
      if (x % R != 0) bad = 1;
      c = x / R;
      p = digit(a, i) + digit(b, i);
      if (p >= R / 2) n_tplus++;
      if (p < -R / 2) n_tminus++;
      if (p == -R / 2) n_half++;
      if (digit(s, i) == ALPHA) n_smax++;
      if (digit(s, i) == -ALPHA) n_smin++;
    end
    if (c != tn) bad = 1;
    if (overflow != (tn != 0)) bad = 1;
    if (tn == 1) n_ovf_pos++;
    if (tn == -1) n_ovf_neg++;
    if (bad) begin
      failures++;
      if (failures <= 10)
        $display("%s: mismatch a=%h b=%h s=%h t_n=%b", tag, a, b, s, t_n);
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Directed: zero, largest and smallest operands, alternating signs.
    a = '0; b = '0;
    apply_and_check("zero");
    for (int i = 0; i < N; i++) begin a[i] = (K+1)'(ALPHA);  b[i] = (K+1)'(ALPHA);  end
    apply_and_check("max+max");
    for (int i = 0; i < N; i++) begin a[i] = (K+1)'(-ALPHA); b[i] = (K+1)'(-ALPHA); end
    apply_and_check("min+min");
    for (int i = 0; i < N; i++) begin a[i] = (K+1)'(-R/2);   b[i] = '0;             end
    apply_and_check("minus half radix");
    for (int i = 0; i < N; i++) begin
      a[i] = (K+1)'((i % 2 == 0) ? ALPHA : -ALPHA);
      b[i] = (K+1)'((i % 2 == 0) ? 1 : -1);
    end
    apply_and_check("alternating");
    // Random operands.
    for (int n = 0; n < NRAND; n++) begin
      for (int i = 0; i < N; i++) begin
        a[i] = (K+1)'(rand_digit());
        b[i] = (K+1)'(rand_digit());
      end
      apply_and_check("random");
    end
    $display("mechanisms: t=+1 %0d, t=-1 %0d, p=-r/2 %0d, overflow+ %0d, overflow- %0d, s=+alpha %0d, s=-alpha %0d",
             n_tplus, n_tminus, n_half, n_ovf_pos, n_ovf_neg, n_smax, n_smin);
    if (n_tplus == 0 || n_tminus == 0 || n_half == 0 || n_ovf_pos == 0 ||
        n_ovf_neg == 0 || n_smax == 0 || n_smin == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

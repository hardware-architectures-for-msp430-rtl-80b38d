// tb_gf2m_digit_mul: checks the digit-serial multiplication step in
// GF(2^163) (f = x^163 + x^7 + x^6 + x^3 + 1) for digit sizes 2 (default)
// and 4. Each single step is compared with work*x^D + opa*digit computed
// by the reference package, and complete multiplications built from
// ceil(163/D) steps, most significant digit first, are compared with the
// reference product.
module tb_gf2m_digit_mul;
  import gf2m_ref_pkg::*;

  localparam int N = 163;
  localparam fe_t POLY = fe_t'(8'hC9);

  int checks = 0, failures = 0;

  logic [N-1:0] work2, opa2, next2, work4, opa4, next4;
  logic [1:0]   dig2;
  logic [3:0]   dig4;

  gf2m_digit_mul dut2 (.work(work2), .opa(opa2), .digit(dig2), .work_next(next2));
  gf2m_digit_mul #(.D(4)) dut4 (.work(work4), .opa(opa4), .digit(dig4), .work_next(next4));

  task automatic check(string what, fe_t got, fe_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe_t a, b, w, e;
    // single steps
    for (int t = 0; t < 300; t++) begin
      a = ref_rand(N); w = ref_rand(N);
      if (t == 0) w = (fe_t'(1) << N) - 1;        // all overflow bits set
      work2 = w[N-1:0]; opa2 = a[N-1:0]; dig2 = 2'($urandom);
      work4 = w[N-1:0]; opa4 = a[N-1:0]; dig4 = 4'($urandom);
      #1;
      e = ref_mul(w, fe_t'(4), N, POLY) ^ ref_mul(a, fe_t'(dig2), N, POLY);
      check("step D=2", fe_t'(next2), e);
      e = ref_mul(w, fe_t'(16), N, POLY) ^ ref_mul(a, fe_t'(dig4), N, POLY);
      check("step D=4", fe_t'(next4), e);
    end
    // full multiplications
    for (int t = 0; t < 40; t++) begin
      a = ref_rand(N); b = ref_rand(N);
      if (t == 0) begin a = (fe_t'(1) << N) - 1; b = a; end
      opa2 = a[N-1:0]; opa4 = a[N-1:0];
      work2 = '0; work4 = '0;
      for (int k = 162; k >= 0; k -= 2) begin
        dig2 = b[k +: 2]; #1; work2 = next2;
      end
      for (int k = 160; k >= 0; k -= 4) begin
        dig4 = b[k +: 4]; #1; work4 = next4;
      end
      e = ref_mul(a, b, N, POLY);
      check("mul D=2", fe_t'(work2), e);
      check("mul D=4", fe_t'(work4), e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_gf2m_squarer: checks single-cycle squaring in GF(2^163) against the
// reference multiplication a*a, for random elements and for the corner
// cases 0, 1, x^162 and the all-ones element.
module tb_gf2m_squarer;
  import gf2m_ref_pkg::*;

  localparam int N = 163;
  localparam fe_t POLY = fe_t'(8'hC9);

  int checks = 0, failures = 0;
  logic [N-1:0] a, y;

  gf2m_squarer dut (.a(a), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe_t v, e;
    for (int t = 0; t < 300; t++) begin
      case (t)
        0: v = '0;
        1: v = fe_t'(1);
        2: v = fe_t'(1) << 162;
        3: v = (fe_t'(1) << N) - 1;
        default: v = ref_rand(N);
      endcase
      a = v[N-1:0];
      #1;
      e = ref_sq(v, N, POLY);
      checks++;
      if (fe_t'(y) !== e) begin
        failures++;
        $display("FAIL square %h: got %h exp %h", v, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

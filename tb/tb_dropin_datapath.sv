// tb_dropin_datapath: drives the datapath (N = 163, D = 2, squaring unit)
// cycle by cycle the way the controlpath does and compares the stored
// words with the reference arithmetic: multiplication (OpA loaded word by
// word, OpB words arriving most significant first and consumed on
// arrival, 82 multiplication steps), single-cycle squaring, and the
// word-wise addition, both with the XOR result written in the cycle the
// second word arrives and held in OpB for a later write.
module tb_dropin_datapath;
  import dropin_pkg::*;
  import gf2m_ref_pkg::*;

  localparam int N = 163, NW = 11;
  localparam fe_t POLY = fe_t'(8'hC9);

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, rd_valid, rd_top, st_add;
  rd_tgt_e rd_tgt;
  logic [3:0] rd_idx, st_idx;
  word_t rdata, wdata;
  work_op_e work_op;

  dropin_datapath dut (.clk, .rst_n, .rd_valid, .rd_tgt, .rd_idx, .rd_top,
                       .rdata, .work_op, .st_idx, .st_add, .wdata);

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic idle();
    rd_valid = 0; rd_top = 0; work_op = WK_HOLD; st_add = 0;
  endtask

  task automatic load_opa(fe_t a);
    for (int i = 0; i < NW; i++) begin
      @(negedge clk);
      idle();
      rd_valid = 1; rd_tgt = RT_OPA; rd_idx = 4'(i); rdata = a[16*i +: 16];
    end
    @(negedge clk);
    idle();
  endtask

  task automatic read_work(output fe_t r);
    r = '0;
    @(negedge clk);
    idle();
    for (int i = 0; i < NW; i++) begin
      st_idx = 4'(i);
      #1;
      r[16*i +: 16] = wdata;
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe_t a, b, r, e;
    int steps;
    idle(); rd_tgt = RT_OPA; rd_idx = '0; rdata = '0; st_idx = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      a = ref_rand(N); b = ref_rand(N);
      if (t == 0) begin a = (fe_t'(1) << N) - 1; b = a; end
      // ---- multiplication ----
      load_opa(a);
      work_op = WK_CLEAR;
      steps = 0;
      for (int w = NW - 1; w >= 0; w--) begin
        int nd;
        nd = (w == NW - 1) ? 2 : 8;
        for (int k = 0; k < nd; k++) begin
          @(negedge clk);
          idle();
          work_op = WK_MULSTEP;
          steps++;
          if (k == 0) begin
            rd_valid = 1; rd_tgt = RT_OPB_MUL; rd_idx = 4'(w);
            rd_top = (w == NW - 1); rdata = b[16*w +: 16];
          end else begin
            rdata = word_t'($urandom);   // bus noise must be ignored
          end
        end
      end
      read_work(r);
      e = ref_mul(a, b, N, POLY);
      check("product", r == e);
      if (r != e) $display("  a=%h b=%h got %h exp %h", a, b, r, e);
      // ---- squaring ----
      load_opa(b);
      work_op = WK_SQUARE;
      read_work(r);
      check("square", r == ref_sq(b, N, POLY));
      // ---- addition ----
      for (int i = 0; i < NW; i++) begin
        @(negedge clk);
        idle();
        rd_valid = 1; rd_tgt = RT_OPB_LOAD; rdata = a[16*i +: 16];
        @(negedge clk);
        idle();
        rd_valid = 1; rd_tgt = RT_OPB_XOR; rdata = b[16*i +: 16]; st_add = 1;
        #1;
        check("sum word on arrival", wdata == (a[16*i +: 16] ^ b[16*i +: 16]));
        @(negedge clk);
        idle();
        st_add = 1; rdata = word_t'($urandom);
        #1;
        check("sum word held", wdata == (a[16*i +: 16] ^ b[16*i +: 16]));
      end
      // Work keeps the square while the addition ran
      read_work(r);
      check("work held", r == ref_sq(b, N, POLY));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dropin_ecc: end-to-end test of the accelerator in its smallest
// configuration: digit size D = 4 and no squaring unit, so that SQU runs
// as a multiplication of A by itself. The accelerator is connected to a
// 111-word data RAM; the testbench plays the CPU on the CPU data bus,
// writes operands, programs the registers, polls STATUS and reads the
// results, comparing them with the reference arithmetic.
//  1. ADD / SQU / MUL on an idle CPU bus with their busy cycles
//     (33, 64, 64);
//  2. random operations and slots, including dest = source, while the CPU
//     uses the RAM at random, with CPU reads checked during operations, a
//     command written while busy (ignored) and addresses rewritten while
//     busy.
// Each mechanism (hold by the CPU, lost multiplier prefetch, CPU reads,
// ignored start, address rewrite, in-place operation, each command) must
// occur at least once.
module tb_dropin_ecc;
  import dropin_pkg::*;
  import gf2m_ref_pkg::*;

  localparam int N = 163, NW = 11;
  localparam fe_t POLY = fe_t'(8'hC9);
  localparam addr_t RB = 8'hF8;        // register window
  localparam addr_t SCRATCH = 8'd110;  // word the CPU uses for its own traffic

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, busy, hold;
  mem_req_t cpu_req;
  word_t cpu_rdata;

  fe_t shadow [10];              // expected contents of the 10 slots
  int  interfere;                // percent of wait cycles with CPU RAM traffic
  word_t scratch_val;
  int n_hold = 0, n_prefetch_lost = 0, n_cpu_reads = 0, n_ignored = 0,
      n_rewrite = 0, n_inplace = 0, n_ops [4];
  longint op_cycles;

  mem_req_t ram_req;
  word_t    ram_rdata;

  dropin_ecc #(.D(4), .HAS_SQUARER(1'b0)) u_ecc (
    .clk, .rst_n, .cpu_req, .cpu_rdata, .ram_req, .ram_rdata, .busy, .hold
  );
  data_ram u_ram (.clk, .req(ram_req), .rdata(ram_rdata));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (hold) n_hold++;
    if (hold && u_ecc.work_op == WK_MULSTEP) n_prefetch_lost++;
    if (busy) op_cycles++;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---- CPU bus ----
  task automatic cpu_wr(addr_t a, word_t d);
    @(negedge clk);
    cpu_req = '{en: 1'b1, we: 2'b11, addr: a, wdata: d};
    @(negedge clk);
    cpu_req = MEM_IDLE;
  endtask

  task automatic cpu_rd(addr_t a, output word_t d);
    @(negedge clk);
    cpu_req = '{en: 1'b1, we: 2'b00, addr: a, wdata: '0};
    @(negedge clk);
    cpu_req = MEM_IDLE;
    d = cpu_rdata;
  endtask

  function automatic addr_t slot(int s);
    return addr_t'(NW * s);
  endfunction

  task automatic put(int s, fe_t v);
    for (int i = 0; i < NW; i++) cpu_wr(slot(s) + addr_t'(i), v[16*i +: 16]);
    shadow[s] = v;
  endtask

  task automatic get(int s, output fe_t v);
    word_t w;
    v = '0;
    for (int i = 0; i < NW; i++) begin
      cpu_rd(slot(s) + addr_t'(i), w);
      v[16*i +: 16] = w;
    end
  endtask

  // one wait cycle of the CPU: either idle or some RAM traffic of its own
  task automatic cpu_other_work(int quiet);
    word_t w;
    int r = $urandom % 100;
    if (r < interfere) begin
      if ($urandom % 2 == 1) begin
        scratch_val = word_t'($urandom);
        cpu_wr(SCRATCH, scratch_val);
      end else begin
        cpu_rd(SCRATCH, w);
        n_cpu_reads++;
        check("CPU read during operation", w == scratch_val);
        if (quiet >= 0) begin
          int i = $urandom % NW;
          cpu_rd(slot(quiet) + addr_t'(i), w);
          check("CPU slot read during operation", w == shadow[quiet][16*i +: 16]);
        end
      end
    end else begin
      @(negedge clk);
    end
  endtask

  task automatic wait_idle(int quiet);
    word_t st;
    automatic int guard = 0;
    do begin
      cpu_other_work(quiet);
      cpu_rd(RB + 4, st);
      guard++;
    end while (st[0] && guard < 100000);
    check("operation completes", !st[0]);
  endtask

  // start dest = op(a, b); waits for the previous operation first
  task automatic fop(cmd_e c, int d, int a, int b);
    wait_idle(-1);
    cpu_wr(RB + 0, word_t'(slot(a)));
    cpu_wr(RB + 1, word_t'(slot(b)));
    cpu_wr(RB + 2, word_t'(slot(d)));
    cpu_wr(RB + 3, word_t'(c));
    n_ops[c]++;
    if (d == a || d == b) n_inplace++;
    case (c)
      CMD_ADD: shadow[d] = shadow[a] ^ shadow[b];
      CMD_SQU: shadow[d] = ref_sq(shadow[a], N, POLY);
      CMD_MUL: shadow[d] = ref_mul(shadow[a], shadow[b], N, POLY);
      default: ;
    endcase
  endtask

  task automatic check_slot(string what, int s);
    fe_t v;
    wait_idle(-1);
    get(s, v);
    check(what, v == shadow[s]);
    if (v != shadow[s]) $display("  slot %0d got %h exp %h", s, v, shadow[s]);
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe_t v;
    word_t st;
    longint c0;
    cpu_req = MEM_IDLE; interfere = 0; op_cycles = 0;
    for (int i = 0; i < 4; i++) n_ops[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    scratch_val = 16'h1234;
    cpu_wr(SCRATCH, scratch_val);
    for (int s = 0; s < 10; s++) put(s, ref_rand(N));

    // ---- 1. cycle counts on an idle bus ----
    begin
      automatic cmd_e cs [3] = '{CMD_ADD, CMD_SQU, CMD_MUL};
      automatic int   ce [3] = '{33, 64, 64};
      for (int i = 0; i < 3; i++) begin
        wait_idle(-1);
        c0 = op_cycles;
        fop(cs[i], 2, 0, 1);
        wait_idle(-1);
        check("busy cycles on a free bus", op_cycles - c0 == longint'(ce[i]));
        $display("%s: %0d busy cycles", cs[i].name(), op_cycles - c0);
        check_slot("result on a free bus", 2);
      end
    end

    // ---- 2. random operations under CPU traffic ----
    for (int t = 0; t < 90; t++) begin
      automatic int a = $urandom % 10, b = $urandom % 10, d = $urandom % 10;
      automatic cmd_e c = cmd_e'(1 + $urandom % 3);
      interfere = 10 * ($urandom % 8);
      wait_idle(-1);
      fop(c, d, a, b);
      if (t % 3 == 0) begin
        // a second command while busy is ignored
        cpu_rd(RB + 4, st);
        if (st[0]) begin
          cpu_wr(RB + 3, word_t'(CMD_ADD));
          n_ignored++;
        end
        // next operation's addresses written while this one runs
        cpu_rd(RB + 4, st);
        if (st[0]) begin
          cpu_wr(RB + 0, word_t'(slot((d + 1) % 10)));
          n_rewrite++;
        end
      end
      // watch a slot the operation does not touch while it runs
      begin
        automatic int q = (d + 5) % 10;
        automatic int guard = 0;
        do begin
          cpu_other_work(q);
          cpu_rd(RB + 4, st);
          guard++;
        end while (st[0] && guard < 100000);
      end
      check_slot("random operation", d);
    end
    interfere = 0;

    // ---- mechanisms ----
    check("ADD used", n_ops[CMD_ADD] > 0);
    check("SQU used", n_ops[CMD_SQU] > 0);
    check("MUL used", n_ops[CMD_MUL] > 0);
    check("operation held by the CPU", n_hold > 0);
    check("multiplier prefetch lost to the CPU", n_prefetch_lost > 0);
    check("CPU reads during operations", n_cpu_reads > 0);
    check("start while busy ignored", n_ignored > 0);
    check("addresses rewritten while busy", n_rewrite > 0);
    check("in-place operations", n_inplace > 0);
    $display("ops ADD %0d SQU %0d MUL %0d; held %0d cycles (%0d in multiplier); CPU reads %0d; ignored starts %0d; rewrites %0d; in-place %0d",
             n_ops[CMD_ADD], n_ops[CMD_SQU], n_ops[CMD_MUL], n_hold, n_prefetch_lost,
             n_cpu_reads, n_ignored, n_rewrite, n_inplace);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

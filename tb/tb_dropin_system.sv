// tb_dropin_system: end-to-end test of the accelerator with its data RAM at
// the default configuration (GF(2^163), NIST B-163 polynomial, D = 2,
// squaring unit, 111-word RAM). The testbench plays the CPU: it writes
// operands into RAM over the CPU bus, programs the address and command
// registers, polls STATUS and reads results back, all through the single
// CPU data bus, and compares with the reference arithmetic.
//
// Phases:
//  1. single ADD / SQU / MUL on an idle CPU bus, checking the number of
//     busy cycles (33, 24, 105);
//  2. random operations, operand slots and aliasing (dest = source) while
//     the CPU hammers the RAM, so the operation is held and resumed; CPU
//     reads during the operation must see correct RAM data; the next
//     operation's addresses are written while the previous one runs, and
//     a command written while busy must be ignored;
//  3. field inversion a^(2^163 - 2) by the Itoh-Tsujii chain using only
//     SQU and MUL of the accelerator;
//  4. a point multiplication k*G on sect163r2 with the Montgomery ladder
//     in Lopez-Dahab projective x-coordinates (6 MUL, 5 SQU, 3 ADD per key
//     bit) and the final x = X1/Z1, checked against an affine
//     double-and-add reference.
// Mechanisms counted (each must happen): hold of an operation by a CPU RAM
// access, loss of a multiplier-word prefetch to the CPU, CPU RAM reads
// during an operation, ignored start while busy, address rewrite while
// busy, in-place operation, and each of ADD, SQU, MUL.
module tb_dropin_system;
  import dropin_pkg::*;
  import gf2m_ref_pkg::*;

  localparam int N = 163, NW = 11;
  localparam fe_t POLY = fe_t'(8'hC9);
  localparam addr_t RB = 8'hF8;        // register window
  localparam addr_t SCRATCH = 8'd110;  // word the CPU uses for its own traffic
  // sect163r2 domain parameters (a = 1)
  localparam fe_t CURVE_B = 256'h20A601907B8C953CA1481EB10512F78744A3205FD;
  localparam fe_t GX      = 256'h3F0EBA16286A2D57EA0991168D4994637E8343E36;
  localparam fe_t GY      = 256'h0D51FBC6C71A0094FA2CDD545B11C5C0C797324F1;

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

  dropin_system dut (.clk, .rst_n, .cpu_req, .cpu_rdata, .busy, .hold);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (hold) n_hold++;
    if (hold && dut.u_ecc.work_op == WK_MULSTEP) n_prefetch_lost++;
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

  // ---- reference curve arithmetic (affine, y^2 + xy = x^3 + x^2 + b) ----
  typedef struct { fe_t x, y; logic inf; } pt_t;

  function automatic pt_t pt_add(pt_t p, pt_t q);
    pt_t r;
    fe_t l;
    if (p.inf) return q;
    if (q.inf) return p;
    if (p.x == q.x) begin
      if (p.y != q.y || p.x == '0) begin r.inf = 1; r.x = '0; r.y = '0; return r; end
      l = p.x ^ ref_mul(p.y, ref_inv(p.x, N, POLY), N, POLY);
      r.x = ref_sq(l, N, POLY) ^ l ^ fe_t'(1);
      r.y = ref_sq(p.x, N, POLY) ^ ref_mul(l ^ fe_t'(1), r.x, N, POLY);
    end else begin
      l = ref_mul(p.y ^ q.y, ref_inv(p.x ^ q.x, N, POLY), N, POLY);
      r.x = ref_sq(l, N, POLY) ^ l ^ p.x ^ q.x ^ fe_t'(1);
      r.y = ref_mul(l, p.x ^ r.x, N, POLY) ^ r.x ^ p.y;
    end
    r.inf = 0;
    return r;
  endfunction

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fe_t v, k;
    word_t st;
    longint c0;
    int msb, nbits;
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
      automatic int   ce [3] = '{33, 24, 105};
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
    for (int t = 0; t < 60; t++) begin
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

    // ---- 3. inversion by the Itoh-Tsujii chain (slot 0 -> slot 1) ----
    begin
      automatic int kk = 1;
      automatic logic [7:0] m1 = 8'd162;    // n - 1
      put(0, ref_rand(N) | fe_t'(1));
      c0 = op_cycles;
      // slot1 = beta_k = a^(2^k - 1), slot2 = scratch
      put(9, '0);
      fop(CMD_ADD, 1, 0, 9);               // beta_1 = a
      for (int bit_i = 6; bit_i >= 0; bit_i--) begin
        fop(CMD_SQU, 2, 1, 1);
        for (int j = 1; j < kk; j++) fop(CMD_SQU, 2, 2, 2);
        fop(CMD_MUL, 1, 2, 1);             // beta_2k
        kk = 2 * kk;
        if (m1[bit_i]) begin
          fop(CMD_SQU, 2, 1, 1);
          fop(CMD_MUL, 1, 2, 0);           // beta_(k+1)
          kk = kk + 1;
        end
      end
      fop(CMD_SQU, 1, 1, 1);               // a^(2^163 - 2)
      check("chain length", kk == 162);
      check_slot("inverse", 1);
      check("a * a^-1 = 1", ref_mul(shadow[0], shadow[1], N, POLY) == fe_t'(1));
      $display("inversion: %0d busy cycles of the accelerator", op_cycles - c0);
    end

    // ---- 4. point multiplication on sect163r2 ----
    begin
      pt_t g, p;
      fe_t rhs, lhs;
      g.x = GX; g.y = GY; g.inf = 0;
      lhs = ref_sq(GY, N, POLY) ^ ref_mul(GX, GY, N, POLY);
      rhs = ref_mul(ref_sq(GX, N, POLY), GX, N, POLY) ^ ref_sq(GX, N, POLY) ^ CURVE_B;
      check("base point on curve", lhs == rhs);
      k = ref_rand(N) >> 2;
      k[160] = 1'b1;
      msb = 160;
      // reference k*G, affine double-and-add
      p = g;
      for (int i = msb - 1; i >= 0; i--) begin
        p = pt_add(p, p);
        if (k[i]) p = pt_add(p, g);
      end
      // slots: 0 x, 1 b, 2 X1, 3 Z1, 4 X2, 5 Z2, 6 T1, 7 T2, 8 T3
      put(0, GX); put(1, CURVE_B);
      c0 = op_cycles;
      put(9, '0);
      fop(CMD_ADD, 2, 0, 9);          // X1 = x
      put(3, fe_t'(1));               // Z1 = 1
      fop(CMD_SQU, 5, 0, 0);          // Z2 = x^2
      fop(CMD_SQU, 4, 5, 5);          // x^4
      fop(CMD_ADD, 4, 4, 1);          // X2 = x^4 + b
      nbits = 0;
      for (int i = msb - 1; i >= 0; i--) begin
        int xa, za, xb, zb;
        // Madd into (xa,za) using (xb,zb); Mdouble of (xb,zb)
        if (k[i]) begin xa = 2; za = 3; xb = 4; zb = 5; end
        else      begin xa = 4; za = 5; xb = 2; zb = 3; end
        fop(CMD_MUL, 6, xa, zb);      // T1 = Xa*Zb
        fop(CMD_MUL, 7, xb, za);      // T2 = Xb*Za
        fop(CMD_ADD, za, 6, 7);
        fop(CMD_SQU, za, za, za);     // Za = (T1 + T2)^2
        fop(CMD_MUL, 6, 6, 7);        // T1*T2
        fop(CMD_MUL, xa, 0, za);      // x*Za
        fop(CMD_ADD, xa, xa, 6);      // Xa = x*Za + T1*T2
        fop(CMD_SQU, 7, xb, xb);      // Xb^2
        fop(CMD_SQU, 8, zb, zb);      // Zb^2
        fop(CMD_MUL, zb, 7, 8);       // Zb = Xb^2 * Zb^2
        fop(CMD_SQU, 7, 7, 7);        // Xb^4
        fop(CMD_SQU, 8, 8, 8);        // Zb^4
        fop(CMD_MUL, 8, 1, 8);        // b*Zb^4
        fop(CMD_ADD, xb, 7, 8);       // Xb = Xb^4 + b*Zb^4
        nbits++;
      end
      wait_idle(-1);
      $display("ladder: %0d key bits, %0d busy cycles of the accelerator", nbits, op_cycles - c0);
      // x = X1 / Z1: invert Z1 in software (reference) and multiply on the accelerator
      put(6, ref_inv(shadow[3], N, POLY));
      fop(CMD_MUL, 7, 2, 6);
      check_slot("x(kG) from the accelerator", 7);
      check("ladder matches affine reference", !p.inf && shadow[7] == p.x);
      if (shadow[7] != p.x) $display("  ladder x %h, reference %h", shadow[7], p.x);
    end

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

// tb_dropin_ctrl: drives the controlpath (N = 163, D = 2, squaring unit)
// through ADD, SQU and MUL, first on a free bus and then with the grant
// withheld at random. Checks: the exact order of granted bus accesses
// (addresses, read/write, word indices, where each read word goes, the
// top-word flag), that every granted read is announced by rd_valid in the
// next cycle and no other, that each new multiplier word is consumed by a
// multiplication step in the cycle it arrives, the number of multiplier
// steps (2 + 10*8 = 82) and squaring cycles, the store data path, and the
// number of busy cycles on a free bus (ADD 33, SQU 24, MUL 105).
module tb_dropin_ctrl;
  import dropin_pkg::*;

  localparam int NW = 11;

  typedef struct {
    logic    wr;
    addr_t   addr;
    rd_tgt_e tgt;
    int      idx;
    logic    top;
    logic    add;
  } acc_t;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start, busy, gnt, rd_valid, rd_top, st_add, hold;
  cmd_e cmd;
  addr_t srca, srcb, dest;
  mem_req_t req;
  word_t wdata;
  rd_tgt_e rd_tgt;
  logic [3:0] rd_idx, st_idx;
  work_op_e work_op;

  acc_t exp_q[$];
  acc_t last_rd;
  logic last_rd_v;
  int stall_pct, n_step, n_sq, n_clear, n_hold;

  dropin_ctrl dut (.clk, .rst_n, .start, .cmd, .srca, .srcb, .dest, .busy,
                   .req, .gnt, .wdata, .rd_valid, .rd_tgt, .rd_idx, .rd_top,
                   .work_op, .st_idx, .st_add, .hold);

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // bus model: random grant, trace checking, read-return checking
  always @(negedge clk) begin
    if (rst_n) begin
      gnt = req.en && (($urandom % 100) >= stall_pct);
      wdata = word_t'($urandom);
      #1;
      // read return of the previous cycle
      check("rd_valid", rd_valid == last_rd_v);
      if (last_rd_v && rd_valid) begin
        check("rd_tgt", rd_tgt == last_rd.tgt);
        check("rd_idx", int'(rd_idx) == last_rd.idx);
        check("rd_top", rd_top == last_rd.top);
        if (rd_tgt == RT_OPB_MUL) check("word used on arrival", work_op == WK_MULSTEP);
      end
      last_rd_v = 0;
      if (work_op == WK_MULSTEP) n_step++;
      if (work_op == WK_SQUARE)  n_sq++;
      if (work_op == WK_CLEAR)   n_clear++;
      if (hold) n_hold++;
      if (req.en && gnt) begin
        acc_t e;
        if (exp_q.size() == 0) begin
          check("unexpected access", 0);
        end else begin
          e = exp_q.pop_front();
          check("access kind", (req.we != 2'b00) == e.wr);
          check("access addr", req.addr == e.addr);
          if (e.wr) begin
            check("store index", int'(st_idx) == e.idx);
            check("store select", st_add == e.add);
            check("store data", req.wdata == wdata && req.we == 2'b11);
          end else begin
            last_rd = e;
            last_rd_v = 1;
          end
        end
      end
    end
  end

  function automatic acc_t A(logic wr, addr_t a, rd_tgt_e t, int i, logic top, logic add);
    acc_t x;
    x.wr = wr; x.addr = a; x.tgt = t; x.idx = i; x.top = top; x.add = add;
    return x;
  endfunction

  task automatic run(cmd_e c, int exp_cycles);
    int cyc;
    srca = addr_t'($urandom % 40); srcb = addr_t'(40 + $urandom % 30);
    dest = addr_t'(80 + $urandom % 20);
    exp_q.delete();
    if (c == CMD_ADD) begin
      for (int i = 0; i < NW; i++) begin
        exp_q.push_back(A(0, srca + addr_t'(i), RT_OPB_LOAD, i, 0, 0));
        exp_q.push_back(A(0, srcb + addr_t'(i), RT_OPB_XOR, i, 0, 0));
        exp_q.push_back(A(1, dest + addr_t'(i), RT_OPA, i, 0, 1));
      end
    end else begin
      for (int i = 0; i < NW; i++) exp_q.push_back(A(0, srca + addr_t'(i), RT_OPA, i, 0, 0));
      if (c == CMD_MUL)
        for (int i = NW - 1; i >= 0; i--)
          exp_q.push_back(A(0, srcb + addr_t'(i), RT_OPB_MUL, i, i == NW - 1, 0));
      for (int i = 0; i < NW; i++) exp_q.push_back(A(1, dest + addr_t'(i), RT_OPA, i, 0, 0));
    end
    n_step = 0; n_sq = 0; n_clear = 0;
    @(negedge clk);
    start = 1; cmd = c;
    @(negedge clk);
    start = 0;
    // an extra start while busy must be ignored
    start = 1; cmd = CMD_ADD;
    @(negedge clk);
    start = 0;
    cyc = 1;   // busy cycles seen so far
    while (busy && cyc < 5000) begin
      @(negedge clk);
      cyc++;
    end
    check("operation finished", !busy);
    check("all accesses done", exp_q.size() == 0);
    if (stall_pct == 0) begin
      check("cycle count", cyc == exp_cycles);
      if (cyc != exp_cycles) $display("  cmd %s took %0d cycles, expected %0d", c.name(), cyc, exp_cycles);
    end
    check("multiplier steps", n_step == ((c == CMD_MUL) ? 82 : 0));
    check("squaring cycles", n_sq == ((c == CMD_SQU) ? 1 : 0));
    check("work cleared", n_clear == ((c == CMD_ADD) ? 0 : 1));
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; cmd = CMD_NOP; srca = '0; srcb = '0; dest = '0; gnt = 0;
    wdata = '0; last_rd_v = 0; stall_pct = 0; n_hold = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(CMD_ADD, 33);
    run(CMD_SQU, 24);
    run(CMD_MUL, 105);
    for (int r = 0; r < 6; r++) begin
      stall_pct = 20 + 10 * r;
      run(CMD_ADD, 0);
      run(CMD_SQU, 0);
      run(CMD_MUL, 0);
    end
    check("operations were held", n_hold > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

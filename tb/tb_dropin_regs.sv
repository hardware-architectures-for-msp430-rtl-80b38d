// tb_dropin_regs: writes and reads back the three address registers,
// checks the one-cycle start pulse and command of a CMD write, that a CMD
// write while busy or with command 0 does not start, the STATUS busy bit,
// and that accesses outside the register window (sel low) change nothing.
module tb_dropin_regs;
  import dropin_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sel, busy, start;
  mem_req_t cpu_req;
  addr_t srca, srcb, dest;
  cmd_e cmd;
  word_t rdata;

  dropin_regs dut (.clk, .rst_n, .sel, .cpu_req, .busy, .srca, .srcb, .dest,
                   .start, .cmd, .rdata);

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic wr(logic s, logic [2:0] off, word_t d);
    @(negedge clk);
    sel = s;
    cpu_req = '{en: 1'b1, we: 2'b11, addr: addr_t'({5'h1F, off}), wdata: d};
    #1;
  endtask

  task automatic rd(logic [2:0] off, output word_t d);
    @(negedge clk);
    sel = 1'b1;
    cpu_req = '{en: 1'b1, we: 2'b00, addr: addr_t'({5'h1F, off}), wdata: '0};
    @(negedge clk);
    sel = 1'b0;
    cpu_req = MEM_IDLE;
    d = rdata;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t d;
    addr_t a [3];
    sel = 0; busy = 0; cpu_req = MEM_IDLE;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      for (int r = 0; r < 3; r++) begin
        a[r] = addr_t'($urandom);
        wr(1'b1, 3'(r), word_t'({8'($urandom), a[r]}));
        check("no start on address write", !start);
      end
      // a write outside the window must not land
      wr(1'b0, 3'd0, 16'h00AA);
      check("no start when not selected", !start);
      check("outputs srca", srca == a[0]);
      check("outputs srcb", srcb == a[1]);
      check("outputs dest", dest == a[2]);
      for (int r = 0; r < 3; r++) begin
        rd(3'(r), d);
        check("read back", d == word_t'(a[r]));
      end
      busy = t[0];
      rd(3'd4, d);
      check("status busy", d == word_t'(busy));
      wr(1'b1, 3'd3, word_t'(t % 4));
      check("start pulse", start == (!busy && (t % 4) != 0));
      if (start) check("command", cmd == cmd_e'(t % 4));
      @(negedge clk);
      sel = 0; cpu_req = MEM_IDLE;
      #1;
      check("start is one cycle", !start);
    end
    rd(3'd6, d);
    check("unused offset reads 0", d == '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

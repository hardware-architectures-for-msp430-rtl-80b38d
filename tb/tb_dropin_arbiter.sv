// tb_dropin_arbiter: random CPU and controlpath requests. Checks that a
// CPU RAM access always reaches the RAM and withholds the controlpath's
// grant, that a register-window access leaves the RAM to the controlpath,
// and that the CPU read data of the following cycle comes from the place
// its read went to.
module tb_dropin_arbiter;
  import dropin_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  mem_req_t cpu_req, dp_req, ram_req, exp_req;
  word_t cpu_rdata, reg_rdata, ram_rdata;
  logic dp_gnt, reg_sel, exp_sel, exp_gnt, prev_sel;
  int n_cpu_ram = 0, n_dp_gnt = 0, n_dp_held = 0, n_reg = 0;

  dropin_arbiter dut (.clk, .rst_n, .cpu_req, .cpu_rdata, .dp_req, .dp_gnt,
                      .reg_sel, .reg_rdata, .ram_req, .ram_rdata);

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cpu_req = MEM_IDLE; dp_req = MEM_IDLE; reg_rdata = '0; ram_rdata = '0;
    prev_sel = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      // read-back mux for the previous cycle's CPU access
      reg_rdata = word_t'($urandom); ram_rdata = word_t'($urandom);
      #1;
      check("cpu read mux", cpu_rdata == (prev_sel ? reg_rdata : ram_rdata));
      cpu_req = '{en: ($urandom % 3) != 0, we: 2'($urandom),
                  addr: ($urandom % 2) ? addr_t'(8'hF8 + $urandom % 8) : addr_t'($urandom % 111),
                  wdata: word_t'($urandom)};
      dp_req  = '{en: ($urandom % 2) != 0, we: 2'($urandom),
                  addr: addr_t'($urandom % 111), wdata: word_t'($urandom)};
      #1;
      exp_sel = cpu_req.en && cpu_req.addr[7:3] == 5'h1F;
      exp_gnt = dp_req.en && !(cpu_req.en && !exp_sel);
      if (cpu_req.en && !exp_sel) exp_req = cpu_req;
      else if (dp_req.en)         exp_req = dp_req;
      else                        exp_req = MEM_IDLE;
      check("reg_sel", reg_sel == exp_sel);
      check("dp_gnt", dp_gnt == exp_gnt);
      check("ram_req", ram_req == exp_req);
      if (cpu_req.en && !exp_sel) n_cpu_ram++;
      if (exp_sel) n_reg++;
      if (exp_gnt) n_dp_gnt++;
      if (dp_req.en && !exp_gnt) n_dp_held++;
      prev_sel = exp_sel;
    end
    check("all cases seen", n_cpu_ram > 0 && n_reg > 0 && n_dp_gnt > 0 && n_dp_held > 0);
    $display("cpu ram %0d, reg %0d, granted %0d, held %0d", n_cpu_ram, n_reg, n_dp_gnt, n_dp_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

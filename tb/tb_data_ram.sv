// tb_data_ram: random reads and writes with byte enables on the 111-word
// data RAM, compared with a shadow array; checks one-cycle read latency,
// that read data holds until the next read, and that addresses beyond the
// RAM read 0.
module tb_data_ram;
  import dropin_pkg::*;

  localparam int DEPTH = 111;

  int checks = 0, failures = 0;
  logic clk = 0;
  mem_req_t req;
  word_t rdata, shadow [DEPTH], exp_q;
  logic exp_v;

  data_ram dut (.clk, .req, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = MEM_IDLE;
    // fill
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      shadow[i] = word_t'($urandom);
      req = '{en: 1'b1, we: 2'b11, addr: addr_t'(i), wdata: shadow[i]};
    end
    exp_v = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (exp_v) begin
        checks++;
        if (rdata !== exp_q) begin
          failures++;
          $display("FAIL read: got %h exp %h", rdata, exp_q);
        end
      end
      req.en    = ($urandom % 4) != 0;
      req.addr  = addr_t'($urandom % (DEPTH + 8));
      req.we    = ($urandom % 2) ? 2'($urandom) : 2'b00;
      req.wdata = word_t'($urandom);
      if (req.en && req.we == 2'b00) begin
        exp_q = (int'(req.addr) < DEPTH) ? shadow[req.addr] : '0;
        exp_v = 1;
      end else if (req.en && int'(req.addr) < DEPTH) begin
        if (req.we[0]) shadow[req.addr][7:0]  = req.wdata[7:0];
        if (req.we[1]) shadow[req.addr][15:8] = req.wdata[15:8];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

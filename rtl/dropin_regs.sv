// dropin_regs: the CPU-visible registers of the drop-in accelerator.
//
// To the CPU the accelerator looks like a small slave with three address
// registers, a command register and a status register:
//   offset 0 SRCA    word address of operand A (read/write)
//   offset 1 SRCB    word address of operand B (read/write)
//   offset 2 DEST    word address of the result (read/write)
//   offset 3 CMD     write 1 = ADD, 2 = SQU, 3 = MUL to start (reads 0)
//   offset 4 STATUS  bit 0 = busy (read only)
// Offsets 5-7 read 0. A write to CMD while busy is ignored; software
// polls STATUS (best at the start of its next operation, so that CPU and
// accelerator overlap). Address registers may be rewritten while busy,
// the controlpath has its own copy. Any byte enable writes the whole
// register. Read data appears one cycle after the read, like RAM data.
// The set of registers and the polling scheme follow the accelerator's
// description; offsets, encodings and byte-write behaviour are this
// design's own. start is a one-cycle pulse in the cycle of the CMD write.
module dropin_regs
  import dropin_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     sel,      // CPU access decoded to the register window
  input  mem_req_t cpu_req,
  input  logic     busy,
  output addr_t    srca,
  output addr_t    srcb,
  output addr_t    dest,
  output logic     start,
  output cmd_e     cmd,
  output word_t    rdata
);

  logic  wr, rd;
  reg_e  off;
  word_t rmux;

  assign wr  = sel && cpu_req.en && (cpu_req.we != 2'b00);
  assign rd  = sel && cpu_req.en && (cpu_req.we == 2'b00);
  assign off = reg_e'(cpu_req.addr[2:0]);

  assign start = wr && (off == REG_CMD) && !busy &&
                 (cpu_req.wdata[1:0] != 2'b00);
  assign cmd   = cmd_e'(cpu_req.wdata[1:0]);

  always_comb begin
    unique case (off)
      REG_SRCA:   rmux = word_t'(srca);
      REG_SRCB:   rmux = word_t'(srcb);
      REG_DEST:   rmux = word_t'(dest);
      REG_STATUS: rmux = word_t'(busy);
      default:    rmux = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      srca  <= '0;
      srcb  <= '0;
      dest  <= '0;
      rdata <= '0;
    end else begin
      if (wr) begin
        unique case (off)
          REG_SRCA: srca <= cpu_req.wdata[ADDR_W-1:0];
          REG_SRCB: srcb <= cpu_req.wdata[ADDR_W-1:0];
          REG_DEST: dest <= cpu_req.wdata[ADDR_W-1:0];
          default:  ;
        endcase
      end
      if (rd) rdata <= rmux;
    end
  end

endmodule

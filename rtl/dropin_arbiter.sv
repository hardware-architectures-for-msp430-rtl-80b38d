// dropin_arbiter: the lightweight arbiter and the two bus multiplexers of
// the drop-in accelerator.
//
// The accelerator is inserted into the CPU's data-memory bus. Towards RAM,
// a multiplexer passes either the CPU's request or the controlpath's. The
// CPU always wins: an MSP430-class CPU cannot wait for its data memory,
// so a CPU access to RAM is passed through in the same cycle and the
// controlpath's request that cycle is not granted (its operation is held
// and resumes when the bus is free). CPU accesses to the register window
// (REG_BASE, 8 words) go to the accelerator's registers instead and leave
// the RAM free for the controlpath. Towards the CPU, a multiplexer returns
// either the RAM read data or the register read data, selected by where the
// CPU's read of the previous cycle went. RAM read data also goes to the
// datapath unchanged.
// Priority to the CPU and the two multiplexers follow the accelerator's
// description and block diagram; the address decode is this design's own.
module dropin_arbiter
  import dropin_pkg::*;
#(
  parameter addr_t REG_BASE = 8'hF8
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t cpu_req,
  output word_t    cpu_rdata,
  input  mem_req_t dp_req,
  output logic     dp_gnt,
  output logic     reg_sel,
  input  word_t    reg_rdata,
  output mem_req_t ram_req,
  input  word_t    ram_rdata
);

  logic cpu_ram, rsel_q;

  assign reg_sel = cpu_req.en && (cpu_req.addr[ADDR_W-1:3] == REG_BASE[ADDR_W-1:3]);
  assign cpu_ram = cpu_req.en && !reg_sel;
  assign dp_gnt  = dp_req.en && !cpu_ram;

  always_comb begin
    if (cpu_ram)        ram_req = cpu_req;
    else if (dp_req.en) ram_req = dp_req;
    else                ram_req = MEM_IDLE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rsel_q <= 1'b0;
    else        rsel_q <= reg_sel;
  end

  assign cpu_rdata = rsel_q ? reg_rdata : ram_rdata;

  // The CPU is never held off: its RAM request always reaches the RAM.
  a_cpu_first: assert property (@(posedge clk) cpu_ram |-> (ram_req == cpu_req && !dp_gnt))
    else $error("CPU access not passed to RAM");

endmodule

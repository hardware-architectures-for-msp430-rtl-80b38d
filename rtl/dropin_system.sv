// dropin_system: the data-memory side of a sensor node with the drop-in
// ECC accelerator, i.e. everything between the CPU's data-memory port and
// the RAM.
//
//   CPU data bus --> dropin_ecc --> data_ram
//
// The CPU (an MSP430-class 16-bit core) and its program memory are outside
// this module: connect the core's data-memory port to cpu_req/cpu_rdata.
// cpu_req is a single-port memory request with word address and byte
// enables, read data returns on cpu_rdata one cycle later, whether it comes
// from RAM (word addresses 0..RAM_WORDS-1) or from the accelerator's
// registers (REG_BASE..REG_BASE+4). The CPU is never stalled. Defaults: NIST
// B-163 field, digit size 2 with squaring unit, 222-byte RAM; the choice of
// D = 2 as the main configuration and the RAM size follow the published
// evaluation, the bus encoding is this design's own.
module dropin_system
  import dropin_pkg::*;
#(
  parameter int unsigned  N           = 163,
  parameter int unsigned  D           = 2,
  parameter bit           HAS_SQUARER = 1'b1,
  parameter logic [N-1:0] POLY        = N'(8'hC9),
  parameter addr_t        REG_BASE    = 8'hF8,
  parameter int unsigned  RAM_WORDS   = 111
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t cpu_req,
  output word_t    cpu_rdata,
  output logic     busy,
  output logic     hold
);

  mem_req_t ram_req;
  word_t    ram_rdata;

  dropin_ecc #(
    .N(N), .D(D), .HAS_SQUARER(HAS_SQUARER), .POLY(POLY), .REG_BASE(REG_BASE)
  ) u_ecc (
    .clk, .rst_n, .cpu_req, .cpu_rdata, .ram_req, .ram_rdata, .busy, .hold
  );

  data_ram #(.DEPTH(RAM_WORDS)) u_ram (
    .clk, .req(ram_req), .rdata(ram_rdata)
  );

endmodule

// dropin_ecc: drop-in accelerator for binary-field elliptic curve
// cryptography, inserted between a 16-bit CPU and its data RAM.
//
// Neither CPU nor RAM are modified. The CPU's data-memory bus enters on
// cpu_req/cpu_rdata and leaves towards the RAM on ram_req/ram_rdata; the
// arbiter passes every CPU RAM access through unchanged. The CPU writes
// two source and one destination address and a command into the register
// window; the controlpath then performs one GF(2^N) addition, squaring or
// multiplication directly on the RAM, using the bus in every cycle the
// CPU leaves free, and clears busy when the result is stored. Field
// elements are NW = ceil(N/16) words, least significant word first.
// Inversion and the point multiplication stay in software.
//
// Parameters: N field degree, POLY = f(x) - x^N, D multiplier digit size
// (bits of OpB per cycle), HAS_SQUARER for the one-cycle squaring unit,
// REG_BASE the register window. busy mirrors STATUS bit 0; hold is high
// in cycles where an operation waited for the bus (for monitoring).
// The block structure (arbiter, controlpath, datapath) is the
// accelerator's own; see the submodules for the parts chosen here.
module dropin_ecc
  import dropin_pkg::*;
#(
  parameter int unsigned  N           = 163,
  parameter int unsigned  D           = 2,
  parameter bit           HAS_SQUARER = 1'b1,
  parameter logic [N-1:0] POLY        = N'(8'hC9),
  parameter addr_t        REG_BASE    = 8'hF8
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t cpu_req,
  output word_t    cpu_rdata,
  output mem_req_t ram_req,
  input  word_t    ram_rdata,
  output logic     busy,
  output logic     hold
);

  localparam int unsigned NW    = (N + BUS_W - 1) / BUS_W;
  localparam int unsigned IDX_W = (NW > 1) ? $clog2(NW) : 1;

  mem_req_t         dp_req;
  logic             dp_gnt, reg_sel, start;
  word_t            reg_rdata, wdata;
  addr_t            srca, srcb, dest;
  cmd_e             cmd;
  logic             rd_valid, rd_top, st_add;
  rd_tgt_e          rd_tgt;
  logic [IDX_W-1:0] rd_idx, st_idx;
  work_op_e         work_op;

  dropin_arbiter #(.REG_BASE(REG_BASE)) u_arb (
    .clk, .rst_n, .cpu_req, .cpu_rdata, .dp_req, .dp_gnt, .reg_sel,
    .reg_rdata, .ram_req, .ram_rdata
  );

  dropin_regs u_regs (
    .clk, .rst_n, .sel(reg_sel), .cpu_req, .busy, .srca, .srcb, .dest,
    .start, .cmd, .rdata(reg_rdata)
  );

  dropin_ctrl #(.N(N), .D(D), .HAS_SQUARER(HAS_SQUARER)) u_ctrl (
    .clk, .rst_n, .start, .cmd, .srca, .srcb, .dest, .busy,
    .req(dp_req), .gnt(dp_gnt), .wdata, .rd_valid, .rd_tgt, .rd_idx,
    .rd_top, .work_op, .st_idx, .st_add, .hold
  );

  dropin_datapath #(.N(N), .D(D), .HAS_SQUARER(HAS_SQUARER), .POLY(POLY)) u_dp (
    .clk, .rst_n, .rd_valid, .rd_tgt, .rd_idx, .rd_top, .rdata(ram_rdata),
    .work_op, .st_idx, .st_add, .wdata
  );

endmodule

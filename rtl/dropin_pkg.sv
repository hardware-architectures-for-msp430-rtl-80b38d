// dropin_pkg: types and constants shared by the drop-in ECC accelerator.
//
// The accelerator sits between a 16-bit microcontroller and its data RAM.
// Both sides of it use the same single-port memory request (mem_req_t):
// an enable, two byte write enables, a word address and write data; read
// data returns one clock after the request, as from a synchronous RAM.
// BUS_W is the 16-bit data bus of an MSP430-class CPU. ADDR_W (word
// addresses), the register map and all encodings below are this design's
// own choices.
package dropin_pkg;

  // Data bus width: the W of the digit-serial datapath (16-bit CPU bus).
  localparam int unsigned BUS_W  = 16;
  // Word address width of the data memory bus (512 bytes address space).
  localparam int unsigned ADDR_W = 8;

  typedef logic [BUS_W-1:0]  word_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // One request on a single-port memory bus. we != 0 means write
  // (per-byte enables, we[1] = upper byte); en with we == 0 means read.
  typedef struct packed {
    logic       en;
    logic [1:0] we;
    addr_t      addr;
    word_t      wdata;
  } mem_req_t;

  localparam mem_req_t MEM_IDLE = '{en: 1'b0, we: 2'b00, addr: '0, wdata: '0};

  // Finite-field operations, written to the command register.
  typedef enum logic [1:0] {
    CMD_NOP = 2'd0,
    CMD_ADD = 2'd1,   // dest = srca + srcb (bitwise XOR)
    CMD_SQU = 2'd2,   // dest = srca^2 mod f
    CMD_MUL = 2'd3    // dest = srca * srcb mod f
  } cmd_e;

  // Register offsets inside the accelerator's register window.
  typedef enum logic [2:0] {
    REG_SRCA   = 3'd0,
    REG_SRCB   = 3'd1,
    REG_DEST   = 3'd2,
    REG_CMD    = 3'd3,
    REG_STATUS = 3'd4
  } reg_e;

  // Where a word read from RAM goes when it returns one cycle later.
  typedef enum logic [1:0] {
    RT_OPA      = 2'd0,  // into word rd_idx of OpA
    RT_OPB_LOAD = 2'd1,  // into OpB (addition: first operand word)
    RT_OPB_XOR  = 2'd2,  // XOR into OpB (addition: second operand word)
    RT_OPB_MUL  = 2'd3   // into OpB as the next multiplier word
  } rd_tgt_e;

  // Update of the Work register.
  typedef enum logic [1:0] {
    WK_HOLD    = 2'd0,
    WK_CLEAR   = 2'd1,
    WK_MULSTEP = 2'd2,
    WK_SQUARE  = 2'd3
  } work_op_e;

endpackage

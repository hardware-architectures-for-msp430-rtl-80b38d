// dropin_ctrl: controlpath of the drop-in accelerator.
//
// A finite-field operation is a sequence of single-word bus accesses to
// the shared data RAM, interleaved with datapath cycles that need no bus:
//   ADD  per word i: read A[i], read B[i], write D[i] = A[i] ^ B[i]
//        (3 * NW bus cycles, no idle cycle);
//   SQU  read the NW words of A into OpA, one squaring cycle, write the
//        NW words of Work to D;
//   MUL  read A into OpA, clear Work, then for the words of B from the
//        most significant down: read the word into OpB and run its
//        digits through the multiplier, D bits per cycle; finally write
//        Work to D. The read of the next B word is issued in the cycle
//        that consumes the last digit of the current one, so with a free
//        bus the multiplier never waits.
// With no squaring unit (HAS_SQUARER = 0) SQU runs as MUL with B = A.
//
// Bus protocol: the controlpath raises req.en with a read or a write; the
// arbiter answers with gnt in the same cycle. Without gnt (the CPU uses the
// RAM) nothing advances and the same request is repeated next cycle, so an
// operation is held, not aborted. A granted read returns its word one
// cycle later; rd_valid/rd_tgt/rd_idx/rd_top remember where it goes, and
// the datapath takes it in that cycle whatever the bus does then.
//
// Operand addresses are word addresses of the least significant word of
// an NW-word little-endian element; they are copied on start, so the CPU
// may write the next operation's addresses while this one runs. A start
// while busy is ignored (the status register shows busy). busy rises in
// the cycle after start; on a free bus it stays high for ADD 3*NW,
// SQU 2*NW + 2, MUL 2*NW + 1 + TOP_DIG + (NW-1)*W/D cycles.
// Sequencing of the bus accesses follows the accelerator's description
// and its bus-access diagrams; the state encoding, the prefetch of B words
// and the start/busy handshake are this design's own.
module dropin_ctrl
  import dropin_pkg::*;
#(
  parameter int unsigned N           = 163,
  parameter int unsigned D           = 2,
  parameter bit          HAS_SQUARER = 1'b1,
  localparam int unsigned W     = BUS_W,
  localparam int unsigned NW    = (N + W - 1) / W,
  localparam int unsigned IDX_W = (NW > 1) ? $clog2(NW) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // command interface
  input  logic             start,
  input  cmd_e             cmd,
  input  addr_t            srca,
  input  addr_t            srcb,
  input  addr_t            dest,
  output logic             busy,
  // bus to the arbiter
  output mem_req_t         req,
  input  logic             gnt,
  input  word_t            wdata,     // store data from the datapath
  // datapath control
  output logic             rd_valid,
  output rd_tgt_e          rd_tgt,
  output logic [IDX_W-1:0] rd_idx,
  output logic             rd_top,
  output work_op_e         work_op,
  output logic [IDX_W-1:0] st_idx,
  output logic             st_add,
  // the operation wanted the bus this cycle and did not get it
  output logic             hold
);

  localparam int unsigned TOPB    = N - (NW - 1) * W;
  localparam int unsigned TOP_DIG = (TOPB + D - 1) / D;
  localparam int unsigned WDIG    = W / D;
  localparam int unsigned DC_W    = $clog2(WDIG + 1);
  localparam logic [IDX_W-1:0] LAST = IDX_W'(NW - 1);

  typedef enum logic [3:0] {
    S_IDLE, S_LDA, S_SQ, S_MREQ, S_MRUN, S_ST, S_ARA, S_ARB, S_AWR
  } state_e;

  state_e           state_q, state_d;
  cmd_e             op_q, op_d;
  addr_t            a_q, b_q, d_q, a_d, b_d, d_d;
  logic [IDX_W-1:0] widx_q, widx_d;
  logic [DC_W-1:0]  dcnt_q, dcnt_d;
  rd_tgt_e          tgt_c;
  logic             top_c;

  assign busy = (state_q != S_IDLE);
  assign hold = req.en && !gnt;

  always_comb begin
    state_d = state_q;
    op_d    = op_q;
    a_d     = a_q;
    b_d     = b_q;
    d_d     = d_q;
    widx_d  = widx_q;
    dcnt_d  = dcnt_q;
    req     = MEM_IDLE;
    tgt_c   = RT_OPA;
    top_c   = 1'b0;
    work_op = WK_HOLD;
    st_idx  = widx_q;
    st_add  = 1'b0;

    unique case (state_q)
      S_IDLE: begin
        if (start && cmd != CMD_NOP) begin
          a_d    = srca;
          b_d    = srcb;
          d_d    = dest;
          op_d   = cmd;
          widx_d = '0;
          if (cmd == CMD_SQU && !HAS_SQUARER) begin
            op_d = CMD_MUL;
            b_d  = srca;
          end
          if (cmd == CMD_ADD) begin
            state_d = S_ARA;
          end else begin
            state_d = S_LDA;
            work_op = WK_CLEAR;
          end
        end
      end

      // ---- load OpA, one word per granted cycle ----
      S_LDA: begin
        req.en   = 1'b1;
        req.addr = a_q + addr_t'(widx_q);
        tgt_c    = RT_OPA;
        if (gnt) begin
          if (widx_q == LAST) begin
            state_d = (op_q == CMD_SQU) ? S_SQ : S_MREQ;
          end else begin
            widx_d = widx_q + 1'b1;
          end
        end
      end

      // ---- squaring: one cycle, once the last OpA word is in ----
      S_SQ: begin
        if (!rd_valid) begin
          work_op = WK_SQUARE;
          widx_d  = '0;
          state_d = S_ST;
        end
      end

      // ---- multiplication: fetch a B word (MSB word first) ----
      S_MREQ: begin
        req.en   = 1'b1;
        req.addr = b_q + addr_t'(widx_q);
        tgt_c    = RT_OPB_MUL;
        top_c    = (widx_q == LAST);
        if (gnt) begin
          dcnt_d  = (widx_q == LAST) ? DC_W'(TOP_DIG) : DC_W'(WDIG);
          state_d = S_MRUN;
        end
      end

      S_MRUN: begin
        work_op = WK_MULSTEP;
        if (dcnt_q == DC_W'(1)) begin
          if (widx_q == '0) begin
            state_d = S_ST;
          end else begin
            // prefetch the next lower word of B
            widx_d   = widx_q - 1'b1;
            req.en   = 1'b1;
            req.addr = b_q + addr_t'(widx_d);
            tgt_c    = RT_OPB_MUL;
            if (gnt) dcnt_d  = DC_W'(WDIG);
            else     state_d = S_MREQ;
          end
        end else begin
          dcnt_d = dcnt_q - 1'b1;
        end
      end

      // ---- store Work ----
      S_ST: begin
        req.en    = 1'b1;
        req.we    = 2'b11;
        req.addr  = d_q + addr_t'(widx_q);
        req.wdata = wdata;
        if (gnt) begin
          if (widx_q == LAST) state_d = S_IDLE;
          else                widx_d  = widx_q + 1'b1;
        end
      end

      // ---- addition, word by word ----
      S_ARA: begin
        req.en   = 1'b1;
        req.addr = a_q + addr_t'(widx_q);
        tgt_c    = RT_OPB_LOAD;
        if (gnt) state_d = S_ARB;
      end

      S_ARB: begin
        req.en   = 1'b1;
        req.addr = b_q + addr_t'(widx_q);
        tgt_c    = RT_OPB_XOR;
        if (gnt) state_d = S_AWR;
      end

      S_AWR: begin
        st_add    = 1'b1;
        req.en    = 1'b1;
        req.we    = 2'b11;
        req.addr  = d_q + addr_t'(widx_q);
        req.wdata = wdata;
        if (gnt) begin
          if (widx_q == LAST) begin
            state_d = S_IDLE;
          end else begin
            widx_d  = widx_q + 1'b1;
            state_d = S_ARA;
          end
        end
      end

      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      op_q     <= CMD_NOP;
      a_q      <= '0;
      b_q      <= '0;
      d_q      <= '0;
      widx_q   <= '0;
      dcnt_q   <= '0;
      rd_valid <= 1'b0;
      rd_tgt   <= RT_OPA;
      rd_idx   <= '0;
      rd_top   <= 1'b0;
    end else begin
      state_q  <= state_d;
      op_q     <= op_d;
      a_q      <= a_d;
      b_q      <= b_d;
      d_q      <= d_d;
      widx_q   <= widx_d;
      dcnt_q   <= dcnt_d;
      rd_valid <= req.en && (req.we == 2'b00) && gnt;
      rd_tgt   <= tgt_c;
      rd_idx   <= (state_q == S_MRUN) ? widx_d : widx_q;
      rd_top   <= top_c;
    end
  end

  // The arbiter grants only what was requested.
  a_gnt_needs_req: assert property (@(posedge clk) gnt |-> req.en)
    else $error("grant without request");

endmodule

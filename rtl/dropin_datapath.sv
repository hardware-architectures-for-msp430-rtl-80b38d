// dropin_datapath: the arithmetic registers of the drop-in accelerator.
//
// Three registers, as in the accelerator's datapath drawing:
//   OpA  (N bits)  first operand, filled word by word from RAM,
//   OpB  (W bits)  one bus word of the second operand; during a
//                  multiplication it is shifted out D bits per cycle,
//                  most significant first; during an addition it holds
//                  the running XOR of one word,
//   Work (N bits)  the result: cleared, updated by one digit-serial
//                  multiplication step (gf2m_digit_mul) or loaded in one
//                  cycle with OpA^2 (gf2m_squarer, optional).
// The finite-field addition is a W-bit XOR between OpB and the word that
// returns from RAM, so it needs neither OpA nor Work.
//
// The controlpath steers everything. A word read from RAM arrives on
// rdata with rd_valid one cycle after the read was granted and rd_tgt /
// rd_idx say where it goes; it is always taken in that cycle, so a read
// is never lost when the CPU takes the bus away. The multiplier digit is
// taken from the arriving word directly when a new OpB word arrives
// (rd_tgt = RT_OPB_MUL), otherwise from OpB, so loading OpB costs no
// multiplier cycle. The most significant word of an N-bit operand holds
// only N - (NW-1)*W bits; it is shifted up so that only
// TOP_DIG = ceil(those bits / D) digits need processing.
// wdata is the word to be stored: word st_idx of Work, or the addition
// result (st_add), including the XOR with a word arriving in this cycle.
//
// The register set, the digit-serial step and the squarer follow the
// accelerator's description; the word alignment of the top digit and the
// capture scheme are this design's own choices. All registers reset to 0.
module dropin_datapath
  import dropin_pkg::*;
#(
  parameter int unsigned  N           = 163,
  parameter int unsigned  D           = 2,
  parameter bit           HAS_SQUARER = 1'b1,
  parameter logic [N-1:0] POLY        = N'(8'hC9),
  localparam int unsigned W     = BUS_W,
  localparam int unsigned NW    = (N + W - 1) / W,
  localparam int unsigned IDX_W = (NW > 1) ? $clog2(NW) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // word returning from RAM
  input  logic             rd_valid,
  input  rd_tgt_e          rd_tgt,
  input  logic [IDX_W-1:0] rd_idx,
  input  logic             rd_top,     // the arriving word is the top word
  input  word_t            rdata,
  // Work update
  input  work_op_e         work_op,
  // word to store
  input  logic [IDX_W-1:0] st_idx,
  input  logic             st_add,
  output word_t            wdata
);

  localparam int unsigned TOPB      = N - (NW - 1) * W;
  localparam int unsigned TOP_DIG   = (TOPB + D - 1) / D;
  localparam int unsigned TOP_SHIFT = W - TOP_DIG * D;

  logic [N-1:0] opa_q, work_q, mul_next, sq_next;
  word_t        opb_q, opb_src, opb_in;
  logic [NW*W-1:0] work_pad;

  // Multiplier word: the top word of an operand is left-aligned.
  assign opb_in  = rd_top ? (rdata << TOP_SHIFT) : rdata;
  assign opb_src = (rd_valid && rd_tgt == RT_OPB_MUL) ? opb_in : opb_q;

  gf2m_digit_mul #(.N(N), .D(D), .POLY(POLY)) u_mul (
    .work      (work_q),
    .opa       (opa_q),
    .digit     (opb_src[W-1 -: D]),
    .work_next (mul_next)
  );

  if (HAS_SQUARER) begin : g_sq
    gf2m_squarer #(.N(N), .POLY(POLY)) u_sq (.a(opa_q), .y(sq_next));
  end else begin : g_nosq
    assign sq_next = work_q;   // no squaring unit: WK_SQUARE holds Work
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      opa_q  <= '0;
      opb_q  <= '0;
      work_q <= '0;
    end else begin
      if (rd_valid) begin
        unique case (rd_tgt)
          RT_OPA: begin
            for (int w = 0; w < int'(NW); w++) begin
              if (rd_idx == IDX_W'(w)) begin
                for (int b = 0; b < int'(W); b++) begin
                  if (w * int'(W) + b < int'(N)) opa_q[w*W+b] <= rdata[b];
                end
              end
            end
          end
          RT_OPB_LOAD: opb_q <= rdata;
          RT_OPB_XOR:  opb_q <= opb_q ^ rdata;
          RT_OPB_MUL:  opb_q <= opb_in;   // overridden below when stepping
        endcase
      end
      unique case (work_op)
        WK_HOLD:    ;
        WK_CLEAR:   work_q <= '0;
        WK_MULSTEP: begin
          work_q <= mul_next;
          opb_q  <= opb_src << D;
        end
        WK_SQUARE:  work_q <= sq_next;
      endcase
    end
  end

  assign work_pad = (NW*W)'(work_q);

  always_comb begin
    if (st_add)
      wdata = (rd_valid && rd_tgt == RT_OPB_XOR) ? (opb_q ^ rdata) : opb_q;
    else
      wdata = work_pad[st_idx*W +: W];
  end

  initial begin
    assert (W % D == 0) else $error("digit size D must divide the bus width");
    assert (D <= W) else $error("digit size D larger than the bus width");
  end

endmodule

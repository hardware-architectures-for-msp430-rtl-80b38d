// data_ram: single-port data memory of the sensor node, 16-bit words.
//
// Stands for the area-efficient single-port register-based RAM macro of
// the target technology (222 bytes = 111 words by default). One access
// per cycle: a read (en, we = 0) returns mem[addr] on rdata in the next
// cycle and rdata keeps it until the next read; a write stores the bytes
// selected by we at the clock edge. Addresses at or above DEPTH read 0
// and ignore writes. Contents are not reset. The read latency, byte
// enables and out-of-range behaviour are this design's own choices,
// matching a synchronous RAM macro.
module data_ram
  import dropin_pkg::*;
#(
  parameter int unsigned DEPTH = 111
) (
  input  logic     clk,
  input  mem_req_t req,
  output word_t    rdata
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  word_t          mem [DEPTH];
  logic           in_range;
  logic [AW-1:0]  idx;

  assign idx      = req.addr[AW-1:0];

  assign in_range = (int'(req.addr) < int'(DEPTH));

  always_ff @(posedge clk) begin
    if (req.en && in_range) begin
      if (req.we[0]) mem[idx][7:0]  <= req.wdata[7:0];
      if (req.we[1]) mem[idx][15:8] <= req.wdata[15:8];
    end
    if (req.en && req.we == 2'b00) rdata <= in_range ? mem[idx] : '0;
  end

endmodule

// hb_bram: true dual-port block RAM with byte write enables.
//
// Used for the four shared-memory structures the NIC reaches over PCIe:
// the rx and tx descriptor rings and the rx and tx packet buffers. Port A
// faces the PCIe side (through a BRAM controller), port B faces the rx/tx
// handler logic. Both ports are synchronous: a request with en=1 returns
// the word's previous contents on rdata in the next cycle (read-first) and
// writes the bytes selected by we. If both ports write the same byte in the
// same cycle, port B wins. The contents start at zero.
//
// DEPTH is the number of 256-bit words. The defaults of the instances follow
// the address map (512 KiB buffers, 4 KiB ring regions); the word width is
// the 256-bit data bus of the PCIe side.
module hb_bram
  import hb_pkg::*;
#(
  parameter int unsigned DEPTH = 16384
) (
  input  logic      clk,
  input  bram_req_t a_req,
  output data_t     a_rdata,
  input  bram_req_t b_req,
  output data_t     b_rdata
);
  localparam int unsigned AW = $clog2(DEPTH);

  data_t mem [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (a_req.en) begin
      a_rdata <= mem[a_req.addr[AW-1:0]];
      for (int b = 0; b < STRB_W; b++)
        if (a_req.we[b]) mem[a_req.addr[AW-1:0]][8*b +: 8] <= a_req.wdata[8*b +: 8];
    end
    if (b_req.en) begin
      b_rdata <= mem[b_req.addr[AW-1:0]];
      for (int b = 0; b < STRB_W; b++)
        if (b_req.we[b]) mem[b_req.addr[AW-1:0]][8*b +: 8] <= b_req.wdata[8*b +: 8];
    end
  end

endmodule

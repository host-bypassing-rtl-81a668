// hb_cfg_regs: configuration register behind the fifth BRAM controller.
//
// The host's FPGA driver writes, once, the physical base address of the NIC
// (its register BAR), the physical base address of the FPGA (its BAR) and
// the start command; these three fields are the design's. The register sits
// in region E and presents a block-RAM port, so it hangs off a BRAM
// controller like the four memories. Two enable bits for the optional
// mechanisms (tx descriptor writeback congestion control, tail pointer
// batching) are this design's addition, placed next to the start bit so the
// same driver write can set them.
//
// Layout of 256-bit word 0 (byte offsets in region E):
//   bytes  0..7   nic_base      bytes 8..15  fpga_base
//   byte  16      bit 0 start, bit 1 wb_en, bit 2 batch_en
// Other words read as zero and ignore writes. Byte enables are honoured.
// Read data appears one cycle after the request, like a BRAM. Reset clears
// every field, so the handlers stay idle until start is written.
module hb_cfg_regs
  import hb_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  bram_req_t req,
  output data_t     rdata,
  output cfg_t      cfg
);
  localparam int unsigned CFG_W = $bits(cfg_t);   // 131 bits, bytes 0..16

  logic [8*17-1:0] regs;

  assign cfg = cfg_t'(regs[CFG_W-1:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs  <= '0;
      rdata <= '0;
    end else if (req.en) begin
      rdata <= (req.addr == '0) ? data_t'({'0, regs[CFG_W-1:0]}) : '0;
      if (req.addr == '0)
        for (int b = 0; b < 17; b++)
          if (req.we[b]) regs[8*b +: 8] <= req.wdata[8*b +: 8];
    end
  end

endmodule

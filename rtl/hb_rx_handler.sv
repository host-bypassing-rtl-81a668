// hb_rx_handler: receive half of the FPGA-based NIC driver ("rx-handler").
//
// Connects the rx descriptor control (hb_rx_desc_ctrl) to the rx ring and the
// packet handler (hb_rx_pkt_handler) to the rx buffer, as two parts that hand
// over one packet at a time: the control finds a written-back descriptor, the
// packet handler streams the packet out on the AXI4-stream master, then the
// control re-arms the descriptor and issues an rx tail pointer update. The
// split into these two parts is the design's.
//
// Ports: BRAM port B of the rx ring and the rx buffer (read data one cycle
// after the request); the AXI4-stream toward the network function; the tail
// update (one-cycle pulse, value = new RDT) toward the delay module.
module hb_rx_handler
  import hb_pkg::*;
#(
  parameter int unsigned RING_N     = 64,
  parameter int unsigned SLOT_BYTES = 8192
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  addr_t       fpga_base,
  output bram_req_t   ring_req,
  input  data_t       ring_rdata,
  output bram_req_t   buf_req,
  input  data_t       buf_rdata,
  output logic        m_tvalid,
  input  logic        m_tready,
  output data_t       m_tdata,
  output strb_t       m_tkeep,
  output logic        m_tlast,
  output logic        tail_valid,
  output tail_upd_t   tail,
  output logic [31:0] rx_pkts
);
  logic                      pkt_req, pkt_done;
  logic [$clog2(RING_N)-1:0] pkt_slot;
  logic [15:0]               pkt_len;

  hb_rx_desc_ctrl #(.RING_N(RING_N), .SLOT_BYTES(SLOT_BYTES)) u_desc (
    .clk, .rst_n, .start, .fpga_base,
    .ring_req, .ring_rdata,
    .pkt_req, .pkt_slot, .pkt_len, .pkt_done,
    .tail_valid, .tail, .rx_pkts
  );

  hb_rx_pkt_handler #(.RING_N(RING_N), .SLOT_BYTES(SLOT_BYTES)) u_pkt (
    .clk, .rst_n,
    .req(pkt_req), .slot(pkt_slot), .len(pkt_len), .done(pkt_done),
    .buf_req, .buf_rdata,
    .m_tvalid, .m_tready, .m_tdata, .m_tkeep, .m_tlast
  );

endmodule

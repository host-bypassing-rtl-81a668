// hb_tx_handler: transmit half of the FPGA-based NIC driver ("tx-handler").
//
// Mirror of the rx-handler. The packet handler (hb_tx_pkt_handler) takes
// packets from the network function's AXI4-stream and stores them in the tx
// buffer; the descriptor control (hb_tx_desc_ctrl) then fills the tx ring
// entry and issues a tx tail pointer update so the NIC fetches and sends the
// packet. With wb_en the descriptor control also waits for the NIC's
// descriptor writeback before reusing a slot (congestion control), which
// back-pressures the stream.
//
// Ports: BRAM port B of the tx ring (read data one cycle after the request)
// and of the tx buffer (written only); the AXI4-stream slave; the tail update
// (one-cycle pulse, value = new TDT) toward the delay module.
module hb_tx_handler
  import hb_pkg::*;
#(
  parameter int unsigned RING_N     = 64,
  parameter int unsigned SLOT_BYTES = 8192
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        wb_en,
  input  addr_t       fpga_base,
  output bram_req_t   ring_req,
  input  data_t       ring_rdata,
  output bram_req_t   buf_req,
  input  logic        s_tvalid,
  output logic        s_tready,
  input  data_t       s_tdata,
  input  strb_t       s_tkeep,
  input  logic        s_tlast,
  output logic        tail_valid,
  output tail_upd_t   tail,
  output logic [31:0] tx_pkts,
  output logic [31:0] wb_stalls,
  output logic [31:0] trunc_beats
);
  localparam int unsigned IW = $clog2(RING_N);

  logic          slot_ok, post_valid, post_ack;
  logic [IW-1:0] slot, post_slot;
  logic [15:0]   post_len;

  hb_tx_pkt_handler #(.RING_N(RING_N), .SLOT_BYTES(SLOT_BYTES)) u_pkt (
    .clk, .rst_n,
    .slot_ok, .slot, .post_valid, .post_slot, .post_len, .post_ack,
    .buf_req,
    .s_tvalid, .s_tready, .s_tdata, .s_tkeep, .s_tlast,
    .trunc_beats
  );

  hb_tx_desc_ctrl #(.RING_N(RING_N), .SLOT_BYTES(SLOT_BYTES)) u_desc (
    .clk, .rst_n, .start, .wb_en, .fpga_base,
    .ring_req, .ring_rdata,
    .slot_ok, .slot, .post_valid, .post_slot, .post_len, .post_ack,
    .tail_valid, .tail, .tx_pkts, .wb_stalls
  );

endmodule

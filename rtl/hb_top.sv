// hb_top: FPGA design for host bypassing, a NIC driver in hardware.
//
// A commodity poll-mode NIC normally exchanges packets with a software driver
// through descriptor rings and packet buffers in host DRAM. Here those rings
// and buffers live inside the FPGA instead, mapped into the FPGA's PCIe BAR,
// and hardware plays the driver: the NIC moves packets straight into and out
// of the FPGA by PCIe peer-to-peer DMA, with no copy through host memory and
// no CPU in the data path.
//
// Structure (the design's block diagram):
//   PCIe core (outside) --AXI4 s_*--> hb_axi_xbar --> 5 x hb_axi_bram_ctrl
//       A rx buffer, B tx buffer, C rx ring, D tx ring (hb_bram, port A)
//       E configuration register (hb_cfg_regs)
//   hb_rx_handler: rx ring + rx buffer (port B) --> AXI4-stream m_rx_*
//   hb_tx_handler: AXI4-stream s_tx_* --> tx buffer + tx ring (port B)
//   rx/tx tail updates --> hb_tail_delay (x2, optional batching)
//       --> hb_dw_arbiter --> hb_dw_convert --AXI4 write m_dw_*--> PCIe core
// The network function sits outside, between m_rx_* and s_tx_*. Every
// interface runs on one clock, the 250 MHz AXI clock of the PCIe core.
//
// Operation: the host writes the configuration register (NIC and FPGA
// physical base addresses, start, and the two optional-mechanism enables);
// after start both handlers run on their own. The address map, the 256-bit
// bus and the 64-entry rings follow the design; the 8 KiB slot per
// descriptor (512 KiB buffer / 64) and the Intel-82599-style descriptors and
// register offsets are this implementation's choices.
module hb_top
  import hb_pkg::*;
#(
  parameter int unsigned RING_N        = 64,
  parameter int unsigned SLOT_BYTES    = BUF_BYTES / RING_N,
  parameter int unsigned BATCH         = 8,
  parameter int unsigned TIMEOUT       = 625
) (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4 slave: NIC DMA into the FPGA BAR (from the PCIe core)
  input  logic        s_aw_valid,
  output logic        s_aw_ready,
  input  axi_ax_t     s_aw,
  input  logic        s_w_valid,
  output logic        s_w_ready,
  input  axi_w_t      s_w,
  output logic        s_b_valid,
  input  logic        s_b_ready,
  output axi_b_t      s_b,
  input  logic        s_ar_valid,
  output logic        s_ar_ready,
  input  axi_ax_t     s_ar,
  output logic        s_r_valid,
  input  logic        s_r_ready,
  output axi_r_t      s_r,
  // AXI4 master, write only: tail pointer writes to the NIC (to the PCIe core)
  output logic        m_dw_aw_valid,
  input  logic        m_dw_aw_ready,
  output axi_ax_t     m_dw_aw,
  output logic        m_dw_w_valid,
  input  logic        m_dw_w_ready,
  output axi_w_t      m_dw_w,
  input  logic        m_dw_b_valid,
  output logic        m_dw_b_ready,
  input  axi_b_t      m_dw_b,
  // AXI4-stream of received packets, to the network function
  output logic        m_rx_tvalid,
  input  logic        m_rx_tready,
  output data_t       m_rx_tdata,
  output strb_t       m_rx_tkeep,
  output logic        m_rx_tlast,
  // AXI4-stream of packets to send, from the network function
  input  logic        s_tx_tvalid,
  output logic        s_tx_tready,
  input  data_t       s_tx_tdata,
  input  strb_t       s_tx_tkeep,
  input  logic        s_tx_tlast,
  // status counters
  output logic [31:0] rx_pkts,
  output logic [31:0] tx_pkts,
  output logic [31:0] wb_stalls,
  output logic [31:0] tx_trunc_beats,
  output logic [31:0] tail_writes,
  output logic [31:0] tail_write_errors,
  output logic [31:0] batch_flush_count  [2],
  output logic [31:0] batch_flush_timeout[2]
);
  localparam int unsigned BUF_DEPTH  = BUF_BYTES / STRB_W;
  localparam int unsigned RING_DEPTH = RING_BYTES / STRB_W;

  // ------------------------------------------------------------ interconnect
  logic    x_aw_valid [N_REGIONS], x_aw_ready [N_REGIONS];
  axi_ax_t x_aw       [N_REGIONS];
  logic    x_w_valid  [N_REGIONS], x_w_ready  [N_REGIONS];
  axi_w_t  x_w        [N_REGIONS];
  logic    x_b_valid  [N_REGIONS], x_b_ready  [N_REGIONS];
  axi_b_t  x_b        [N_REGIONS];
  logic    x_ar_valid [N_REGIONS], x_ar_ready [N_REGIONS];
  axi_ax_t x_ar       [N_REGIONS];
  logic    x_r_valid  [N_REGIONS], x_r_ready  [N_REGIONS];
  axi_r_t  x_r        [N_REGIONS];

  hb_axi_xbar u_xbar (
    .clk, .rst_n,
    .s_aw_valid, .s_aw_ready, .s_aw, .s_w_valid, .s_w_ready, .s_w,
    .s_b_valid, .s_b_ready, .s_b, .s_ar_valid, .s_ar_ready, .s_ar,
    .s_r_valid, .s_r_ready, .s_r,
    .m_aw_valid(x_aw_valid), .m_aw_ready(x_aw_ready), .m_aw(x_aw),
    .m_w_valid(x_w_valid),   .m_w_ready(x_w_ready),   .m_w(x_w),
    .m_b_valid(x_b_valid),   .m_b_ready(x_b_ready),   .m_b(x_b),
    .m_ar_valid(x_ar_valid), .m_ar_ready(x_ar_ready), .m_ar(x_ar),
    .m_r_valid(x_r_valid),   .m_r_ready(x_r_ready),   .m_r(x_r)
  );

  // ------------------------------------------------------------ BRAM controllers
  bram_req_t a_req   [N_REGIONS];
  data_t     a_rdata [N_REGIONS];

  for (genvar g = 0; g < N_REGIONS; g++) begin : g_ctrl
    localparam int unsigned OFF_W =
      (g == int'(REG_RXBUF) || g == int'(REG_TXBUF)) ? $clog2(BUF_BYTES) : $clog2(RING_BYTES);
    hb_axi_bram_ctrl #(.OFF_W(OFF_W)) u_ctrl (
      .clk, .rst_n,
      .aw_valid(x_aw_valid[g]), .aw_ready(x_aw_ready[g]), .aw(x_aw[g]),
      .w_valid(x_w_valid[g]),   .w_ready(x_w_ready[g]),   .w(x_w[g]),
      .b_valid(x_b_valid[g]),   .b_ready(x_b_ready[g]),   .b(x_b[g]),
      .ar_valid(x_ar_valid[g]), .ar_ready(x_ar_ready[g]), .ar(x_ar[g]),
      .r_valid(x_r_valid[g]),   .r_ready(x_r_ready[g]),   .r(x_r[g]),
      .bram_req(a_req[g]), .bram_rdata(a_rdata[g])
    );
  end

  // ------------------------------------------------------------ memories
  bram_req_t rxbuf_b_req, txbuf_b_req, rxring_b_req, txring_b_req;
  data_t     rxbuf_b_rdata, txbuf_b_rdata, rxring_b_rdata, txring_b_rdata;

  hb_bram #(.DEPTH(BUF_DEPTH)) u_rx_buffer (
    .clk, .a_req(a_req[REG_RXBUF]), .a_rdata(a_rdata[REG_RXBUF]),
    .b_req(rxbuf_b_req), .b_rdata(rxbuf_b_rdata));
  hb_bram #(.DEPTH(BUF_DEPTH)) u_tx_buffer (
    .clk, .a_req(a_req[REG_TXBUF]), .a_rdata(a_rdata[REG_TXBUF]),
    .b_req(txbuf_b_req), .b_rdata(txbuf_b_rdata));
  hb_bram #(.DEPTH(RING_DEPTH)) u_rx_ring (
    .clk, .a_req(a_req[REG_RXRING]), .a_rdata(a_rdata[REG_RXRING]),
    .b_req(rxring_b_req), .b_rdata(rxring_b_rdata));
  hb_bram #(.DEPTH(RING_DEPTH)) u_tx_ring (
    .clk, .a_req(a_req[REG_TXRING]), .a_rdata(a_rdata[REG_TXRING]),
    .b_req(txring_b_req), .b_rdata(txring_b_rdata));

  cfg_t cfg;
  hb_cfg_regs u_cfg (
    .clk, .rst_n, .req(a_req[REG_CFG]), .rdata(a_rdata[REG_CFG]), .cfg);

  // ------------------------------------------------------------ handlers
  logic      rx_tail_valid, tx_tail_valid;
  tail_upd_t rx_tail, tx_tail;

  hb_rx_handler #(.RING_N(RING_N), .SLOT_BYTES(SLOT_BYTES)) u_rx (
    .clk, .rst_n, .start(cfg.start), .fpga_base(cfg.fpga_base),
    .ring_req(rxring_b_req), .ring_rdata(rxring_b_rdata),
    .buf_req(rxbuf_b_req), .buf_rdata(rxbuf_b_rdata),
    .m_tvalid(m_rx_tvalid), .m_tready(m_rx_tready), .m_tdata(m_rx_tdata),
    .m_tkeep(m_rx_tkeep), .m_tlast(m_rx_tlast),
    .tail_valid(rx_tail_valid), .tail(rx_tail), .rx_pkts
  );

  hb_tx_handler #(.RING_N(RING_N), .SLOT_BYTES(SLOT_BYTES)) u_tx (
    .clk, .rst_n, .start(cfg.start), .wb_en(cfg.wb_en), .fpga_base(cfg.fpga_base),
    .ring_req(txring_b_req), .ring_rdata(txring_b_rdata),
    .buf_req(txbuf_b_req),
    .s_tvalid(s_tx_tvalid), .s_tready(s_tx_tready), .s_tdata(s_tx_tdata),
    .s_tkeep(s_tx_tkeep), .s_tlast(s_tx_tlast),
    .tail_valid(tx_tail_valid), .tail(tx_tail), .tx_pkts, .wb_stalls,
    .trunc_beats(tx_trunc_beats)
  );

  // ------------------------------------------------------------ direct-write path
  logic      d_valid [2], d_ready [2];
  tail_upd_t d_upd   [2];

  hb_tail_delay #(.BATCH(BATCH), .TIMEOUT(TIMEOUT)) u_rx_delay (
    .clk, .rst_n, .batch_en(cfg.batch_en),
    .in_valid(rx_tail_valid), .in(rx_tail),
    .out_valid(d_valid[0]), .out_ready(d_ready[0]), .out(d_upd[0]),
    .flushes_count(batch_flush_count[0]), .flushes_timeout(batch_flush_timeout[0]));
  hb_tail_delay #(.BATCH(BATCH), .TIMEOUT(TIMEOUT)) u_tx_delay (
    .clk, .rst_n, .batch_en(cfg.batch_en),
    .in_valid(tx_tail_valid), .in(tx_tail),
    .out_valid(d_valid[1]), .out_ready(d_ready[1]), .out(d_upd[1]),
    .flushes_count(batch_flush_count[1]), .flushes_timeout(batch_flush_timeout[1]));

  logic      m_valid, m_ready;
  tail_upd_t m_upd;

  hb_dw_arbiter u_dw_mux (
    .clk, .rst_n, .in_valid(d_valid), .in_ready(d_ready), .in(d_upd),
    .out_valid(m_valid), .out_ready(m_ready), .out(m_upd));

  hb_dw_convert u_convert (
    .clk, .rst_n, .nic_base(cfg.nic_base),
    .in_valid(m_valid), .in_ready(m_ready), .in(m_upd),
    .aw_valid(m_dw_aw_valid), .aw_ready(m_dw_aw_ready), .aw(m_dw_aw),
    .w_valid(m_dw_w_valid),   .w_ready(m_dw_w_ready),   .w(m_dw_w),
    .b_valid(m_dw_b_valid),   .b_ready(m_dw_b_ready),   .b(m_dw_b),
    .writes(tail_writes), .err_count(tail_write_errors));

endmodule

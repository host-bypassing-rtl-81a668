// hb_wl_env: one host-bypassing FPGA (hb_top) with its NIC model and an
// identity network function that never stalls, for workload runs.
//
// run() resets the pair, configures the FPGA as the driver would, lets npkt
// packets of len bytes arrive at the NIC every gap cycles, waits until all
// of them have been sent back out, and reports: whether every packet came
// back intact and in order, the rx and tx tail pointer writes made during the
// run (the start-up rx tail write excluded), the batch flushes by count and
// by timeout, the mean and largest latency from arrival at the NIC to the
// NIC having fetched the packet for sending (cycles), and the largest number
// of arrived packets the NIC had waiting.
module hb_wl_env
  import hb_pkg::*;
#(
  parameter int unsigned BATCH   = 8,
  parameter int unsigned TIMEOUT = 625
) (
  input logic clk
);
  logic rst_n = 1'b0;

  logic    s_aw_valid, s_aw_ready, s_w_valid, s_w_ready, s_b_valid, s_b_ready;
  logic    s_ar_valid, s_ar_ready, s_r_valid, s_r_ready;
  axi_ax_t s_aw, s_ar;
  axi_w_t  s_w;
  axi_b_t  s_b;
  axi_r_t  s_r;
  logic    m_dw_aw_valid, m_dw_aw_ready, m_dw_w_valid, m_dw_w_ready, m_dw_b_valid, m_dw_b_ready;
  axi_ax_t m_dw_aw;
  axi_w_t  m_dw_w;
  axi_b_t  m_dw_b;
  logic    st_tvalid, st_tready, st_tlast;
  data_t   st_tdata;
  strb_t   st_tkeep;
  logic [31:0] rx_pkts, tx_pkts, wb_stalls, tx_trunc_beats, tail_writes, tail_write_errors;
  logic [31:0] fl_cnt [2], fl_to [2];

  hb_top #(.BATCH(BATCH), .TIMEOUT(TIMEOUT)) dut (
    .clk, .rst_n,
    .s_aw_valid, .s_aw_ready, .s_aw, .s_w_valid, .s_w_ready, .s_w,
    .s_b_valid, .s_b_ready, .s_b, .s_ar_valid, .s_ar_ready, .s_ar,
    .s_r_valid, .s_r_ready, .s_r,
    .m_dw_aw_valid, .m_dw_aw_ready, .m_dw_aw, .m_dw_w_valid, .m_dw_w_ready, .m_dw_w,
    .m_dw_b_valid, .m_dw_b_ready, .m_dw_b,
    .m_rx_tvalid(st_tvalid), .m_rx_tready(st_tready), .m_rx_tdata(st_tdata),
    .m_rx_tkeep(st_tkeep), .m_rx_tlast(st_tlast),
    .s_tx_tvalid(st_tvalid), .s_tx_tready(st_tready), .s_tx_tdata(st_tdata),
    .s_tx_tkeep(st_tkeep), .s_tx_tlast(st_tlast),
    .rx_pkts, .tx_pkts, .wb_stalls, .tx_trunc_beats, .tail_writes, .tail_write_errors,
    .batch_flush_count(fl_cnt), .batch_flush_timeout(fl_to));

  hb_nic_model nic (.clk, .rst_n,
    .aw_valid(s_aw_valid), .aw_ready(s_aw_ready), .aw(s_aw), .w_valid(s_w_valid),
    .w_ready(s_w_ready), .w(s_w), .b_valid(s_b_valid), .b_ready(s_b_ready), .b(s_b),
    .ar_valid(s_ar_valid), .ar_ready(s_ar_ready), .ar(s_ar), .r_valid(s_r_valid),
    .r_ready(s_r_ready), .r(s_r),
    .dw_aw_valid(m_dw_aw_valid), .dw_aw_ready(m_dw_aw_ready), .dw_aw(m_dw_aw),
    .dw_w_valid(m_dw_w_valid), .dw_w_ready(m_dw_w_ready), .dw_w(m_dw_w),
    .dw_b_valid(m_dw_b_valid), .dw_b_ready(m_dw_b_ready), .dw_b(m_dw_b));

  typedef byte unsigned pkt_t[$];

  task automatic run(input int npkt, input int len, input int gap, input logic wb,
                     input logic batch, output logic intact, output int rx_tw,
                     output int tx_tw, output int flc, output int flt,
                     output real lat_mean, output longint lat_max, output int backlog);
    pkt_t   exp_q[$];
    data_t  d;
    strb_t  s;
    longint t0, sum;
    int     w;
    // reset FPGA and NIC state
    nic.running = 1'b0;
    @(negedge clk); rst_n = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    nic.rx_head = 0; nic.tx_head = 0; nic.rdt = -1; nic.tdt = 0;
    nic.rdt_writes = 0; nic.tdt_writes = 0; nic.tx_gap = 0;
    nic.tx_q = {}; nic.rx_arr_log = {}; nic.tx_time = {};
    // driver: base addresses, then start with the chosen mechanisms
    d = '0; s = '0;
    d[63:0] = nic.nic_base; d[127:64] = nic.fpga_base; s[15:0] = '1;
    nic.host_wr(addr_t'(CFG_BASE), d, s);
    d = '0; s = '0;
    d[130:128] = {batch, wb, 1'b1}; s[16] = 1'b1;
    nic.host_wr(addr_t'(CFG_BASE), d, s);
    nic.running = 1'b1;
    w = 0;
    while (nic.rdt_writes == 0 && w < 10000) begin @(negedge clk); w++; end
    // traffic
    t0 = nic.cyc + 10;
    for (int k = 0; k < npkt; k++) begin
      pkt_t p;
      p = {};
      for (int j = 0; j < len; j++) p.push_back(8'($urandom));
      p[0] = 8'(k); p[1] = 8'(k >> 8);
      nic.rx_q.push_back(p);
      nic.rx_at.push_back(t0 + longint'(k) * gap);
      exp_q.push_back(p);
    end
    nic.rx_backlog_max = 0;
    w = 0;
    while (nic.tx_q.size() < npkt && w < 2000000) begin @(negedge clk); w++; end
    repeat (TIMEOUT + 50) @(negedge clk);   // let the last held tail writes out
    intact = (nic.tx_q.size() == npkt);
    for (int k = 0; k < npkt && intact; k++) begin
      pkt_t g, e;
      g = nic.tx_q[k];
      e = exp_q[k];
      if (g != e) intact = 1'b0;
    end
    rx_tw  = nic.rdt_writes - 1;
    tx_tw  = nic.tdt_writes;
    flc    = int'(fl_cnt[0] + fl_cnt[1]);
    flt    = int'(fl_to[0] + fl_to[1]);
    sum = 0; lat_max = 0;
    for (int k = 0; k < npkt && k < nic.tx_time.size() && k < nic.rx_arr_log.size(); k++) begin
      longint l = nic.tx_time[k] - nic.rx_arr_log[k];
      sum += l;
      if (l > lat_max) lat_max = l;
    end
    lat_mean = real'(sum) / real'(npkt);
    backlog  = nic.rx_backlog_max;
  endtask
endmodule

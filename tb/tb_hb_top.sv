// tb_hb_top: end-to-end test of the host-bypassing FPGA design at its default
// parameters (64-entry rings, 512 KiB buffers, batch 8 / 625 cycles).
//
// A NIC model (hb_nic_model) DMAs received packets into the FPGA and sends the
// packets the FPGA posts; the network function between the two streams is an
// identity loopback with random stalls. The host writes the configuration
// register through the same AXI4 port, as the FPGA driver would. Every packet
// injected must come back out of the NIC unchanged and in order.
//   Phase 1: no batching, no writeback, fast NIC (one tail write per packet).
//   Phase 2: batching and writeback on, NIC sending slowly, so the tx ring
//            fills, the handler waits for writebacks and back-pressures the
//            stream, and tail writes are batched (by count, and by timeout
//            for the last few packets).
// Each mechanism is counted and must have happened at least once.
module tb_hb_top;
  import hb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #2 clk = ~clk;    // 250 MHz

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
  logic    rx_tvalid, rx_tready, rx_tlast, tx_tvalid, tx_tready;
  data_t   rx_tdata;
  strb_t   rx_tkeep;
  logic [31:0] rx_pkts, tx_pkts, wb_stalls, tx_trunc_beats, tail_writes, tail_write_errors;
  logic [31:0] fl_cnt [2], fl_to [2];
  int checks = 0, failures = 0;

  hb_top dut (
    .clk, .rst_n,
    .s_aw_valid, .s_aw_ready, .s_aw, .s_w_valid, .s_w_ready, .s_w,
    .s_b_valid, .s_b_ready, .s_b, .s_ar_valid, .s_ar_ready, .s_ar,
    .s_r_valid, .s_r_ready, .s_r,
    .m_dw_aw_valid, .m_dw_aw_ready, .m_dw_aw, .m_dw_w_valid, .m_dw_w_ready, .m_dw_w,
    .m_dw_b_valid, .m_dw_b_ready, .m_dw_b,
    .m_rx_tvalid(rx_tvalid), .m_rx_tready(rx_tready), .m_rx_tdata(rx_tdata),
    .m_rx_tkeep(rx_tkeep), .m_rx_tlast(rx_tlast),
    .s_tx_tvalid(tx_tvalid), .s_tx_tready(tx_tready), .s_tx_tdata(rx_tdata),
    .s_tx_tkeep(rx_tkeep), .s_tx_tlast(rx_tlast),
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

  // identity network function with random stalls
  logic gate;
  always @(posedge clk) gate <= ($urandom_range(4) != 0);
  assign tx_tvalid = rx_tvalid && gate;
  assign rx_tready = tx_tready && gate;

  // mechanism counters
  int stream_stalls = 0, fx_stalls = 0;
  always @(posedge clk) if (rst_n) begin
    if (rx_tvalid && gate && !tx_tready) stream_stalls++;
    if (rx_tvalid && !gate) fx_stalls++;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  typedef byte unsigned pkt_t[$];
  pkt_t exp_q[$];

  task automatic configure(input logic wb, input logic batch);
    data_t d = '0;
    strb_t s = '0;
    d[63:0]   = nic.nic_base;
    d[127:64] = nic.fpga_base;
    s[15:0]   = '1;
    nic.host_wr(addr_t'(CFG_BASE), d, s);          // base addresses
    d = '0; s = '0;
    d[130:128] = {batch, wb, 1'b1};
    s[16] = 1'b1;
    nic.host_wr(addr_t'(CFG_BASE), d, s);          // start command
  endtask

  task automatic run_phase(input int npkt, input string name);
    int t0;
    for (int k = 0; k < npkt; k++) begin
      pkt_t p;
      int len;
      p = {};
      len = (k % 5 == 0) ? 300 : (k % 5 == 1) ? 1514 : (k % 5 == 2) ? 64 : $urandom_range(60, 1514);
      for (int j = 0; j < len; j++) p.push_back(8'($urandom));
      p[0] = 8'(k);
      nic.rx_q.push_back(p);
      exp_q.push_back(p);
    end
    t0 = 0;
    while (nic.tx_q.size() < npkt && t0 < 400000) begin @(negedge clk); t0++; end
    check(nic.tx_q.size() == npkt, $sformatf("%s: %0d of %0d packets sent", name, nic.tx_q.size(), npkt));
    for (int k = 0; k < npkt && nic.tx_q.size() > 0; k++) begin
      pkt_t g, e;
      g = nic.tx_q.pop_front();
      e = exp_q.pop_front();
      check(g == e, $sformatf("%s: packet %0d intact and in order", name, k));
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p1_writes;
    logic [1:0] resp;
    data_t rd[$];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // an access outside the address map is refused
    nic.bfm.rd_burst(64'h0010_3000, 1, rd, resp);
    check(resp == RESP_DECERR, "unmapped BAR address gets DECERR");

    // ---------------- phase 1
    configure(1'b0, 1'b0);
    nic.running = 1'b1;
    run_phase(150, "phase 1");
    repeat (50) @(negedge clk);
    check(rx_pkts == 150 && tx_pkts == 150, "phase 1 handler counters");
    check(nic.rdt_writes == 151 && nic.tdt_writes == 150,
          $sformatf("phase 1 one tail write per packet (%0d rx, %0d tx)", nic.rdt_writes, nic.tdt_writes));
    check(tail_writes == 301 && tail_write_errors == 0, "phase 1 direct writes");
    check(nic.rs_seen == 0 && wb_stalls == 0, "phase 1 no writeback");
    check(nic.bad_dw == 0, "direct writes well formed");
    p1_writes = nic.rdt_writes + nic.tdt_writes;

    // ---------------- phase 2
    nic.running = 1'b0;
    @(negedge clk); rst_n = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    nic.rx_head = 0; nic.tx_head = 0; nic.rdt = -1; nic.tdt = 0;
    nic.rdt_writes = 0; nic.tdt_writes = 0;
    configure(1'b1, 1'b1);
    nic.tx_gap = 1500;
    nic.running = 1'b1;
    run_phase(150, "phase 2");
    repeat (50) @(negedge clk);
    check(rx_pkts == 150 && tx_pkts == 150, "phase 2 handler counters");
    check(nic.rs_seen == 150, "phase 2 every tx descriptor asks for writeback");
    check(nic.tdt_writes < 150, $sformatf("phase 2 tx tail writes batched (%0d)", nic.tdt_writes));
    check(nic.rdt_writes < 150, $sformatf("phase 2 rx tail writes batched (%0d)", nic.rdt_writes));
    check(nic.bad_dw == 0, "direct writes well formed");

    // ---------------- mechanisms
    $display("mechanisms: rx pkts %0d, tx pkts %0d, ring wraps rx/tx %0d/%0d, tail writes p1 %0d",
             300, 300, 300 / 64, 300 / 64, p1_writes);
    $display("            writeback stall cycles %0d, stream back pressure %0d, f_x stalls %0d",
             wb_stalls, stream_stalls, fx_stalls);
    $display("            batch flushes by count rx/tx %0d/%0d, by timeout rx/tx %0d/%0d",
             fl_cnt[0], fl_cnt[1], fl_to[0], fl_to[1]);
    check(wb_stalls > 0, "writeback congestion control stalled the tx handler");
    check(stream_stalls > 0, "tx handler back-pressured the stream");
    check(fx_stalls > 0, "network function stalls happened");
    check(fl_cnt[0] + fl_cnt[1] > 0, "batch flush by packet count happened");
    check(fl_to[0] + fl_to[1] > 0, "batch flush by timeout happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

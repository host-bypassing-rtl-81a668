// hb_nic_model: behavioural model of a commodity poll-mode NIC, as seen from
// the FPGA (testbench only, not synthesizable).
//
// It masters the FPGA's BAR through an AXI4 master model (PCIe DMA reads and
// writes) and receives the FPGA's direct register writes on an AXI4 write
// slave. Register offsets NIC_RDT_OFF / NIC_TDT_OFF relative to nic_base set
// the rx and tx tail pointers. One process serves both directions:
//   rx: while a packet is queued in rx_q and rx_head != RDT, read descriptor
//       rx_head, DMA the packet to its buffer address, write the descriptor
//       back (length, DD, EOP; address field cleared), advance rx_head.
//   tx: while tx_head != TDT and at most once every tx_gap cycles, read
//       descriptor tx_head, DMA the packet out of the tx buffer into tx_q,
//       write DD back if RS is set, advance tx_head.
// Optional timing: if rx_at holds an arrival cycle for each queued packet, a
// packet is taken only once its arrival cycle is reached. Arrival cycles of
// received packets (rx_arr_log) and the cycles at which packets were sent
// (tx_time) are logged for latency measurements; rx_backlog_max is the
// largest number of arrived packets the NIC had to hold.
// Physical addresses are turned into BAR offsets by subtracting fpga_base.
// host_wr lets the host driver write the configuration register.
module hb_nic_model
  import hb_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // AXI4 master into the FPGA BAR
  output logic    aw_valid,
  input  logic    aw_ready,
  output axi_ax_t aw,
  output logic    w_valid,
  input  logic    w_ready,
  output axi_w_t  w,
  input  logic    b_valid,
  output logic    b_ready,
  input  axi_b_t  b,
  output logic    ar_valid,
  input  logic    ar_ready,
  output axi_ax_t ar,
  input  logic    r_valid,
  output logic    r_ready,
  input  axi_r_t  r,
  // AXI4 write slave for direct register writes from the FPGA
  input  logic    dw_aw_valid,
  output logic    dw_aw_ready,
  input  axi_ax_t dw_aw,
  input  logic    dw_w_valid,
  output logic    dw_w_ready,
  input  axi_w_t  dw_w,
  output logic    dw_b_valid,
  input  logic    dw_b_ready,
  output axi_b_t  dw_b
);
  typedef byte unsigned pkt_t[$];

  addr_t nic_base  = 64'h0000_00f0_0000_0000;
  addr_t fpga_base = 64'h0000_0038_0000_0000;
  int    tx_gap    = 0;
  int    ring_n    = 64;
  pkt_t  rx_q[$];            // packets arriving from the wire
  pkt_t  tx_q[$];            // packets sent to the wire
  longint rx_at[$];          // optional arrival cycle per queued packet
  longint rx_arr_log[$], tx_time[$];
  longint cyc = 0;
  int    rx_backlog_max = 0;
  int    rdt = -1, tdt = 0;  // tail pointers as written by the FPGA
  int    rx_head = 0, tx_head = 0;
  int    rdt_writes = 0, tdt_writes = 0, bad_dw = 0, rs_seen = 0;
  logic  running = 1'b0;

  hb_axi_master_bfm bfm (.clk, .aw_valid, .aw_ready, .aw, .w_valid, .w_ready, .w,
    .b_valid, .b_ready, .b, .ar_valid, .ar_ready, .ar, .r_valid, .r_ready, .r);

  // ---------------------------------------------------------------- register writes
  axi_ax_t cap_aw;
  axi_w_t  cap_w;
  logic    have_aw = 1'b0, have_w = 1'b0;
  assign dw_aw_ready = !have_aw && !dw_b_valid;
  assign dw_w_ready  = !have_w && !dw_b_valid;
  always @(posedge clk) begin
    if (!rst_n) begin
      have_aw <= 1'b0; have_w <= 1'b0; dw_b_valid <= 1'b0; dw_b <= '0;
    end else begin
      if (dw_aw_valid && dw_aw_ready) begin cap_aw <= dw_aw; have_aw <= 1'b1; end
      if (dw_w_valid && dw_w_ready)   begin cap_w  <= dw_w;  have_w  <= 1'b1; end
      if (have_aw && have_w) begin
        automatic addr_t off = cap_aw.addr - nic_base;
        automatic int    lane = int'(cap_aw.addr[4:0]);
        automatic int    v = int'(cap_w.data[8*lane +: 32]);
        if (cap_aw.len != 0 || cap_aw.size != 2 || cap_w.strb != (strb_t'(32'hf) << lane))
          bad_dw++;
        if (off == addr_t'(NIC_RDT_OFF)) begin rdt = v; rdt_writes++; end
        else if (off == addr_t'(NIC_TDT_OFF)) begin tdt = v; tdt_writes++; end
        else bad_dw++;
        have_aw <= 1'b0; have_w <= 1'b0;
        dw_b_valid <= 1'b1; dw_b <= '{id: cap_aw.id, resp: RESP_OKAY};
      end
      if (dw_b_valid && dw_b_ready) dw_b_valid <= 1'b0;
    end
  end

  // ---------------------------------------------------------------- helpers
  task automatic host_wr(input addr_t bar_off, input data_t d, input strb_t s);
    logic [1:0] resp;
    data_t wd[$];
    strb_t ws[$];
    wd = {d}; ws = {s};
    bfm.wr_burst(bar_off, wd, ws, 3'd5, resp);
  endtask

  task automatic rd_desc(input addr_t ring_off, input int i, output desc_t d);
    data_t rd[$];
    logic [1:0] resp;
    bfm.rd_burst(ring_off + addr_t'((i / 2) * 32), 1, rd, resp);
    d = (i % 2) ? rd[0][255:128] : rd[0][127:0];
  endtask

  task automatic wr_desc(input addr_t ring_off, input int i, input desc_t d);
    logic [1:0] resp;
    data_t wd[$];
    strb_t ws[$];
    wd = {{d, d}};
    ws = {(i % 2) ? {16'hffff, 16'h0} : {16'h0, 16'hffff}};
    bfm.wr_burst(ring_off + addr_t'((i / 2) * 32), wd, ws, 3'd5, resp);
  endtask

  task automatic do_rx();
    desc_t d;
    pkt_t  p;
    addr_t off;
    int    len, words;
    data_t wd[$];
    strb_t ws[$];
    logic [1:0] resp;
    p = rx_q.pop_front();
    if (rx_at.size() > 0) rx_arr_log.push_back(rx_at.pop_front());
    len = p.size();
    rd_desc(addr_t'(RXRING_BASE), rx_head, d);
    off = d[63:0] - fpga_base;
    words = (len + 31) / 32;
    wd = {}; ws = {};
    for (int wi = 0; wi < words; wi++) begin
      data_t x = '0;
      strb_t s = '0;
      for (int j = 0; j < 32; j++) if (wi * 32 + j < len) begin
        x[8*j +: 8] = p[wi * 32 + j]; s[j] = 1'b1;
      end
      wd.push_back(x); ws.push_back(s);
    end
    bfm.wr_burst(off, wd, ws, 3'd5, resp);
    d = '0;
    d[RXD_LEN_LSB +: 16] = 16'(len);
    d[RXD_DD_BIT] = 1'b1;
    d[RXD_EOP_BIT] = 1'b1;
    wr_desc(addr_t'(RXRING_BASE), rx_head, d);
    rx_head = (rx_head + 1) % ring_n;
  endtask

  task automatic do_tx();
    desc_t d;
    pkt_t  p;
    addr_t off;
    int    len;
    data_t rd[$];
    logic [1:0] resp;
    rd_desc(addr_t'(TXRING_BASE), tx_head, d);
    off = d[63:0] - fpga_base;
    len = int'(d[TXD_LEN_LSB +: 16]);
    bfm.rd_burst(off, (len + 31) / 32, rd, resp);
    p = {};
    for (int j = 0; j < len; j++) p.push_back(rd[j / 32][8*(j % 32) +: 8]);
    tx_q.push_back(p);
    tx_time.push_back(cyc);
    if (d[TXD_RS_BIT]) begin
      rs_seen++;
      d[TXD_DD_BIT] = 1'b1;
      wr_desc(addr_t'(TXRING_BASE), tx_head, d);
    end
    tx_head = (tx_head + 1) % ring_n;
  endtask

  always @(posedge clk) begin
    automatic int n = 0;
    cyc <= cyc + 1;
    foreach (rx_at[i]) if (rx_at[i] <= cyc) n++;
    if (n > rx_backlog_max) rx_backlog_max = n;
  end

  // ---------------------------------------------------------------- main loop
  initial begin
    automatic int since_tx = 0;
    forever begin
      @(negedge clk);
      since_tx++;
      if (!running) continue;
      if (tx_head != tdt && since_tx >= tx_gap) begin
        do_tx();
        since_tx = 0;
      end else if (rx_q.size() > 0 && rdt >= 0 && rx_head != rdt &&
                   (rx_at.size() == 0 || rx_at[0] <= cyc)) begin
        do_rx();
      end
    end
  end
endmodule

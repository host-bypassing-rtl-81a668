// tb_hb_rx_handler: self-checking test of the receive handler.
// The testbench plays the NIC on port A of the rx ring and rx buffer: it
// takes descriptors up to the tail pointer, writes random packets (1..1514
// bytes) to the buffer address found in each descriptor and writes the
// descriptor back with length, DD and EOP. Checks: the initial ring fill
// (slot addresses) and first tail value RING_N-1; every packet appears on the
// AXI4-stream intact with correct tkeep/tlast and in order; each descriptor is
// re-armed and the tail follows 0,1,2,... around the ring (several wraps);
// packets stream at one beat per cycle when tready is high; random back
// pressure on tready loses nothing.
module tb_hb_rx_handler;
  import hb_pkg::*;
  localparam int unsigned RING_N     = 64;
  localparam int unsigned SLOT_BYTES = 8192;
  localparam int unsigned NPKT       = 200;
  localparam addr_t       FPGA_BASE  = 64'h0000_0038_0000_0000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #2 clk = ~clk;

  logic      start;
  bram_req_t ring_a, ring_b, buf_a, buf_b;
  data_t     ring_ar, ring_br, buf_ar, buf_br;
  logic      m_tvalid, m_tready, m_tlast, tail_valid;
  data_t     m_tdata;
  strb_t     m_tkeep;
  tail_upd_t tail;
  logic [31:0] rx_pkts;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  hb_rx_handler #(.RING_N(RING_N), .SLOT_BYTES(SLOT_BYTES)) dut (
    .clk, .rst_n, .start, .fpga_base(FPGA_BASE),
    .ring_req(ring_b), .ring_rdata(ring_br), .buf_req(buf_b), .buf_rdata(buf_br),
    .m_tvalid, .m_tready, .m_tdata, .m_tkeep, .m_tlast, .tail_valid, .tail, .rx_pkts);
  hb_bram #(.DEPTH(RING_BYTES / STRB_W)) ring (.clk, .a_req(ring_a), .a_rdata(ring_ar),
    .b_req(ring_b), .b_rdata(ring_br));
  hb_bram #(.DEPTH(BUF_BYTES / STRB_W)) pbuf (.clk, .a_req(buf_a), .a_rdata(buf_ar),
    .b_req(buf_b), .b_rdata(buf_br));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------------- tail monitor
  int tail_val = -1, n_tail = 0;
  always @(posedge clk) if (rst_n && tail_valid) begin
    if (n_tail == 0) check(tail.value == RING_N - 1, "first tail is RING_N-1");
    else check(tail.value == 32'((n_tail - 1) % RING_N), $sformatf("tail %0d", tail.value));
    check(tail.reg_off == NIC_RDT_OFF, "RDT offset");
    tail_val = int'(tail.value);
    n_tail++;
  end

  // ---------------------------------------------------------------- stream checker
  typedef byte unsigned pkt_t[$];
  pkt_t   exp_q[$];
  byte unsigned cur[$];
  int     n_rx = 0, burst_gaps = 0;
  logic   in_pkt = 1'b0, fast = 1'b1;
  always @(posedge clk) begin
    if (m_tvalid && m_tready) begin
      for (int j = 0; j < STRB_W; j++) if (m_tkeep[j]) cur.push_back(m_tdata[8*j +: 8]);
      if (!m_tlast) check(m_tkeep == '1, "full tkeep before last beat");
      in_pkt <= !m_tlast;
      if (m_tlast) begin
        pkt_t e;
        check(exp_q.size() > 0, "unexpected packet");
        if (exp_q.size() > 0) begin
          e = exp_q.pop_front();
          check(cur == e, $sformatf("packet %0d contents (len %0d exp %0d)", n_rx, cur.size(), e.size()));
        end
        cur = {};
        n_rx++;
      end
    end else if (in_pkt && fast && !m_tvalid) burst_gaps++;
    m_tready <= fast ? 1'b1 : 1'($urandom_range(1));
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ring_rd(input int i, output desc_t d);
    @(negedge clk); ring_a = '{en: 1'b1, we: '0, addr: 16'(i / 2), wdata: '0};
    @(negedge clk); ring_a = '0;
    d = (i % 2) ? ring_ar[255:128] : ring_ar[127:0];
  endtask

  task automatic ring_wr(input int i, input desc_t d);
    @(negedge clk);
    ring_a = '{en: 1'b1, we: (i % 2) ? {16'hffff, 16'h0} : {16'h0, 16'hffff},
               addr: 16'(i / 2), wdata: {d, d}};
    @(negedge clk); ring_a = '0;
  endtask

  initial begin
    int h = 0;
    desc_t d;
    start = 1'b0; ring_a = '0; buf_a = '0; m_tready = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    check(n_tail == 0, "idle before start");
    start = 1'b1;
    wait (n_tail == 1);
    for (int i = 0; i < RING_N; i++) begin
      ring_rd(i, d);
      check(d == {64'd0, FPGA_BASE + addr_t'(RXBUF_BASE) + addr_t'(i * SLOT_BYTES)},
            $sformatf("initial descriptor %0d", i));
    end
    for (int k = 0; k < int'(NPKT); k++) begin
      int len, words;
      addr_t a;
      pkt_t p;
      p = {};
      fast = (k < 100);
      // NIC may use descriptor h only while h != tail
      while (h == tail_val) @(negedge clk);
      ring_rd(h, d);
      if (k >= RING_N) check(d[RXD_DD_BIT] == 1'b0, "descriptor re-armed (DD clear)");
      a = d[63:0];
      check(a == FPGA_BASE + addr_t'(RXBUF_BASE) + addr_t'(h * SLOT_BYTES), "re-armed address");
      len = (k % 10 == 0) ? 1514 : (k % 10 == 1) ? 64 : (k % 10 == 2) ? 32 : $urandom_range(1, 1514);
      if (k == 5) len = 300;
      for (int j = 0; j < len; j++) p.push_back(8'($urandom));
      words = (len + 31) / 32;
      for (int wi = 0; wi < words; wi++) begin
        data_t x = '0;
        strb_t s = '0;
        for (int j = 0; j < 32; j++) if (wi * 32 + j < len) begin
          x[8*j +: 8] = p[wi * 32 + j];
          s[j] = 1'b1;
        end
        @(negedge clk);
        buf_a = '{en: 1'b1, we: s, addr: 16'((a - FPGA_BASE - addr_t'(RXBUF_BASE)) / 32 + addr_t'(wi)), wdata: x};
      end
      @(negedge clk); buf_a = '0;
      exp_q.push_back(p);
      d[RXD_LEN_LSB +: 16] = 16'(len);
      d[RXD_DD_BIT] = 1'b1;
      d[RXD_EOP_BIT] = 1'b1;
      ring_wr(h, d);
      h = (h + 1) % RING_N;
    end
    wait (n_rx == NPKT);
    repeat (10) @(negedge clk);
    check(exp_q.size() == 0, "all packets delivered");
    check(rx_pkts == NPKT, "packet counter");
    check(n_tail == NPKT + 1, $sformatf("tail updates %0d", n_tail));
    check(burst_gaps == 0, $sformatf("one beat per cycle: %0d gaps", burst_gaps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

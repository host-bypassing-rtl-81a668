// tb_hb_tx_handler: self-checking test of the transmit handler.
// A stream source sends random packets (1..1514 bytes, random tvalid gaps);
// the testbench plays the NIC on port A of the tx ring and tx buffer: on each
// tail pointer update it fetches the new descriptors, checks address, length
// and command bits, reads the packet from the buffer and compares it with
// what was sent. Phase 1: writeback off, fast NIC, several ring wraps.
// Phase 2 (after reset): writeback on and a NIC that sends slowly, so the
// ring fills; the handler must wait for DD before reusing a slot (wb_stalls
// rises, the stream is back-pressured) and no queued packet may be
// overwritten.
module tb_hb_tx_handler;
  import hb_pkg::*;
  localparam int unsigned RING_N     = 64;
  localparam int unsigned SLOT_BYTES = 8192;
  localparam addr_t       FPGA_BASE  = 64'h0000_0038_0000_0000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #2 clk = ~clk;

  logic      start, wb_en;
  bram_req_t ring_a, ring_b, buf_a, buf_b;
  data_t     ring_ar, ring_br, buf_ar, buf_br;
  logic      s_tvalid, s_tready, s_tlast, tail_valid;
  data_t     s_tdata;
  strb_t     s_tkeep;
  tail_upd_t tail;
  logic [31:0] tx_pkts, wb_stalls, trunc_beats;
  int checks = 0, failures = 0;

  hb_tx_handler #(.RING_N(RING_N), .SLOT_BYTES(SLOT_BYTES)) dut (
    .clk, .rst_n, .start, .wb_en, .fpga_base(FPGA_BASE),
    .ring_req(ring_b), .ring_rdata(ring_br), .buf_req(buf_b),
    .s_tvalid, .s_tready, .s_tdata, .s_tkeep, .s_tlast,
    .tail_valid, .tail, .tx_pkts, .wb_stalls, .trunc_beats);
  hb_bram #(.DEPTH(RING_BYTES / STRB_W)) ring (.clk, .a_req(ring_a), .a_rdata(ring_ar),
    .b_req(ring_b), .b_rdata(ring_br));
  hb_bram #(.DEPTH(BUF_BYTES / STRB_W)) pbuf (.clk, .a_req(buf_a), .a_rdata(buf_ar),
    .b_req(buf_b), .b_rdata(buf_br));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  typedef byte unsigned pkt_t[$];
  pkt_t sent_q[$];
  int   n_sent = 0, n_checked = 0, tail_val = 0, n_tail = 0;
  int   nic_delay = 0, stall_cycles = 0;

  always @(posedge clk) if (rst_n && tail_valid) begin
    check(tail.reg_off == NIC_TDT_OFF, "TDT offset");
    check(tail.value == 32'((tail_val + 1) % RING_N), "tail advances by one");
    tail_val = int'(tail.value);
    n_tail++;
  end
  always @(posedge clk) if (rst_n && s_tvalid && !s_tready) stall_cycles++;

  // stream source
  task automatic send_pkts(input int n);
    for (int k = 0; k < n; k++) begin
      pkt_t p;
      int len;
      p = {};
      len = (k % 7 == 0) ? 1514 : (k % 7 == 1) ? 32 : $urandom_range(1, 1514);
      for (int j = 0; j < len; j++) p.push_back(8'($urandom));
      sent_q.push_back(p);
      for (int wi = 0; wi < (len + 31) / 32; wi++) begin
        data_t x = '0;
        strb_t s = '0;
        for (int j = 0; j < 32; j++) if (wi * 32 + j < len) begin
          x[8*j +: 8] = p[wi * 32 + j]; s[j] = 1'b1;
        end
        @(negedge clk);
        if ($urandom_range(3) == 0) begin
          s_tvalid = 1'b0; @(negedge clk);
        end
        s_tvalid = 1'b1; s_tdata = x; s_tkeep = s; s_tlast = (wi == (len + 31) / 32 - 1);
        do @(posedge clk); while (!s_tready);
      end
      @(negedge clk); s_tvalid = 1'b0;
      n_sent++;
    end
  endtask

  // NIC model: serve descriptors from head up to the tail pointer
  task automatic nic_serve(input int total, input logic wb);
    int h = 0;
    while (n_checked < total) begin
      desc_t d;
      pkt_t  got, e;
      int    len;
      addr_t a;
      if (h == tail_val) begin @(negedge clk); continue; end
      repeat (nic_delay) @(negedge clk);
      @(negedge clk); ring_a = '{en: 1'b1, we: '0, addr: 16'(h / 2), wdata: '0};
      @(negedge clk); ring_a = '0;
      d = (h % 2) ? ring_ar[255:128] : ring_ar[127:0];
      a = d[63:0];
      len = int'(d[TXD_LEN_LSB +: 16]);
      check(a == FPGA_BASE + addr_t'(TXBUF_BASE) + addr_t'(h * SLOT_BYTES), "tx descriptor address");
      check(d[TXD_EOP_BIT] && d[TXD_IFCS_BIT] && d[TXD_RS_BIT] == wb && !d[TXD_DD_BIT],
            "tx descriptor command bits");
      got = {};
      for (int wi = 0; wi < (len + 31) / 32; wi++) begin
        @(negedge clk);
        buf_a = '{en: 1'b1, we: '0, addr: 16'((a - FPGA_BASE - addr_t'(TXBUF_BASE)) / 32 + addr_t'(wi)), wdata: '0};
        @(negedge clk); buf_a = '0;
        for (int j = 0; j < 32; j++) if (wi * 32 + j < len) got.push_back(buf_ar[8*j +: 8]);
      end
      e = sent_q.pop_front();
      check(got == e, $sformatf("tx packet %0d (len %0d exp %0d)", n_checked, len, e.size()));
      if (wb) begin
        d[TXD_DD_BIT] = 1'b1;
        @(negedge clk);
        ring_a = '{en: 1'b1, we: (h % 2) ? {16'hffff, 16'h0} : {16'h0, 16'hffff},
                   addr: 16'(h / 2), wdata: {d, d}};
        @(negedge clk); ring_a = '0;
      end
      n_checked++;
      h = (h + 1) % RING_N;
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; wb_en = 0; ring_a = '0; buf_a = '0;
    s_tvalid = 0; s_tdata = '0; s_tkeep = '0; s_tlast = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); start = 1'b1;
    // phase 1: no writeback, fast NIC
    fork
      send_pkts(150);
      nic_serve(150, 1'b0);
    join
    check(tx_pkts == 150 && n_tail == 150, "phase 1 counters");
    check(wb_stalls == 0, "no writeback stalls without writeback");
    // phase 2: writeback on, slow NIC
    @(negedge clk); rst_n = 1'b0; start = 1'b0;
    n_checked = 0; n_tail = 0; tail_val = 0; stall_cycles = 0;
    @(negedge clk); rst_n = 1'b1; wb_en = 1'b1;
    @(negedge clk); start = 1'b1;
    nic_delay = 200;
    fork
      send_pkts(160);
      nic_serve(160, 1'b1);
    join
    check(tx_pkts == 160, "phase 2 counter");
    check(wb_stalls > 0, $sformatf("writeback back pressure happened (%0d)", wb_stalls));
    check(stall_cycles > 0, "stream was back-pressured");
    check(trunc_beats == 0, "no truncation");
    $display("wb_stalls=%0d stream stall cycles=%0d", wb_stalls, stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

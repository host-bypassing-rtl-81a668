// tb_hb_axi_xbar: self-checking test of the address-mapped interconnect.
// The crossbar feeds five BRAM controllers and memories sized like the real
// regions. Random bursts go to random offsets in all five regions, including
// the first and last words of each; a byte-level reference model (one per
// region) predicts every read, so a burst routed to the wrong region or with
// a wrong offset is caught. Addresses outside the map must get DECERR on
// both read and write without disturbing later traffic.
module tb_hb_axi_xbar;
  import hb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #2 clk = ~clk;

  logic    s_aw_valid, s_aw_ready, s_w_valid, s_w_ready, s_b_valid, s_b_ready;
  logic    s_ar_valid, s_ar_ready, s_r_valid, s_r_ready;
  axi_ax_t s_aw, s_ar;
  axi_w_t  s_w;
  axi_b_t  s_b;
  axi_r_t  s_r;
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
  bram_req_t a_req [N_REGIONS];
  data_t     a_rdata [N_REGIONS];
  int checks = 0, failures = 0;

  localparam logic [23:0] BASE [N_REGIONS] = '{RXBUF_BASE, TXBUF_BASE, RXRING_BASE, TXRING_BASE, CFG_BASE};
  localparam int unsigned SIZE [N_REGIONS] = '{BUF_BYTES, BUF_BYTES, RING_BYTES, RING_BYTES, CFG_BYTES};

  hb_axi_xbar dut (.clk, .rst_n,
    .s_aw_valid, .s_aw_ready, .s_aw, .s_w_valid, .s_w_ready, .s_w,
    .s_b_valid, .s_b_ready, .s_b, .s_ar_valid, .s_ar_ready, .s_ar,
    .s_r_valid, .s_r_ready, .s_r,
    .m_aw_valid(x_aw_valid), .m_aw_ready(x_aw_ready), .m_aw(x_aw),
    .m_w_valid(x_w_valid), .m_w_ready(x_w_ready), .m_w(x_w),
    .m_b_valid(x_b_valid), .m_b_ready(x_b_ready), .m_b(x_b),
    .m_ar_valid(x_ar_valid), .m_ar_ready(x_ar_ready), .m_ar(x_ar),
    .m_r_valid(x_r_valid), .m_r_ready(x_r_ready), .m_r(x_r));

  for (genvar g = 0; g < N_REGIONS; g++) begin : g_mem
    localparam int unsigned OFF_W = $clog2(SIZE[g]);
    bram_req_t nb;
    data_t     nr;
    assign nb = '0;
    hb_axi_bram_ctrl #(.OFF_W(OFF_W)) u_ctrl (.clk, .rst_n,
      .aw_valid(x_aw_valid[g]), .aw_ready(x_aw_ready[g]), .aw(x_aw[g]),
      .w_valid(x_w_valid[g]), .w_ready(x_w_ready[g]), .w(x_w[g]),
      .b_valid(x_b_valid[g]), .b_ready(x_b_ready[g]), .b(x_b[g]),
      .ar_valid(x_ar_valid[g]), .ar_ready(x_ar_ready[g]), .ar(x_ar[g]),
      .r_valid(x_r_valid[g]), .r_ready(x_r_ready[g]), .r(x_r[g]),
      .bram_req(a_req[g]), .bram_rdata(a_rdata[g]));
    hb_bram #(.DEPTH(SIZE[g] / STRB_W)) u_mem (.clk, .a_req(a_req[g]), .a_rdata(a_rdata[g]),
      .b_req(nb), .b_rdata(nr));
  end

  hb_axi_master_bfm bfm (.clk,
    .aw_valid(s_aw_valid), .aw_ready(s_aw_ready), .aw(s_aw), .w_valid(s_w_valid),
    .w_ready(s_w_ready), .w(s_w), .b_valid(s_b_valid), .b_ready(s_b_ready), .b(s_b),
    .ar_valid(s_ar_valid), .ar_ready(s_ar_ready), .ar(s_ar), .r_valid(s_r_valid),
    .r_ready(s_r_ready), .r(s_r));

  data_t ref_w [N_REGIONS][int];    // word index -> contents (absent = 0)

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] resp;
    data_t d[$], wd[$];
    strb_t ws[$];
    int hits [N_REGIONS];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N_REGIONS; i++) hits[i] = 0;
    for (int n = 0; n < 600; n++) begin
      int g, beats, nw, w0;
      addr_t a;
      g = $urandom_range(N_REGIONS - 1);
      nw = SIZE[g] / STRB_W;
      beats = $urandom_range(1, 4);
      case ($urandom_range(3))
        0: w0 = 0;
        1: w0 = nw - beats;
        default: w0 = $urandom_range(nw - beats);
      endcase
      if (n < 400) w0 = w0 % 8;         // first phase: same offsets in every region
      a = addr_t'(BASE[g]) + addr_t'(w0 * STRB_W);
      bfm.stall = (n % 4 == 3);
      if ($urandom_range(1)) begin
        wd = {}; ws = {};
        for (int k = 0; k < beats; k++) begin
          data_t x;
          for (int j = 0; j < 8; j++) x[32*j +: 32] = $urandom;
          x[7:0] = 8'(g);
          wd.push_back(x); ws.push_back('1);
          ref_w[g][w0 + k] = x;
        end
        bfm.wr_burst(a, wd, ws, 3'd5, resp);
        check(resp == RESP_OKAY, "write OKAY");
      end else begin
        bfm.rd_burst(a, beats, d, resp);
        check(resp == RESP_OKAY, "read OKAY");
        for (int k = 0; k < beats; k++) begin
          data_t e;
          e = ref_w[g].exists(w0 + k) ? ref_w[g][w0 + k] : '0;
          check(d[k] == e, $sformatf("region %0d word %0d", g, w0 + k));
        end
      end
      hits[g]++;
    end
    for (int i = 0; i < N_REGIONS; i++) check(hits[i] > 50, $sformatf("region %0d exercised", i));
    // unmapped addresses
    begin
      addr_t bad [4] = '{64'h0010_3000, 64'h0010_3fe0, 64'h0100_0000, 64'h8000_0000_0000_0000};
      for (int i = 0; i < 4; i++) begin
        wd = '{'1, '1}; ws = '{'1, '1};
        bfm.wr_burst(bad[i], wd, ws, 3'd5, resp);
        check(resp == RESP_DECERR, "write DECERR");
        bfm.rd_burst(bad[i], 3, d, resp);
        check(resp == RESP_DECERR && d.size() == 3, "read DECERR with all beats");
      end
    end
    // traffic still correct afterwards
    bfm.rd_burst(addr_t'(RXRING_BASE), 2, d, resp);
    check(resp == RESP_OKAY && d[0] == (ref_w[2].exists(0) ? ref_w[2][0] : '0), "after errors");
    check(bfm.r_last_errors == 0, "RLAST placement");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

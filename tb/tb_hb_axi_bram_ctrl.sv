// tb_hb_axi_bram_ctrl: self-checking test of the AXI4-to-BRAM controller.
// The controller drives a small hb_bram; an AXI master model issues random
// INCR bursts of random length with random byte strobes and narrow (4-byte)
// writes, with and without back pressure. A reference byte array predicts
// every read. Also checked: RLAST, responses, and the streaming rate of a
// read burst (one beat per cycle after a two-cycle start when RREADY is high).
module tb_hb_axi_bram_ctrl;
  import hb_pkg::*;
  localparam int unsigned OFF_W = 12;          // 4 KiB region, as a ring
  localparam int unsigned WORDS = (1 << OFF_W) / STRB_W;

  logic clk = 1'b0, rst_n = 1'b0;
  always #2 clk = ~clk;

  logic aw_valid, aw_ready, w_valid, w_ready, b_valid, b_ready;
  logic ar_valid, ar_ready, r_valid, r_ready;
  axi_ax_t aw, ar;
  axi_w_t  w;
  axi_b_t  b;
  axi_r_t  r;
  bram_req_t bram_req, b_req;
  data_t     bram_rdata, b_rdata;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  hb_axi_bram_ctrl #(.OFF_W(OFF_W)) dut (.clk, .rst_n,
    .aw_valid, .aw_ready, .aw, .w_valid, .w_ready, .w, .b_valid, .b_ready, .b,
    .ar_valid, .ar_ready, .ar, .r_valid, .r_ready, .r, .bram_req, .bram_rdata);
  hb_bram #(.DEPTH(WORDS)) mem (.clk, .a_req(bram_req), .a_rdata(bram_rdata),
    .b_req(b_req), .b_rdata(b_rdata));
  hb_axi_master_bfm bfm (.clk,
    .aw_valid, .aw_ready, .aw, .w_valid, .w_ready, .w, .b_valid, .b_ready, .b,
    .ar_valid, .ar_ready, .ar, .r_valid, .r_ready, .r);

  logic [7:0] ref_b [1 << OFF_W];

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
    b_req = '0;
    for (int i = 0; i < (1 << OFF_W); i++) ref_b[i] = 8'h0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      int beats, w0;
      addr_t a;
      bfm.stall = (n % 3 == 1);
      beats = $urandom_range(1, 8);
      w0 = $urandom_range(WORDS - beats);
      a = addr_t'(w0 * STRB_W) | 64'h0000_0000_1230_0000;   // high bits ignored
      if ($urandom_range(1)) begin
        wd = {}; ws = {};
        for (int k = 0; k < beats; k++) begin
          data_t x;
          strb_t s;
          for (int j = 0; j < 8; j++) x[32*j +: 32] = $urandom;
          s = ($urandom_range(2) == 0) ? strb_t'($urandom) : '1;
          wd.push_back(x); ws.push_back(s);
          for (int j = 0; j < STRB_W; j++)
            if (s[j]) ref_b[(w0 + k) * STRB_W + j] = x[8*j +: 8];
        end
        bfm.wr_burst(a, wd, ws, 3'd5, resp);
        check(resp == RESP_OKAY, "write response");
      end else begin
        longint t0;
        t0 = cyc;
        bfm.rd_burst(a, beats, d, resp);
        check(resp == RESP_OKAY, "read response");
        for (int k = 0; k < beats; k++) begin
          data_t e;
          for (int j = 0; j < STRB_W; j++) e[8*j +: 8] = ref_b[(w0 + k) * STRB_W + j];
          check(d[k] == e, $sformatf("read word %0d", w0 + k));
        end
        // AR handshake, 2-cycle start, then one beat per cycle
        if (!bfm.stall)
          check(cyc - t0 <= longint'(beats) + 5, $sformatf("read burst of %0d took %0d", beats, cyc - t0));
      end
    end
    // narrow 4-byte writes: INCR by 4 bytes inside one word
    begin
      addr_t a;
      a = 64'h40 + 64'h8;      // word 2, byte 8
      wd = {}; ws = {};
      for (int k = 0; k < 3; k++) begin
        data_t x = '0;
        x[8*(8 + 4*k) +: 32] = 32'h1111_1111 * (k + 1);
        wd.push_back(x); ws.push_back(strb_t'(32'hf) << (8 + 4*k));
        for (int j = 0; j < 4; j++) ref_b[64 + 8 + 4*k + j] = x[8*(8 + 4*k + j) +: 8];
      end
      bfm.wr_burst(a, wd, ws, 3'd2, resp);
      bfm.rd_burst(64'h40, 1, d, resp);
      begin
        data_t e;
        for (int j = 0; j < STRB_W; j++) e[8*j +: 8] = ref_b[64 + j];
        check(d[0] == e, "narrow write burst");
      end
    end
    check(bfm.r_last_errors == 0, "RLAST placement");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_hb_dw_convert: self-checking test of the tail-update to AXI4-write
// converter. A responder with random AW/W/B delays accepts the writes; each
// is checked for address (NIC base + register offset), one beat of 4 bytes,
// the value in the right byte lanes with a 4-bit strobe, one write at a time,
// and the write and error counters.
module tb_hb_dw_convert;
  import hb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #2 clk = ~clk;

  addr_t       nic_base;
  logic        in_valid, in_ready, aw_valid, aw_ready, w_valid, w_ready, b_valid, b_ready;
  tail_upd_t   in;
  axi_ax_t     aw;
  axi_w_t      w;
  axi_b_t      b;
  logic [31:0] writes, err_count;
  int checks = 0, failures = 0;

  hb_dw_convert dut (.clk, .rst_n, .nic_base, .in_valid, .in_ready, .in,
    .aw_valid, .aw_ready, .aw, .w_valid, .w_ready, .w, .b_valid, .b_ready, .b,
    .writes, .err_count);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_err = 0;
    nic_base = 64'h0000_00f0_1230_0000;
    in_valid = 0; in = '0; aw_ready = 0; w_ready = 0; b_valid = 0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 60; n++) begin
      tail_upd_t u;
      axi_ax_t   got_aw;
      axi_w_t    got_w;
      addr_t     ea;
      logic [1:0] resp;
      u = '{reg_off: (n % 2) ? NIC_TDT_OFF : NIC_RDT_OFF, value: $urandom};
      if (n == 30) nic_base = 64'h0000_0000_fb00_0004;   // base not 32-byte aligned
      ea = nic_base + addr_t'(u.reg_off);
      @(negedge clk);
      in_valid = 1'b1; in = u;
      do @(posedge clk); while (!in_ready);
      @(negedge clk);
      in_valid = 1'b0;
      // AW and W with independent random delays
      fork
        begin
          repeat ($urandom_range(3)) @(negedge clk);
          aw_ready = 1'b1;
          do @(posedge clk); while (!aw_valid);
          got_aw = aw;
          @(negedge clk); aw_ready = 1'b0;
        end
        begin
          repeat ($urandom_range(3)) @(negedge clk);
          w_ready = 1'b1;
          do @(posedge clk); while (!w_valid);
          got_w = w;
          @(negedge clk); w_ready = 1'b0;
        end
      join
      check(got_aw.addr == ea, $sformatf("address %h exp %h", got_aw.addr, ea));
      check(got_aw.len == 0 && got_aw.size == 2 && got_aw.burst == BURST_INCR, "single 4-byte beat");
      check(got_w.last, "wlast");
      check(got_w.strb == strb_t'(32'hf << ea[4:0]), $sformatf("strobe %h", got_w.strb));
      check(got_w.data[8*ea[4:0] +: 32] == u.value, "value in its byte lanes");
      // a second update must wait for B
      @(negedge clk);
      check(!in_ready, "one write outstanding");
      repeat ($urandom_range(3)) @(negedge clk);
      resp = (n % 7 == 3) ? RESP_DECERR : RESP_OKAY;
      if (resp != RESP_OKAY) n_err++;
      b_valid = 1'b1; b = '{id: '0, resp: resp};
      do @(posedge clk); while (!b_ready);
      @(negedge clk); b_valid = 1'b0;
    end
    @(negedge clk);
    check(writes == 60, $sformatf("write counter %0d", writes));
    check(err_count == 32'(n_err), $sformatf("error counter %0d exp %0d", err_count, n_err));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

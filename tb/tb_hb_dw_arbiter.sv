// tb_hb_dw_arbiter: self-checking test of the rx/tx tail-write merge.
// Two random producers offer numbered updates with random gaps while the
// consumer applies random back pressure. Checks: every update arrives exactly
// once and in order per source; the output holds while stalled; with both
// sources permanently valid the grants alternate.
module tb_hb_dw_arbiter;
  import hb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #2 clk = ~clk;

  logic      in_valid [2], in_ready [2], out_valid, out_ready;
  tail_upd_t in [2], out;
  int checks = 0, failures = 0;
  int sent [2], rcvd [2];
  int  nmax = 300;
  logic always_on = 1'b0;
  int  last_src = -1, alternations = 0, same = 0;

  hb_dw_arbiter dut (.clk, .rst_n, .in_valid, .in_ready, .in, .out_valid, .out_ready, .out);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // producers: keep an offer until accepted
  for (genvar s = 0; s < 2; s++) begin : g_src
    always @(posedge clk) begin
      if (!rst_n) begin
        in_valid[s] <= 1'b0; sent[s] <= 0;
      end else begin
        if (in_valid[s] && in_ready[s]) begin
          sent[s]     <= sent[s] + 1;
          in_valid[s] <= 1'b0;
        end
        if ((!in_valid[s] || in_ready[s]) && (sent[s] + int'(in_valid[s] && in_ready[s])) < nmax &&
            (always_on || $urandom_range(2) == 0)) begin
          in_valid[s] <= 1'b1;
          in[s] <= '{reg_off: (s == 0) ? NIC_RDT_OFF : NIC_TDT_OFF,
                     value: 32'(sent[s] + int'(in_valid[s] && in_ready[s]))};
        end
      end
    end
  end

  tail_upd_t held;
  logic      was_stalled = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (was_stalled) check(out_valid && out == held, "output held while stalled");
    was_stalled <= out_valid && !out_ready;
    held        <= out;
    if (out_valid && out_ready) begin
      automatic int src = (out.reg_off == NIC_RDT_OFF) ? 0 : 1;
      check(out.value == 32'(rcvd[src]), $sformatf("order src %0d got %0d exp %0d", src, out.value, rcvd[src]));
      rcvd[src] = rcvd[src] + 1;
      if (always_on) begin
        if (last_src >= 0 && src != last_src) alternations++;
        if (last_src >= 0 && src == last_src) same++;
      end
      last_src = src;
    end
    out_ready <= ($urandom_range(3) != 0) || always_on;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rcvd[0] = 0; rcvd[1] = 0; in[0] = '0; in[1] = '0; out_ready = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (rcvd[0] == nmax && rcvd[1] == nmax);
    check(1'b1, "random phase complete");
    // saturated phase: both always valid, consumer always ready
    @(negedge clk);
    rst_n = 1'b0; rcvd[0] = 0; rcvd[1] = 0; last_src = -1; always_on = 1'b1; nmax = 50;
    @(negedge clk);
    rst_n = 1'b1;
    wait (rcvd[0] == nmax && rcvd[1] == nmax);
    check(alternations >= 95 && same <= 3, $sformatf("round robin: alt %0d same %0d", alternations, same));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

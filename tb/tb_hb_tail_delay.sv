// tb_hb_tail_delay: self-checking test of the tail pointer batching module.
// Checks: pass-through (batch off) with one cycle latency; a flush on the
// BATCH-th update carrying the newest value; a flush exactly TIMEOUT cycles
// after the first held update when fewer than BATCH arrive; merging of
// updates while the output is stalled; the two flush counters.
module tb_hb_tail_delay;
  import hb_pkg::*;
  localparam int unsigned BATCH   = 8;
  localparam int unsigned TIMEOUT = 625;   // 2500 ns at 250 MHz

  logic clk = 1'b0, rst_n = 1'b0;
  always #2 clk = ~clk;

  logic        batch_en, in_valid, out_valid, out_ready;
  tail_upd_t   in, out;
  logic [31:0] fc, ft;
  int          checks = 0, failures = 0;
  longint      cyc = 0;

  hb_tail_delay #(.BATCH(BATCH), .TIMEOUT(TIMEOUT)) dut (
    .clk, .rst_n, .batch_en, .in_valid, .in, .out_valid, .out_ready, .out,
    .flushes_count(fc), .flushes_timeout(ft));

  always @(posedge clk) cyc <= cyc + 1;

  // output monitor
  tail_upd_t got_q[$];
  longint    got_t[$];
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    got_q.push_back(out);
    got_t.push_back(cyc);
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(input logic [31:0] v);
    @(negedge clk);
    in_valid = 1'b1; in = '{reg_off: NIC_TDT_OFF, value: v};
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0;
    batch_en = 1'b0; in_valid = 1'b0; in = '0; out_ready = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. batching off: every update passes, one cycle later
    for (int i = 1; i <= 5; i++) begin
      t0 = cyc;
      send(32'(i));
      repeat (2) @(negedge clk);
      check(got_q.size() == 1, "pass-through count");
      if (got_q.size() == 1) begin
        check(got_q[0].value == 32'(i) && got_q[0].reg_off == NIC_TDT_OFF, "pass-through value");
        // accepted at the edge sampled as t0+1, output handshake one edge later
        check(got_t[0] == t0 + 2, $sformatf("pass-through latency %0d", got_t[0] - t0));
      end
      got_q.delete(); got_t.delete();
    end

    // 2. batching on: flush at the 8th update with the newest value
    batch_en = 1'b1;
    for (int i = 0; i < 8; i++) begin
      send(32'(100 + i));
      if (i < 7) check(got_q.size() == 0, "no output before batch is full");
    end
    t0 = cyc;
    repeat (2) @(negedge clk);
    check(got_q.size() == 1, "one write per batch");
    if (got_q.size() == 1) begin
      check(got_q[0].value == 107, "batch carries newest value");
      check(got_t[0] == t0, $sformatf("batch flush timing %0d", got_t[0] - t0));
    end
    check(fc == 1 && ft == 0, "count flush counted");
    got_q.delete(); got_t.delete();

    // 3. fewer than BATCH updates: flush by timeout
    @(negedge clk);
    t0 = cyc;                 // the update below is accepted at the next edge
    send(200); send(201); send(202);
    while (got_q.size() == 0 && cyc < t0 + 2000) @(negedge clk);
    check(got_q.size() == 1, "timeout flush happened");
    if (got_q.size() == 1) begin
      check(got_q[0].value == 202, "timeout flush value");
      // out_valid rises TIMEOUT cycles after acceptance, handshake seen one edge later
      check(got_t[0] - (t0 + 1) == longint'(TIMEOUT) + 1,
            $sformatf("timeout after %0d cycles", got_t[0] - (t0 + 1)));
    end
    check(ft == 1, "timeout flush counted");
    got_q.delete(); got_t.delete();

    // 4. stalled output: later updates merge into one
    batch_en = 1'b0;
    out_ready = 1'b0;
    send(300); send(301); send(302);
    repeat (3) @(negedge clk);
    out_ready = 1'b1;
    repeat (4) @(negedge clk);
    check(got_q.size() == 2, $sformatf("merged writes %0d", got_q.size()));
    if (got_q.size() == 2) begin
      check(got_q[0].value == 300, "first held value");
      check(got_q[1].value == 302, "merged newest value");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

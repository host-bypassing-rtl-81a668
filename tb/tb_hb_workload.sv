// tb_hb_workload: the traffic the design was evaluated with, run through the
// whole FPGA design and a NIC model at the default ring and buffer sizes.
//
// 300-byte UDP packets arrive at 10 Gbit/s (one every 240 ns = 60 cycles) and
// are forwarded by an identity network function, with tail pointer batching
//   off (batch factor 1),  8 packets / 2500 ns,  16 packets / 2500 ns.
// Measured are the tail pointer bytes the FPGA sends per packet (4 bytes per
// write) and the added latency. Expected from the design: 8 bytes per packet
// without batching (one rx and one tx tail write per packet), 1 byte with
// batch 8 (8 packets take 1920 ns, inside the timeout), and about 0.7 bytes
// with batch 16 (16 packets would take 3840 ns, so the 2500 ns timeout flushes
// every 10 to 11 packets). Batch 8 can hold a tx packet back by at most seven
// packet times, 7 * 240 ns = 1680 ns.
// Then 1514-byte TCP-sized packets arrive at 10 Gbit/s (one every 1211 ns =
// 303 cycles) with writeback congestion control and batch 8 / 2500 ns on.
// In every run each packet must come back intact and in order and the design
// must keep up: the NIC never holds more than a few arrived packets. (The NIC
// model serves rx and tx with one engine, so when a batch of tx packets is
// released at once, arrivals wait a little; the bound is one batch.)
module tb_hb_workload;
  import hb_pkg::*;

  logic clk = 1'b0;
  always #2 clk = ~clk;    // 250 MHz

  hb_wl_env #(.BATCH(8),  .TIMEOUT(625)) env8  (.clk);
  hb_wl_env #(.BATCH(16), .TIMEOUT(625)) env16 (.clk);

  int checks = 0, failures = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NPKT = 400;

  initial begin
    logic   ok [4];
    int     rxw [4], txw [4], flc [4], flt [4], bl [4];
    real    lm [4], bpp [4];
    longint lx [4];
    string  name [4];
    name = '{"300 B, batch off", "300 B, batch 8/2500ns", "300 B, batch 16/2500ns",
             "1514 B, batch 8/2500ns + writeback"};
    repeat (5) @(negedge clk);
    env8.run (NPKT, 300, 60, 1'b0, 1'b0, ok[0], rxw[0], txw[0], flc[0], flt[0], lm[0], lx[0], bl[0]);
    env8.run (NPKT, 300, 60, 1'b0, 1'b1, ok[1], rxw[1], txw[1], flc[1], flt[1], lm[1], lx[1], bl[1]);
    env16.run(NPKT, 300, 60, 1'b0, 1'b1, ok[2], rxw[2], txw[2], flc[2], flt[2], lm[2], lx[2], bl[2]);
    env8.run (200, 1514, 303, 1'b1, 1'b1, ok[3], rxw[3], txw[3], flc[3], flt[3], lm[3], lx[3], bl[3]);

    for (int i = 0; i < 4; i++) begin
      bpp[i] = 4.0 * real'(rxw[i] + txw[i]) / real'(i == 3 ? 200 : NPKT);
      $display("%-36s tail writes rx/tx %0d/%0d = %0.2f B/pkt, flushes count/timeout %0d/%0d,",
               name[i], rxw[i], txw[i], bpp[i], flc[i], flt[i]);
      $display("%-36s latency mean %0.0f ns max %0d ns, NIC backlog max %0d",
               "", lm[i] * 4.0, lx[i] * 4, bl[i]);
      check(ok[i], {name[i], ": every packet forwarded intact and in order"});
      check(bl[i] <= 8, {name[i], ": design keeps up with 10 Gbit/s"});
    end
    check(rxw[0] == NPKT && txw[0] == NPKT, "no batching: one rx and one tx tail write per packet");
    check(bpp[0] == 8.0, "no batching: 8 tail bytes per packet");
    check(bpp[1] >= 0.95 && bpp[1] <= 1.1, "batch 8: about 1 tail byte per packet");
    check(flc[1] >= 2 * (NPKT / 8) - 2, "batch 8: flushes by packet count at this rate");
    check(bpp[2] >= 0.6 && bpp[2] <= 0.85, "batch 16: about 0.7 tail bytes per packet");
    check(flt[2] >= flc[2], "batch 16: flushes by timeout at this rate");
    check((lx[1] - lx[0]) * 4 <= 1680 + 200, "batch 8 adds at most about 7 packet times of latency");
    check(lm[1] > lm[0], "batch 8 adds latency on average");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// hb_tail_delay: optional batching of tail pointer updates ("delay" module).
//
// Every tail pointer write is a separate small PCIe transaction to the NIC.
// To cut that overhead, updates from a handler are held back and only the
// newest value is passed on, either once BATCH updates have accumulated or
// once TIMEOUT clock cycles have passed since the first held update, whichever
// comes first. The design's example is 8 packets or 2500 ns; at the 250 MHz
// bus clock 2500 ns is 625 cycles. With batch_en low every update is passed on
// at once (batch factor 1). A tail pointer is cumulative, so dropping the
// intermediate values loses nothing.
//
// Interface: in_valid/in carry one update per cycle and are always accepted.
// out_valid/out_ready/out form a valid-ready handshake; out holds steady while
// out_valid is high. Updates that arrive while an output waits are merged
// into the next one. Timing: with batch_en low, out_valid rises the cycle
// after the update; with batch_en high, on the cycle after the BATCH-th update
// or TIMEOUT cycles after the first held update. flushes_count and
// flushes_timeout count how often each trigger fired.
module hb_tail_delay
  import hb_pkg::*;
#(
  parameter int unsigned BATCH   = 8,
  parameter int unsigned TIMEOUT = 625
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      batch_en,
  input  logic      in_valid,
  input  tail_upd_t in,
  output logic      out_valid,
  input  logic      out_ready,
  output tail_upd_t out,
  output logic [31:0] flushes_count,
  output logic [31:0] flushes_timeout
);
  tail_upd_t   latest, nxt_val;
  logic        pend, nxt_pend;
  logic [31:0] cnt, nxt_cnt;
  logic [31:0] timer;
  logic        by_count, by_time, trigger, can_load;

  always_comb begin
    nxt_val  = in_valid ? in : latest;
    nxt_pend = pend || in_valid;
    nxt_cnt  = cnt + {31'd0, in_valid};
    by_count = nxt_cnt >= BATCH;
    by_time  = pend && (timer >= TIMEOUT - 1);
    trigger  = nxt_pend && (!batch_en || by_count || by_time);
    can_load = !out_valid || out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid       <= 1'b0;
      out             <= '0;
      latest          <= '0;
      pend            <= 1'b0;
      cnt             <= '0;
      timer           <= '0;
      flushes_count   <= '0;
      flushes_timeout <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (trigger && can_load) begin
        out       <= nxt_val;
        out_valid <= 1'b1;
        pend      <= 1'b0;
        cnt       <= '0;
        timer     <= '0;
        if (batch_en && by_count)              flushes_count   <= flushes_count + 1;
        else if (batch_en && by_time)          flushes_timeout <= flushes_timeout + 1;
      end else begin
        latest <= nxt_val;
        pend   <= nxt_pend;
        cnt    <= nxt_cnt;
        timer  <= pend ? timer + 1 : '0;
      end
    end
  end

endmodule

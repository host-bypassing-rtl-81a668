// hb_dw_arbiter: merges the rx and tx tail pointer updates onto the single
// direct-write channel toward the NIC (the 2:1 switch in front of "convert").
//
// Both handlers (through their delay modules) offer tail_upd_t updates with a
// valid-ready handshake. The arbiter has a one-entry output register: whenever
// it is empty or being emptied, it takes one offered update, alternating
// between the two inputs when both are valid (round robin), and presents it on
// out_valid/out. Throughput is one update per cycle; latency one cycle. The
// arbitration policy is this design's choice: the design only shows the merge.
module hb_dw_arbiter
  import hb_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid [2],
  output logic      in_ready [2],
  input  tail_upd_t in       [2],
  output logic      out_valid,
  input  logic      out_ready,
  output tail_upd_t out
);
  logic last_gnt;   // input granted most recently
  logic free, gnt, any;

  always_comb begin
    free = !out_valid || out_ready;
    any  = in_valid[0] || in_valid[1];
    if (in_valid[0] && in_valid[1]) gnt = !last_gnt;
    else                            gnt = in_valid[1];
    in_ready[0] = free && any && (gnt == 1'b0);
    in_ready[1] = free && any && (gnt == 1'b1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out       <= '0;
      last_gnt  <= 1'b1;
    end else if (free) begin
      out_valid <= any;
      if (any) begin
        out      <= in[gnt];
        last_gnt <= gnt;
      end
    end
  end

endmodule

// hb_rx_desc_ctrl: receive-side descriptor control of the FPGA NIC driver.
//
// Plays the part of the poll-mode driver's rx loop. After the start command
// it fills every rx descriptor with the physical address of its own packet
// slot (slot i of the rx buffer, at fpga_base + rx-buffer offset +
// i*SLOT_BYTES) and hands RING_N-1 descriptors to the NIC by writing the rx
// tail pointer. It then polls descriptor `idx` continuously. When the NIC
// has written it back with DD set, the packet's slot and length go to the
// packet handler; once that has streamed the packet out, the descriptor is
// re-armed with its empty buffer address (DD cleared), the rx tail pointer is
// set to idx, and polling moves on to idx+1 (mod RING_N).
//
// The flow (poll, read out, bump tail, re-arm, poll next) is the design's; the
// fixed slot per descriptor, the initial fill and the tail value RING_N-1
// (one descriptor kept back, as usual for these rings) are this design's.
// Ring port: synchronous, read data one cycle after the request. Descriptor i
// is half (i mod 2) of ring word i/2. Each poll takes two cycles. tail_valid
// pulses for one cycle with the new RDT value; it is never stalled.
module hb_rx_desc_ctrl
  import hb_pkg::*;
#(
  parameter int unsigned RING_N     = 64,
  parameter int unsigned SLOT_BYTES = 8192
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  addr_t       fpga_base,
  // rx ring BRAM port
  output bram_req_t   ring_req,
  input  data_t       ring_rdata,
  // packet handler
  output logic        pkt_req,
  output logic [$clog2(RING_N)-1:0] pkt_slot,
  output logic [15:0] pkt_len,
  input  logic        pkt_done,
  // tail pointer update
  output logic        tail_valid,
  output tail_upd_t   tail,
  output logic [31:0] rx_pkts
);
  localparam int unsigned IW = $clog2(RING_N);

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_POLL, S_CHECK, S_PKT, S_REARM} state_e;
  state_e         state;
  logic [IW-1:0]  idx;
  desc_t          desc;

  function automatic desc_t empty_desc(input addr_t base, input logic [IW-1:0] i);
    addr_t a;
    a = base + addr_t'(RXBUF_BASE) + addr_t'(i) * addr_t'(SLOT_BYTES);
    return {64'd0, a};
  endfunction

  assign desc     = idx[0] ? ring_rdata[255:128] : ring_rdata[127:0];
  assign pkt_req  = (state == S_PKT);
  assign pkt_slot = idx;

  always_comb begin
    ring_req = '0;
    ring_req.addr = BRAM_AW'(idx >> 1);
    unique case (state)
      S_INIT, S_REARM: begin
        ring_req.en    = 1'b1;
        ring_req.we    = idx[0] ? {16'hffff, 16'h0} : {16'h0, 16'hffff};
        ring_req.wdata = {2{empty_desc(fpga_base, idx)}};
      end
      S_POLL: ring_req.en = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      idx        <= '0;
      pkt_len    <= '0;
      tail_valid <= 1'b0;
      tail       <= '0;
      rx_pkts    <= '0;
    end else begin
      tail_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          idx   <= '0;
          state <= S_INIT;
        end
        S_INIT: begin
          idx <= idx + 1'b1;
          if (idx == IW'(RING_N - 1)) begin
            tail_valid <= 1'b1;
            tail       <= '{reg_off: NIC_RDT_OFF, value: 32'(RING_N - 1)};
            state      <= S_POLL;
          end
        end
        S_POLL:  state <= S_CHECK;
        S_CHECK: if (desc[RXD_DD_BIT]) begin
          pkt_len <= desc[RXD_LEN_LSB +: 16];
          state   <= S_PKT;
        end else begin
          state   <= S_POLL;
        end
        S_PKT: if (pkt_done) state <= S_REARM;
        S_REARM: begin
          tail_valid <= 1'b1;
          tail       <= '{reg_off: NIC_RDT_OFF, value: 32'(idx)};
          rx_pkts    <= rx_pkts + 1;
          idx        <= idx + 1'b1;
          state      <= S_POLL;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

// hb_tx_desc_ctrl: transmit-side descriptor control of the FPGA NIC driver.
//
// Keeps the tx ring index `idx` (the driver's tail). It offers slot idx to the
// packet handler; once the handler has stored a packet there, the control
// writes tx descriptor idx (buffer address of the slot, length, command
// EOP|IFCS, plus RS when writeback is enabled, status cleared) and issues a tx
// tail pointer update to idx+1 so the NIC sends the packet, then moves on.
//
// Optional congestion control (wb_en): the NIC then writes each sent
// descriptor back with DD set. Before filling slot idx, once the descriptor
// after it (idx+1 mod RING_N) has been used before, the control reads that
// descriptor and waits (polling, two cycles per read) until its DD is set.
// The NIC sends in ring order, so this means slot idx is free too, and one
// descriptor always stays free: the tail never catches up with the NIC's
// head, which the NIC would read as an empty ring. Unsent packets are never
// overwritten; the back pressure is counted in wb_stalls (cycles). Without
// wb_en slots are reused blindly and a slow NIC can be overrun, which is the
// trade-off the design describes. The store-post-bump order and the writeback
// rule are the design's; descriptor layout and the per-pass check are this
// design's.
module hb_tx_desc_ctrl
  import hb_pkg::*;
#(
  parameter int unsigned RING_N     = 64,
  parameter int unsigned SLOT_BYTES = 8192
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        wb_en,
  input  addr_t       fpga_base,
  // tx ring BRAM port
  output bram_req_t   ring_req,
  input  data_t       ring_rdata,
  // packet handler
  output logic        slot_ok,
  output logic [$clog2(RING_N)-1:0] slot,
  input  logic        post_valid,
  input  logic [$clog2(RING_N)-1:0] post_slot,
  input  logic [15:0] post_len,
  output logic        post_ack,
  // tail pointer update
  output logic        tail_valid,
  output tail_upd_t   tail,
  output logic [31:0] tx_pkts,
  output logic [31:0] wb_stalls
);
  localparam int unsigned IW = $clog2(RING_N);

  typedef enum logic [2:0] {S_IDLE, S_CHECK, S_RD, S_TEST, S_READY} state_e;
  state_e        state;
  logic [IW-1:0] idx;
  logic          lap;      // ring has wrapped at least once
  logic [IW-1:0] nxt;      // descriptor after idx
  logic [IW-1:0] ring_idx; // descriptor the ring port addresses
  desc_t         rdesc, wdesc;
  addr_t         slot_addr;

  assign nxt      = idx + 1'b1;
  assign rdesc    = nxt[0] ? ring_rdata[255:128] : ring_rdata[127:0];
  assign slot     = idx;
  assign slot_ok  = (state == S_READY);
  assign post_ack = (state == S_READY) && post_valid;

  always_comb begin
    slot_addr = fpga_base + addr_t'(TXBUF_BASE) + addr_t'(post_slot) * addr_t'(SLOT_BYTES);
    wdesc = '0;
    wdesc[63:0]                = slot_addr;
    wdesc[TXD_LEN_LSB +: 16]   = post_len;
    wdesc[TXD_EOP_BIT]         = 1'b1;
    wdesc[TXD_IFCS_BIT]        = 1'b1;
    wdesc[TXD_RS_BIT]          = wb_en;
    ring_req      = '0;
    ring_idx      = (state == S_RD) ? nxt : idx;
    ring_req.addr = BRAM_AW'(ring_idx >> 1);
    if (state == S_RD) ring_req.en = 1'b1;
    if (post_ack) begin
      ring_req.en    = 1'b1;
      ring_req.we    = idx[0] ? {16'hffff, 16'h0} : {16'h0, 16'hffff};
      ring_req.wdata = {2{wdesc}};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      idx        <= '0;
      lap        <= 1'b0;
      tail_valid <= 1'b0;
      tail       <= '0;
      tx_pkts    <= '0;
      wb_stalls  <= '0;
    end else begin
      tail_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          idx   <= '0;
          lap   <= 1'b0;
          state <= S_CHECK;
        end
        S_CHECK: state <= (wb_en && (lap || idx == IW'(RING_N - 1))) ? S_RD : S_READY;
        S_RD:    state <= S_TEST;
        S_TEST: if (rdesc[TXD_DD_BIT]) begin
          state <= S_READY;
        end else begin
          wb_stalls <= wb_stalls + 2;
          state     <= S_RD;
        end
        S_READY: if (post_valid) begin
          tail_valid <= 1'b1;
          tail       <= '{reg_off: NIC_TDT_OFF, value: 32'(nxt)};
          tx_pkts    <= tx_pkts + 1;
          idx        <= idx + 1'b1;
          if (idx == IW'(RING_N - 1)) lap <= 1'b1;
          state      <= S_CHECK;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

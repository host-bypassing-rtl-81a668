// hb_tx_pkt_handler: transmit-side packet handler of the FPGA NIC driver.
//
// Receives packets from the network function on an AXI4-stream slave and
// stores each in an empty slot of the tx buffer, then reports the slot and
// the packet length to the descriptor control. It waits for slot_ok (the
// descriptor control's statement that slot `slot` may be filled), takes the
// packet at one beat per cycle (tready high), writing beat k to word k of the
// slot with tkeep as byte enables and adding up the tkeep bits as the length
// (tkeep is expected to be contiguous from byte 0). Beats beyond the slot's
// SLOT_BYTES are dropped and counted in trunc_beats. After tlast it raises
// post_valid with slot and length until post_ack.
//
// Storing first and posting after is the design's order; the one-slot-per-
// descriptor layout and the one idle cycle between packets are this design's.
module hb_tx_pkt_handler
  import hb_pkg::*;
#(
  parameter int unsigned RING_N     = 64,
  parameter int unsigned SLOT_BYTES = 8192
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        slot_ok,
  input  logic [$clog2(RING_N)-1:0] slot,
  output logic        post_valid,
  output logic [$clog2(RING_N)-1:0] post_slot,
  output logic [15:0] post_len,
  input  logic        post_ack,
  // tx buffer BRAM port
  output bram_req_t   buf_req,
  // AXI4-stream slave
  input  logic        s_tvalid,
  output logic        s_tready,
  input  data_t       s_tdata,
  input  strb_t       s_tkeep,
  input  logic        s_tlast,
  output logic [31:0] trunc_beats
);
  localparam int unsigned SLOT_WORDS = SLOT_BYTES / STRB_W;

  typedef enum logic [1:0] {S_IDLE, S_RECV, S_POST} state_e;
  state_e      state;
  logic [15:0] beat;
  logic        beat_in, fits;

  assign s_tready   = (state == S_RECV);
  assign beat_in    = s_tvalid && s_tready;
  assign fits       = beat < 16'(SLOT_WORDS);
  assign post_valid = (state == S_POST);

  always_comb begin
    buf_req       = '0;
    buf_req.en    = beat_in && fits;
    buf_req.we    = s_tkeep;
    buf_req.addr  = BRAM_AW'(post_slot) * BRAM_AW'(SLOT_WORDS) + BRAM_AW'(beat);
    buf_req.wdata = s_tdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      beat        <= '0;
      post_slot   <= '0;
      post_len    <= '0;
      trunc_beats <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (slot_ok) begin
          post_slot <= slot;
          post_len  <= '0;
          beat      <= '0;
          state     <= S_RECV;
        end
        S_RECV: if (beat_in) begin
          beat <= beat + 16'd1;
          if (fits) post_len <= post_len + 16'($countones(s_tkeep));
          else      trunc_beats <= trunc_beats + 1;
          if (s_tlast) state <= S_POST;
        end
        S_POST: if (post_ack) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

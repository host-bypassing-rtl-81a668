// hb_rx_pkt_handler: receive-side packet handler of the FPGA NIC driver.
//
// On a request from the descriptor control (slot, length in bytes) it reads
// the packet out of its slot in the rx buffer and sends it on an AXI4-stream
// master toward the network function: 32 bytes per beat, byte 0 of the packet
// in tdata[7:0], tkeep marking the valid bytes of the last beat, tlast on the
// last beat. It then pulses done for one cycle.
//
// Buffer reads are issued back to back while a two-entry output buffer has
// room, so a packet streams at one beat per cycle (256 bit at 250 MHz,
// 64 Gbit/s) as long as tready stays high; the first beat is valid two cycles
// after the request. That rate is the bus rate the design quotes; the
// buffering is this design's.
module hb_rx_pkt_handler
  import hb_pkg::*;
#(
  parameter int unsigned RING_N     = 64,
  parameter int unsigned SLOT_BYTES = 8192
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  logic [$clog2(RING_N)-1:0] slot,
  input  logic [15:0] len,
  output logic        done,
  // rx buffer BRAM port
  output bram_req_t   buf_req,
  input  data_t       buf_rdata,
  // AXI4-stream master
  output logic        m_tvalid,
  input  logic        m_tready,
  output data_t       m_tdata,
  output strb_t       m_tkeep,
  output logic        m_tlast
);
  localparam int unsigned SLOT_WORDS = SLOT_BYTES / STRB_W;

  typedef enum logic [1:0] {S_IDLE, S_BUSY, S_DONE} state_e;
  state_e      state;
  logic [15:0] words;      // beats in the packet
  logic [15:0] issued;     // beats read from the buffer
  logic [15:0] lenr;
  logic [BRAM_AW-1:0] base;
  logic        infl, infl_last;
  strb_t       infl_keep;

  data_t       fd   [2];
  strb_t       fk   [2];
  logic        fl   [2];
  logic        wp, rp;
  logic [1:0]  cnt;
  logic        issue, pop;

  function automatic strb_t keep_for(input logic [15:0] l, input logic [15:0] beat);
    logic [15:0] rest;
    rest = l - (beat << WORD_LSB);
    if (rest >= 16'(STRB_W)) return '1;
    return strb_t'((33'd1 << rest) - 33'd1);
  endfunction

  assign issue    = (state == S_BUSY) && (issued != words) &&
                    ({1'b0, cnt} + {2'b0, infl}) < 3'd2 + {2'b0, pop};
  assign pop      = m_tvalid && m_tready;
  assign m_tvalid = (cnt != 0);
  assign m_tdata  = fd[rp];
  assign m_tkeep  = fk[rp];
  assign m_tlast  = fl[rp];
  assign done     = (state == S_DONE);

  always_comb begin
    buf_req      = '0;
    buf_req.en   = issue;
    buf_req.addr = base + BRAM_AW'(issued);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      words     <= '0;
      issued    <= '0;
      lenr      <= '0;
      base      <= '0;
      infl      <= 1'b0;
      infl_last <= 1'b0;
      infl_keep <= '0;
      wp        <= 1'b0;
      rp        <= 1'b0;
      cnt       <= '0;
      fd        <= '{default: '0};
      fk        <= '{default: '0};
      fl        <= '{default: 1'b0};
    end else begin
      infl      <= issue;
      infl_last <= issue && (issued + 16'd1 == words);
      infl_keep <= keep_for(lenr, issued);
      if (issue) issued <= issued + 16'd1;
      if (infl) begin
        fd[wp] <= buf_rdata;
        fk[wp] <= infl_keep;
        fl[wp] <= infl_last;
        wp     <= ~wp;
      end
      if (pop) rp <= ~rp;
      cnt <= cnt + {1'b0, infl} - {1'b0, pop};
      unique case (state)
        S_IDLE: if (req) begin
          lenr   <= len;
          words  <= (len + 16'(STRB_W - 1)) >> WORD_LSB;
          issued <= '0;
          base   <= BRAM_AW'(slot) * BRAM_AW'(SLOT_WORDS);
          state  <= S_BUSY;
        end
        S_BUSY: if (issued == words && !infl && cnt == 0) state <= S_DONE;
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

// hb_axi_bram_ctrl: AXI4 slave to single block-RAM port.
//
// One controller sits in front of each of the five memory regions the NIC
// reaches over PCIe (rx/tx buffer, rx/tx ring, configuration register).
// The function (AXI4 memory-mapped access to a BRAM) is the vendor BRAM
// controller's; the insides here are this design's own.
//
// Write: AW is taken, then one W beat per cycle is written to the BRAM at the
// current address with the beat's byte strobes, then one B response. Read: AR
// is taken, BRAM reads are issued back to back while a two-entry output
// buffer has room, and R beats leave that buffer, so a burst streams at one
// beat per cycle when RREADY stays high (first beat two cycles after AR).
// INCR bursts advance the address by 2^size bytes per beat, FIXED bursts do
// not advance. Only the low OFF_W address bits (the offset inside the region)
// are used. One write and one read burst are handled at a time; both share
// the BRAM port and a write beat takes precedence over a read issue.
module hb_axi_bram_ctrl
  import hb_pkg::*;
#(
  parameter int unsigned OFF_W = 19   // log2 of region size in bytes
) (
  input  logic      clk,
  input  logic      rst_n,
  // AXI4 slave
  input  logic      aw_valid,
  output logic      aw_ready,
  input  axi_ax_t   aw,
  input  logic      w_valid,
  output logic      w_ready,
  input  axi_w_t    w,
  output logic      b_valid,
  input  logic      b_ready,
  output axi_b_t    b,
  input  logic      ar_valid,
  output logic      ar_ready,
  input  axi_ax_t   ar,
  output logic      r_valid,
  input  logic      r_ready,
  output axi_r_t    r,
  // BRAM port
  output bram_req_t bram_req,
  input  data_t     bram_rdata
);
  typedef enum logic [1:0] {W_IDLE, W_DATA, W_RESP} wstate_e;
  wstate_e         wst;
  logic [ID_W-1:0] wid;
  logic [OFF_W-1:0] waddr;
  logic [2:0]      wsize;
  logic [1:0]      wburst;

  logic            rbusy;
  logic [ID_W-1:0] rid;
  logic [OFF_W-1:0] raddr;
  logic [2:0]      rsize;
  logic [1:0]      rburst;
  logic [8:0]      rleft;      // beats still to issue
  logic            rinfl;      // read issued last cycle
  logic            rinfl_last;

  // two-entry read buffer
  data_t     rb_data [2];
  logic      rb_last [2];
  logic      rb_wp, rb_rp;
  logic [1:0] rb_cnt;

  logic wbeat, rissue, rpop;

  assign aw_ready = (wst == W_IDLE);
  assign w_ready  = (wst == W_DATA);
  assign wbeat    = w_valid && w_ready;
  assign b_valid  = (wst == W_RESP);
  assign b        = '{id: wid, resp: RESP_OKAY};

  assign ar_ready = !rbusy;
  assign rissue   = rbusy && (rleft != 0) && !wbeat &&
                    ({1'b0, rb_cnt} + {2'b0, rinfl}) < 3'd2 + {2'b0, rpop};
  assign r_valid  = (rb_cnt != 0);
  assign r        = '{id: rid, data: rb_data[rb_rp], resp: RESP_OKAY, last: rb_last[rb_rp]};
  assign rpop     = r_valid && r_ready;

  always_comb begin
    bram_req = '0;
    if (wbeat) begin
      bram_req.en    = 1'b1;
      bram_req.we    = w.strb;
      bram_req.addr  = BRAM_AW'(waddr >> WORD_LSB);
      bram_req.wdata = w.data;
    end else if (rissue) begin
      bram_req.en    = 1'b1;
      bram_req.addr  = BRAM_AW'(raddr >> WORD_LSB);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wst    <= W_IDLE;
      wid    <= '0;
      waddr  <= '0;
      wsize  <= '0;
      wburst <= '0;
    end else begin
      unique case (wst)
        W_IDLE: if (aw_valid) begin
          wid    <= aw.id;
          waddr  <= aw.addr[OFF_W-1:0];
          wsize  <= aw.size;
          wburst <= aw.burst;
          wst    <= W_DATA;
        end
        W_DATA: if (wbeat) begin
          if (wburst == BURST_INCR) waddr <= waddr + (OFF_W'(1) << wsize);
          if (w.last) wst <= W_RESP;
        end
        W_RESP: if (b_ready) wst <= W_IDLE;
        default: wst <= W_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rbusy      <= 1'b0;
      rid        <= '0;
      raddr      <= '0;
      rsize      <= '0;
      rburst     <= '0;
      rleft      <= '0;
      rinfl      <= 1'b0;
      rinfl_last <= 1'b0;
      rb_wp      <= 1'b0;
      rb_rp      <= 1'b0;
      rb_cnt     <= '0;
      rb_data    <= '{default: '0};
      rb_last    <= '{default: 1'b0};
    end else begin
      if (ar_valid && ar_ready) begin
        rbusy  <= 1'b1;
        rid    <= ar.id;
        raddr  <= ar.addr[OFF_W-1:0];
        rsize  <= ar.size;
        rburst <= ar.burst;
        rleft  <= {1'b0, ar.len} + 9'd1;
      end
      rinfl      <= rissue;
      rinfl_last <= rissue && (rleft == 9'd1);
      if (rissue) begin
        rleft <= rleft - 9'd1;
        if (rburst == BURST_INCR) raddr <= raddr + (OFF_W'(1) << rsize);
      end
      if (rinfl) begin
        rb_data[rb_wp] <= bram_rdata;
        rb_last[rb_wp] <= rinfl_last;
        rb_wp          <= ~rb_wp;
      end
      if (rpop) rb_rp <= ~rb_rp;
      rb_cnt <= rb_cnt + {1'b0, rinfl} - {1'b0, rpop};
      if (rpop && r.last) rbusy <= 1'b0;
    end
  end

endmodule

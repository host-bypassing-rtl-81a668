// hb_axi_xbar: AXI4 interconnect from the PCIe core to the five BRAM controllers.
//
// Every read or write the NIC makes into the FPGA's BAR arrives here and is
// forwarded to one of five regions according to the address map:
//   A rx buffer 0x00_0000-0x07_FFFF   B tx buffer 0x08_0000-0x0F_FFFF
//   C rx ring   0x10_0000-0x10_0FFF   D tx ring   0x10_1000-0x10_1FFF
//   E config    0x10_2000-0x10_2FFF
// The map is the design's; the insides are this design's own simplest form of
// the vendor interconnect. The address passed on is the offset inside the
// region. An address outside every region gets a DECERR response (a write
// burst's data is drained first; a read returns len+1 error beats).
//
// Write and read sides are independent and each handles one burst at a time:
// the address is registered (one cycle), forwarded to the selected port, then
// the W beats (or R beats) are passed through combinationally until the last
// one, then (for writes) the B response is passed back.
module hb_axi_xbar
  import hb_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // slave port (from the PCIe core)
  input  logic    s_aw_valid,
  output logic    s_aw_ready,
  input  axi_ax_t s_aw,
  input  logic    s_w_valid,
  output logic    s_w_ready,
  input  axi_w_t  s_w,
  output logic    s_b_valid,
  input  logic    s_b_ready,
  output axi_b_t  s_b,
  input  logic    s_ar_valid,
  output logic    s_ar_ready,
  input  axi_ax_t s_ar,
  output logic    s_r_valid,
  input  logic    s_r_ready,
  output axi_r_t  s_r,
  // master ports, indexed by region_e
  output logic    m_aw_valid [N_REGIONS],
  input  logic    m_aw_ready [N_REGIONS],
  output axi_ax_t m_aw       [N_REGIONS],
  output logic    m_w_valid  [N_REGIONS],
  input  logic    m_w_ready  [N_REGIONS],
  output axi_w_t  m_w        [N_REGIONS],
  input  logic    m_b_valid  [N_REGIONS],
  output logic    m_b_ready  [N_REGIONS],
  input  axi_b_t  m_b        [N_REGIONS],
  output logic    m_ar_valid [N_REGIONS],
  input  logic    m_ar_ready [N_REGIONS],
  output axi_ax_t m_ar       [N_REGIONS],
  input  logic    m_r_valid  [N_REGIONS],
  output logic    m_r_ready  [N_REGIONS],
  input  axi_r_t  m_r        [N_REGIONS]
);

  // Region lookup: returns 1 and the region for a mapped address.
  function automatic logic decode(input addr_t a, output region_e reg_sel,
                                  output addr_t off);
    reg_sel = REG_RXBUF;
    off     = '0;
    if (a[ADDR_W-1:24] != '0) return 1'b0;
    if (a[23:0] < TXBUF_BASE) begin
      reg_sel = REG_RXBUF;  off = a - addr_t'(RXBUF_BASE);  return 1'b1;
    end else if (a[23:0] < RXRING_BASE) begin
      reg_sel = REG_TXBUF;  off = a - addr_t'(TXBUF_BASE);  return 1'b1;
    end else if (a[23:0] < TXRING_BASE) begin
      reg_sel = REG_RXRING; off = a - addr_t'(RXRING_BASE); return 1'b1;
    end else if (a[23:0] < CFG_BASE) begin
      reg_sel = REG_TXRING; off = a - addr_t'(TXRING_BASE); return 1'b1;
    end else if (a[23:0] < CFG_BASE + 24'(CFG_BYTES)) begin
      reg_sel = REG_CFG;    off = a - addr_t'(CFG_BASE);    return 1'b1;
    end
    return 1'b0;
  endfunction

  // ------------------------------------------------------------ write side
  typedef enum logic [2:0] {WS_IDLE, WS_ADDR, WS_DATA, WS_RESP, WS_ERRD, WS_ERRB} ws_e;
  ws_e      ws;
  region_e  wsel;
  axi_ax_t  waw;

  // ------------------------------------------------------------ read side
  typedef enum logic [1:0] {RS_IDLE, RS_ADDR, RS_DATA, RS_ERR} rs_e;
  rs_e      rs;
  region_e  rsel;
  axi_ax_t  rar;
  logic [8:0] rerr_left;

  region_e dec_w_sel, dec_r_sel;
  addr_t   dec_w_off, dec_r_off;
  logic    dec_w_ok,  dec_r_ok;

  always_comb begin
    dec_w_ok = decode(s_aw.addr, dec_w_sel, dec_w_off);
    dec_r_ok = decode(s_ar.addr, dec_r_sel, dec_r_off);
  end

  assign s_aw_ready = (ws == WS_IDLE);
  assign s_ar_ready = (rs == RS_IDLE);

  always_comb begin
    for (int i = 0; i < N_REGIONS; i++) begin
      m_aw_valid[i] = (ws == WS_ADDR) && (wsel == region_e'(i));
      m_aw[i]       = waw;
      m_w_valid[i]  = (ws == WS_DATA) && (wsel == region_e'(i)) && s_w_valid;
      m_w[i]        = s_w;
      m_b_ready[i]  = (ws == WS_RESP) && (wsel == region_e'(i)) && s_b_ready;
      m_ar_valid[i] = (rs == RS_ADDR) && (rsel == region_e'(i));
      m_ar[i]       = rar;
      m_r_ready[i]  = (rs == RS_DATA) && (rsel == region_e'(i)) && s_r_ready;
    end
    s_w_ready = 1'b0;
    s_b_valid = 1'b0;
    s_b       = '{id: waw.id, resp: RESP_DECERR};
    unique case (ws)
      WS_DATA: s_w_ready = m_w_ready[wsel];
      WS_ERRD: s_w_ready = 1'b1;
      WS_RESP: begin s_b_valid = m_b_valid[wsel]; s_b = m_b[wsel]; end
      WS_ERRB: s_b_valid = 1'b1;
      default: ;
    endcase
    s_r_valid = 1'b0;
    s_r       = '{id: rar.id, data: '0, resp: RESP_DECERR, last: (rerr_left == 9'd1)};
    unique case (rs)
      RS_DATA: begin s_r_valid = m_r_valid[rsel]; s_r = m_r[rsel]; end
      RS_ERR:  s_r_valid = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ws        <= WS_IDLE;
      wsel      <= REG_RXBUF;
      waw       <= '0;
      rs        <= RS_IDLE;
      rsel      <= REG_RXBUF;
      rar       <= '0;
      rerr_left <= '0;
    end else begin
      unique case (ws)
        WS_IDLE: if (s_aw_valid) begin
          waw      <= s_aw;
          waw.addr <= dec_w_off;
          wsel     <= dec_w_sel;
          ws       <= dec_w_ok ? WS_ADDR : WS_ERRD;
        end
        WS_ADDR: if (m_aw_ready[wsel]) ws <= WS_DATA;
        WS_DATA: if (s_w_valid && s_w_ready && s_w.last) ws <= WS_RESP;
        WS_RESP: if (m_b_valid[wsel] && s_b_ready) ws <= WS_IDLE;
        WS_ERRD: if (s_w_valid && s_w.last) ws <= WS_ERRB;
        WS_ERRB: if (s_b_ready) ws <= WS_IDLE;
        default: ws <= WS_IDLE;
      endcase
      unique case (rs)
        RS_IDLE: if (s_ar_valid) begin
          rar       <= s_ar;
          rar.addr  <= dec_r_off;
          rsel      <= dec_r_sel;
          rerr_left <= {1'b0, s_ar.len} + 9'd1;
          rs        <= dec_r_ok ? RS_ADDR : RS_ERR;
        end
        RS_ADDR: if (m_ar_ready[rsel]) rs <= RS_DATA;
        RS_DATA: if (s_r_valid && s_r_ready && s_r.last) rs <= RS_IDLE;
        RS_ERR: if (s_r_ready) begin
          rerr_left <= rerr_left - 9'd1;
          if (rerr_left == 9'd1) rs <= RS_IDLE;
        end
        default: rs <= RS_IDLE;
      endcase
    end
  end

endmodule

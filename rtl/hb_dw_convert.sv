// hb_dw_convert: turns a tail pointer update into an AXI4 write to the NIC.
//
// The handlers update the NIC's rx and tx tail pointer registers by writing
// them directly over PCIe. Each update is one 4-byte write: the address is the
// NIC's physical register base (from the configuration register) plus the
// register offset carried with the update. On the 256-bit bus the 32-bit value
// is placed in the byte lanes selected by address bits [4:0] with a 4-bit
// strobe; AW has len 0, size 2 (4 bytes), burst INCR. The PCIe core forwards
// this write to the NIC ("AXI4 direct write" path).
//
// One write is outstanding at a time: an update is accepted (in_ready) only
// when idle, AW and W are then offered together and may complete in either
// order, and the B response ends the write. err_count counts non-OKAY
// responses. Addressing and the single-outstanding policy are this design's.
module hb_dw_convert
  import hb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  addr_t       nic_base,
  input  logic        in_valid,
  output logic        in_ready,
  input  tail_upd_t   in,
  output logic        aw_valid,
  input  logic        aw_ready,
  output axi_ax_t     aw,
  output logic        w_valid,
  input  logic        w_ready,
  output axi_w_t      w,
  input  logic        b_valid,
  output logic        b_ready,
  input  axi_b_t      b,
  output logic [31:0] writes,
  output logic [31:0] err_count
);
  typedef enum logic [1:0] {S_IDLE, S_SEND, S_RESP} state_e;
  state_e state;

  assign in_ready = (state == S_IDLE);
  assign b_ready  = (state == S_RESP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      aw_valid  <= 1'b0;
      w_valid   <= 1'b0;
      aw        <= '0;
      w         <= '0;
      writes    <= '0;
      err_count <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid) begin
          aw.id    <= '0;
          aw.addr  <= nic_base + addr_t'(in.reg_off);
          aw.len   <= 8'd0;
          aw.size  <= 3'd2;
          aw.burst <= BURST_INCR;
          w.data   <= data_t'(in.value) << (8 * ((nic_base[4:0] + in.reg_off[4:0]) & 5'h1c));
          w.strb   <= strb_t'(4'hf) << ((nic_base[4:0] + in.reg_off[4:0]) & 5'h1c);
          w.last   <= 1'b1;
          aw_valid <= 1'b1;
          w_valid  <= 1'b1;
          state    <= S_SEND;
        end
        S_SEND: begin
          if (aw_ready) aw_valid <= 1'b0;
          if (w_ready)  w_valid  <= 1'b0;
          if ((!aw_valid || aw_ready) && (!w_valid || w_ready)) state <= S_RESP;
        end
        S_RESP: if (b_valid) begin
          writes <= writes + 1;
          if (b.resp != RESP_OKAY) err_count <= err_count + 1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

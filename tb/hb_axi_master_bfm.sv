// hb_axi_master_bfm: AXI4 master bus-functional model for testbenches.
// Tasks: wr_burst (AW, then W beats, then B) and rd_burst (AR, then R beats)
// on the 256-bit bus. With `stall` set, W beats and RREADY/BREADY are held back
// at random to exercise the slave's handshakes. Bursts are INCR, size 5
// (32 bytes) unless a size is given.
module hb_axi_master_bfm
  import hb_pkg::*;
(
  input  logic    clk,
  output logic    aw_valid,
  input  logic    aw_ready,
  output axi_ax_t aw,
  output logic    w_valid,
  input  logic    w_ready,
  output axi_w_t  w,
  input  logic    b_valid,
  output logic    b_ready,
  input  axi_b_t  b,
  output logic    ar_valid,
  input  logic    ar_ready,
  output axi_ax_t ar,
  input  logic    r_valid,
  output logic    r_ready,
  input  axi_r_t  r
);
  logic stall = 1'b0;
  int   r_last_errors = 0;   // beats whose RLAST was wrong

  initial begin
    aw_valid = 0; aw = '0; w_valid = 0; w = '0; b_ready = 0;
    ar_valid = 0; ar = '0; r_ready = 0;
  end

  task automatic wr_burst(input addr_t addr, input data_t data[$], input strb_t strb[$],
                          input logic [2:0] size, output logic [1:0] resp);
    @(negedge clk);
    aw_valid = 1'b1;
    aw = '{id: 4'h1, addr: addr, len: 8'(data.size() - 1), size: size, burst: BURST_INCR};
    do @(posedge clk); while (!aw_ready);
    @(negedge clk);
    aw_valid = 1'b0;
    for (int i = 0; i < data.size(); i++) begin
      if (stall) repeat ($urandom_range(1)) @(negedge clk);
      w_valid = 1'b1;
      w = '{data: data[i], strb: strb[i], last: (i == data.size() - 1)};
      do @(posedge clk); while (!w_ready);
      @(negedge clk);
      w_valid = 1'b0;
    end
    if (stall) repeat ($urandom_range(2)) @(negedge clk);
    b_ready = 1'b1;
    do @(posedge clk); while (!b_valid);
    resp = b.resp;
    @(negedge clk);
    b_ready = 1'b0;
  endtask

  task automatic rd_burst(input addr_t addr, input int beats, output data_t data[$],
                          output logic [1:0] resp);
    data = {};
    resp = RESP_OKAY;
    @(negedge clk);
    ar_valid = 1'b1;
    ar = '{id: 4'h2, addr: addr, len: 8'(beats - 1), size: 3'd5, burst: BURST_INCR};
    do @(posedge clk); while (!ar_ready);
    @(negedge clk);
    ar_valid = 1'b0;
    while (data.size() < beats) begin
      r_ready = stall ? 1'($urandom_range(1)) : 1'b1;
      @(posedge clk);
      if (r_valid && r_ready) begin
        data.push_back(r.data);
        if (r.resp != RESP_OKAY) resp = r.resp;
        if (r.last != (data.size() == beats)) r_last_errors++;
      end
      @(negedge clk);
    end
    r_ready = 1'b0;
  endtask
endmodule

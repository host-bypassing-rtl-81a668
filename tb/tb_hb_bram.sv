// tb_hb_bram: self-checking test of the dual-port block RAM.
// Random byte-masked writes and reads on both ports are compared against a
// reference array kept in the testbench; checks cover the one-cycle read
// latency, read-first behaviour, byte enables and port-B priority when both
// ports write the same word in the same cycle.
module tb_hb_bram;
  import hb_pkg::*;
  localparam int unsigned DEPTH = 64;

  logic clk = 1'b0;
  always #2 clk = ~clk;

  bram_req_t a_req, b_req;
  data_t     a_rdata, b_rdata;
  int checks = 0, failures = 0;

  hb_bram #(.DEPTH(DEPTH)) dut (.clk, .a_req, .a_rdata, .b_req, .b_rdata);

  data_t ref_mem [DEPTH];

  function automatic data_t rnd_data();
    data_t d;
    for (int i = 0; i < 8; i++) d[32*i +: 32] = $urandom;
    return d;
  endfunction

  function automatic data_t apply(input data_t old, input data_t nw, input strb_t we);
    for (int b = 0; b < STRB_W; b++) if (we[b]) old[8*b +: 8] = nw[8*b +: 8];
    return old;
  endfunction

  task automatic check(input data_t got, input data_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t exp_a, exp_b;
    a_req = '0; b_req = '0;
    for (int i = 0; i < DEPTH; i++) ref_mem[i] = '0;
    @(posedge clk);
    // contents start at zero
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); a_req = '{en: 1'b1, we: '0, addr: 16'(i), wdata: '0};
      @(negedge clk); a_req = '0; check(a_rdata, '0, "initial zero");
    end
    // random traffic on both ports
    for (int n = 0; n < 2000; n++) begin
      logic [15:0] aa, ba;
      @(negedge clk);
      aa = 16'($urandom_range(DEPTH - 1));
      ba = ($urandom_range(3) == 0) ? aa : 16'($urandom_range(DEPTH - 1));
      a_req = '{en: 1'($urandom), we: ($urandom_range(1) == 0) ? '0 : strb_t'($urandom),
                addr: aa, wdata: rnd_data()};
      b_req = '{en: 1'($urandom), we: ($urandom_range(1) == 0) ? '0 : strb_t'($urandom),
                addr: ba, wdata: rnd_data()};
      exp_a = ref_mem[aa];
      exp_b = ref_mem[ba];
      if (a_req.en) ref_mem[aa] = apply(ref_mem[aa], a_req.wdata, a_req.we);
      if (b_req.en) ref_mem[ba] = apply(ref_mem[ba], b_req.wdata, b_req.we);
      @(negedge clk);
      if (a_req.en) check(a_rdata, exp_a, "port A read-first");
      if (b_req.en) check(b_rdata, exp_b, "port B read-first");
      a_req = '0; b_req = '0;
    end
    // final sweep through port B
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); b_req = '{en: 1'b1, we: '0, addr: 16'(i), wdata: '0};
      @(negedge clk); b_req = '0; check(b_rdata, ref_mem[i], "final contents");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

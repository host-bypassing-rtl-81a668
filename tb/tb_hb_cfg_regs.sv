// tb_hb_cfg_regs: self-checking test of the configuration register.
// Writes the NIC base, FPGA base and control byte through the BRAM-style
// port with partial byte enables (as 32- and 64-bit host writes would
// arrive), then checks the decoded fields, the read-back word, that other
// words read as zero and ignore writes, and that reset clears start.
module tb_hb_cfg_regs;
  import hb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #2 clk = ~clk;

  bram_req_t req;
  data_t     rdata;
  cfg_t      cfg;
  int checks = 0, failures = 0;

  hb_cfg_regs dut (.clk, .rst_n, .req, .rdata, .cfg);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // write `nbytes` bytes of `val` at byte offset `off` of word `word`
  task automatic wr(input int word, input int off, input int nbytes, input logic [63:0] val);
    @(negedge clk);
    req = '0;
    req.en = 1'b1;
    req.addr = 16'(word);
    for (int i = 0; i < nbytes; i++) begin
      req.we[off + i] = 1'b1;
      req.wdata[8*(off + i) +: 8] = val[8*i +: 8];
    end
    @(negedge clk);
    req = '0;
  endtask

  task automatic rd(input int word, output data_t d);
    @(negedge clk);
    req = '0; req.en = 1'b1; req.addr = 16'(word);
    @(negedge clk);
    d = rdata; req = '0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t d;
    req = '0;
    repeat (3) @(negedge clk);
    check(cfg == '0, "reset value");
    rst_n = 1'b1;
    wr(0, 0, 4, 64'hdead_beef);              // low half of NIC base
    wr(0, 4, 4, 64'h0000_00a1);              // high half of NIC base
    wr(0, 8, 8, 64'h0000_0002_3000_0000);    // FPGA base, one 64-bit write
    check(cfg.nic_base == 64'h0000_00a1_dead_beef, "nic_base");
    check(cfg.fpga_base == 64'h0000_0002_3000_0000, "fpga_base");
    check(!cfg.start && !cfg.wb_en && !cfg.batch_en, "control still clear");
    wr(0, 16, 1, 64'h5);                     // start + batch_en
    check(cfg.start && !cfg.wb_en && cfg.batch_en, "control bits");
    wr(0, 16, 1, 64'h3);                     // start + wb_en
    check(cfg.start && cfg.wb_en && !cfg.batch_en, "control bits rewritten");
    rd(0, d);
    check(d[63:0] == cfg.nic_base && d[127:64] == cfg.fpga_base && d[130:128] == 3'b011,
          "read back");
    wr(1, 0, 8, 64'hffff_ffff_ffff_ffff);   // another word: ignored
    check(cfg.nic_base == 64'h0000_00a1_dead_beef, "other word ignored");
    rd(1, d);
    check(d == '0, "other word reads zero");
    @(negedge clk); rst_n = 1'b0;
    @(negedge clk); check(!cfg.start && cfg.nic_base == '0, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench of the block-RAM FIFO (lzw_fifo) in its two roles: as the code
// buffer (12-bit words, 3838 deep) and as table t (25-bit words, 1280 deep).
// Random pushes and pops are compared with a queue model: the head word and
// rd_valid, the level, full at DEPTH words in memory, and the show-ahead
// latency (a word written into an empty FIFO is at the head one clock edge
// after the edge that writes it).
// Phases with many more pushes than pops drive each FIFO to full.
module tb_lzw_fifo;
  import lzw_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // ---- instance 1: code buffer ----
  logic        c_wr = 1'b0, c_rd = 1'b0, c_full, c_valid;
  logic [11:0] c_wdata = '0, c_rdata;
  logic [$clog2(TABLE_DEPTH+2)-1:0] c_level;
  lzw_fifo #(.W(CODE_W), .DEPTH(TABLE_DEPTH)) u_code (
    .clk, .rst_n, .wr_en(c_wr), .wr_data(c_wdata), .full(c_full),
    .rd_en(c_rd), .rd_valid(c_valid), .rd_data(c_rdata), .level(c_level));

  // ---- instance 2: table t ----
  logic          t_wr = 1'b0, t_rd = 1'b0, t_fl, t_valid;
  logic [T_W-1:0] t_wdata = '0, t_rdata;
  logic [$clog2(T_DEPTH+2)-1:0] t_level;
  lzw_fifo #(.W(T_W), .DEPTH(T_DEPTH)) u_t (
    .clk, .rst_n, .wr_en(t_wr), .wr_data(t_wdata), .full(t_fl),
    .rd_en(t_rd), .rd_valid(t_valid), .rd_data(t_rdata), .level(t_level));

  int unsigned cq [$];
  int unsigned tq [$];
  int n_cfull = 0, n_tfull = 0;

  // queue model of the show-ahead FIFO: a word counts in the level from the
  // clock edge that writes it and can be at the head from the next edge on
  int cage [$];
  int tage [$];

  task automatic check_fifo(string nm, ref int unsigned q[$], ref int age[$], input logic valid,
                            input logic [31:0] head, input int level, input logic full, input int depth);
    logic exp_valid;
    exp_valid = (q.size() > 0) && (age[0] >= 1);
    checks++;
    if (valid !== exp_valid || (valid && head !== q[0])) begin
      failures++;
      if (failures < 10) $display("FAIL %s head: valid %0d/%0d data %0h/%0h", nm, valid, exp_valid,
                                  head, (q.size() > 0) ? q[0] : 0);
    end
    checks++;
    if (level != q.size()) begin
      failures++;
      if (failures < 10) $display("FAIL %s level %0d, model %0d", nm, level, q.size());
    end
    checks++;
    if (full !== (level - (valid ? 1 : 0) == depth)) begin
      failures++;
      if (failures < 10) $display("FAIL %s full flag", nm);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < 40000; n++) begin
      int phase;
      logic do_cw, do_cr, do_tw, do_tr;
      phase = (n / 5000) % 4;   // 0 balanced, 1 fill, 2 balanced, 3 drain
      do_cw = (phase == 1) ? ($urandom % 10 != 0) : (phase == 3) ? ($urandom % 10 == 0) : ($urandom % 2 == 1);
      do_cr = (phase == 1) ? ($urandom % 10 == 0) : (phase == 3) ? ($urandom % 10 != 0) : ($urandom % 2 == 1);
      do_tw = do_cw; do_tr = do_cr;
      c_wr <= do_cw && !c_full; c_wdata <= 12'($urandom); c_rd <= do_cr && c_valid;
      t_wr <= do_tw && !t_fl;   t_wdata <= T_W'($urandom); t_rd <= do_tr && t_valid;
      @(posedge clk);
      // model update for the edge that just happened
      if (c_rd) begin void'(cq.pop_front()); void'(cage.pop_front()); end
      if (t_rd) begin void'(tq.pop_front()); void'(tage.pop_front()); end
      foreach (cage[i]) cage[i]++;
      foreach (tage[i]) tage[i]++;
      if (c_wr) begin cq.push_back(32'(c_wdata)); cage.push_back(0); end
      if (t_wr) begin tq.push_back(32'(t_wdata)); tage.push_back(0); end
      if (c_full) n_cfull++;
      if (t_fl)   n_tfull++;
      #1;
      check_fifo("code", cq, cage, c_valid, 32'(c_rdata), int'(c_level), c_full, TABLE_DEPTH);
      check_fifo("t", tq, tage, t_valid, 32'(t_rdata), int'(t_level), t_fl, T_DEPTH);
    end
    checks += 2;
    if (n_cfull == 0) begin failures++; $display("FAIL code buffer never full"); end
    if (n_tfull == 0) begin failures++; $display("FAIL table t never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

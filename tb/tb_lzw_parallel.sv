// End-to-end testbench of the top level, lzw_parallel, with every parameter
// at its default (34 decompression modules).
//
// Each module gets its own files: the data kind, the size and the output
// back-pressure differ from module to module, and every module decodes two
// files back to back without reset. Every module's character stream is
// compared with its original data, and every module must pulse done once
// per file. Mechanism counters over all modules (ClearCode segment restart,
// end of file, a code naming the entry it defines, output-buffer-full stall,
// table-t-full stall, output back-pressure, code-buffer backlog) must each
// be non-zero.
module tb_lzw_parallel;
  import lzw_pkg::*;
  import tb_lzw_pkg::*;

  localparam int N = 34;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  code_t code       [N];
  logic  code_valid [N];
  logic  code_ready [N];
  char_t ch         [N];
  logic  ch_valid   [N];
  logic  ch_ready   [N];
  logic  done       [N];

  int checks = 0;
  int failures = 0;
  longint cycle = 0;
  bit finished [N];

  lzw_parallel dut (
    .clk, .rst_n,
    .code_i(code), .code_valid_i(code_valid), .code_ready_o(code_ready),
    .char_o(ch), .char_valid_o(ch_valid), .char_ready_i(ch_ready),
    .done_o(done)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  int n_clear [N], n_done [N], n_self [N], n_ob_full [N], n_t_full [N], n_bp [N], backlog [N];

  for (genvar g = 0; g < N; g++) begin : g_drv
    byte_q_t got;
    int      rmode;

    // mechanism counters of module g
    always @(posedge clk) if (rst_n) begin
      if (dut.g_mod[g].u_decomp.u_part1.take && code[g] == code_t'(CLEAR_CODE)) n_clear[g]++;
      if (done[g]) n_done[g]++;
      if (dut.g_mod[g].u_decomp.u_part1.take && dut.g_mod[g].u_decomp.u_part1.idx != '0 &&
          32'(code[g]) == FIRST + 32'(dut.g_mod[g].u_decomp.u_part1.idx) - 1) n_self[g]++;
      if (dut.g_mod[g].u_decomp.trav_busy && !dut.g_mod[g].u_decomp.ob_space) n_ob_full[g]++;
      if (dut.g_mod[g].u_decomp.t_full) n_t_full[g]++;
      if (ch_valid[g] && !ch_ready[g]) n_bp[g]++;
      if (int'(dut.g_mod[g].u_decomp.cq_level) > backlog[g]) backlog[g] = int'(dut.g_mod[g].u_decomp.cq_level);
      if (ch_valid[g] && ch_ready[g]) got.push_back(ch[g]);
    end

    always @(posedge clk) begin
      unique case (rmode)
        0: ch_ready[g] <= 1'b1;
        1: ch_ready[g] <= ($urandom % 3) != 0;
        default: ch_ready[g] <= ((cycle / 12000) % 2) == 1;
      endcase
    end

    initial begin
      byte_q_t data;
      int_q_t  codes;
      n_clear[g] = 0; n_done[g] = 0; n_self[g] = 0; n_ob_full[g] = 0;
      n_t_full[g] = 0; n_bp[g] = 0; backlog[g] = 0;
      code_valid[g] = 1'b0;
      code[g]       = '0;
      rmode         = g % 3;
      finished[g]   = 1'b0;
      @(posedge rst_n);
      for (int f = 0; f < 2; f++) begin
        int kind, n, n_before;
        kind = (g + f) % 5;
        n    = (kind == 0) ? 5000 + 150 * g : 8000 + 400 * g;
        if (kind == 4) n = 9 + g;
        gen_data(kind, n, data);
        lzw_compress(data, codes);
        got.delete();
        n_before = n_done[g];
        @(posedge clk);
        foreach (codes[i]) begin
          code[g]       <= code_t'(codes[i]);
          code_valid[g] <= 1'b1;
          @(posedge clk);
          while (!code_ready[g]) @(posedge clk);
        end
        code_valid[g] <= 1'b0;
        while (n_done[g] == n_before) @(posedge clk);
        checks++;
        if (got.size() != data.size()) begin
          failures++;
          $display("FAIL module %0d file %0d: %0d chars out, %0d expected", g, f, got.size(), data.size());
        end
        for (int i = 0; i < data.size() && i < got.size(); i++) begin
          checks++;
          if (got[i] != data[i]) begin
            failures++;
            if (failures < 10) $display("FAIL module %0d file %0d char %0d: %0d, expected %0d", g, f, i, got[i], data[i]);
          end
        end
      end
      finished[g] = 1'b1;
    end
  end

  initial begin
    int s_clear, s_done, s_self, s_ob, s_t, s_bp, m_backlog;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    forever begin
      bit all;
      @(posedge clk);
      all = 1'b1;
      for (int i = 0; i < N; i++) all &= finished[i];
      if (all) break;
    end
    s_clear = 0; s_done = 0; s_self = 0; s_ob = 0; s_t = 0; s_bp = 0; m_backlog = 0;
    for (int i = 0; i < N; i++) begin
      s_clear += n_clear[i]; s_done += n_done[i]; s_self += n_self[i]; s_ob += n_ob_full[i];
      s_t += n_t_full[i]; s_bp += n_bp[i];
      if (backlog[i] > m_backlog) m_backlog = backlog[i];
      checks++;
      if (n_done[i] != 2) begin
        failures++;
        $display("FAIL module %0d: %0d done pulses", i, n_done[i]);
      end
    end
    $display("%0d cycles; mechanisms: clear=%0d done=%0d self-ref=%0d ob_full=%0d t_full=%0d backpressure=%0d max_backlog=%0d",
             cycle, s_clear, s_done, s_self, s_ob, s_t, s_bp, m_backlog);
    checks += 6;
    if (s_clear == 0)    begin failures++; $display("FAIL no ClearCode restart"); end
    if (s_self == 0)     begin failures++; $display("FAIL no self-referencing code"); end
    if (s_ob == 0)       begin failures++; $display("FAIL output buffer never full"); end
    if (s_t == 0)        begin failures++; $display("FAIL table t never full"); end
    if (s_bp == 0)       begin failures++; $display("FAIL no output back-pressure"); end
    if (m_backlog < 100) begin failures++; $display("FAIL code buffer backlog only %0d", m_backlog); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 2_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

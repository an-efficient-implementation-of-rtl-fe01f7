// Testbench of the character table C_f (lzw_char_table) at its default size.
// Port A does random reads and read-first writes, port B random reads at
// other addresses; every read is checked one cycle later against a reference
// array (a port A write returns the old word), and both read registers must
// hold while their enable is low.
module tb_lzw_char_table;
  import lzw_pkg::*;

  localparam int DEPTH = TABLE_DEPTH;

  logic        clk = 1'b0;
  logic        a_en = 1'b0, a_we = 1'b0, b_en = 1'b0;
  logic [11:0] a_addr = '0, b_addr = '0;
  logic [7:0]  a_wdata = '0, a_rdata, b_rdata;
  logic [7:0]  model [DEPTH];
  int checks = 0, failures = 0;

  lzw_char_table dut (.*);

  always #5 clk = ~clk;

  initial begin
    logic [7:0] exp_a, exp_b;
    logic       rd_a, rd_b;
    for (int i = 0; i < DEPTH; i++) begin
      a_en <= 1'b1; a_we <= 1'b1; a_addr <= 12'(i); a_wdata <= 8'($urandom);
      @(posedge clk);
      model[i] = a_wdata;
    end
    a_en <= 1'b0; a_we <= 1'b0;
    rd_a = 1'b0; rd_b = 1'b0; exp_a = '0; exp_b = '0;
    for (int n = 0; n < 20000; n++) begin
      int aa, ba;
      aa = int'($urandom % DEPTH);
      do ba = int'($urandom % DEPTH); while (ba == aa);
      a_en    <= ($urandom % 4) != 0;
      a_we    <= $urandom % 2;
      a_addr  <= 12'(aa);
      a_wdata <= 8'($urandom);
      b_en    <= ($urandom % 3) != 0;
      b_addr  <= 12'(ba);
      @(posedge clk);
      if (a_en) exp_a = model[a_addr];
      if (b_en) exp_b = model[b_addr];
      if (a_en && a_we) model[a_addr] = a_wdata;
      #1;
      if (a_en || rd_a) begin
        checks++;
        if (a_rdata !== exp_a) begin
          failures++;
          if (failures < 10) $display("FAIL port A: got %0d expected %0d", a_rdata, exp_a);
        end
      end
      if (b_en || rd_b) begin
        checks++;
        if (b_rdata !== exp_b) begin
          failures++;
          if (failures < 10) $display("FAIL port B: got %0d expected %0d", b_rdata, exp_b);
        end
      end
      rd_a |= a_en;
      rd_b |= b_en;
    end
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

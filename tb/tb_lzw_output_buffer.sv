// Testbench of the output buffer b (lzw_output_buffer) at its default size.
// Port B writes random words to random addresses while port A reads random
// addresses; each read is checked one cycle later against a reference array,
// and the read register must hold its value while a_en is low.
module tb_lzw_output_buffer;
  import lzw_pkg::*;

  localparam int DEPTH = OBUF_DEPTH;

  logic          clk = 1'b0;
  logic          a_en = 1'b0, b_we = 1'b0;
  logic [12:0]   a_addr = '0, b_addr = '0;
  logic [7:0]    a_rdata, b_wdata = '0;
  logic [7:0]    model [DEPTH];
  int checks = 0, failures = 0;

  lzw_output_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    logic [7:0] exp_q;
    logic        was_read;
    // fill every word once through port B
    for (int i = 0; i < DEPTH; i++) begin
      b_we <= 1'b1; b_addr <= 13'(i); b_wdata <= 8'($urandom);
      @(posedge clk);
      model[i] = b_wdata;
    end
    b_we <= 1'b0;
    was_read = 1'b0;
    exp_q    = '0;
    for (int n = 0; n < 20000; n++) begin
      int ra, wa;
      ra = int'($urandom % DEPTH);
      do wa = int'($urandom % DEPTH); while (wa == ra);
      a_en    <= ($urandom % 3) != 0;
      a_addr  <= 13'(ra);
      b_we    <= $urandom % 2;
      b_addr  <= 13'(wa);
      b_wdata <= 8'($urandom);
      @(posedge clk);
      if (a_en) exp_q = model[a_addr];
      if (b_we) model[b_addr] = b_wdata;
      #1;
      if (a_en || was_read) begin
        checks++;
        if (a_rdata !== exp_q) begin
          failures++;
          if (failures < 10) $display("FAIL read: got %0d expected %0d", a_rdata, exp_q);
        end
      end
      was_read |= a_en;
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

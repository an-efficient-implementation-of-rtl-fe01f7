// Array of independent LZW decompression modules.
//
// NUM_MODULES copies of lzw_decomp run side by side on one clock, each with
// its own code input stream, character output stream and done pulse, so
// NUM_MODULES files (or parts of one file cut at EndOfInformation
// boundaries) are decompressed at the same time. The module count of 34
// follows the original design; how the streams are fed is left to the
// surrounding system. Port i of every array belongs to module i.
module lzw_parallel
  import lzw_pkg::*;
#(
  parameter int unsigned NUM_MODULES = 34
) (
  input  logic  clk,
  input  logic  rst_n,
  input  code_t code_i       [NUM_MODULES],
  input  logic  code_valid_i [NUM_MODULES],
  output logic  code_ready_o [NUM_MODULES],
  output char_t char_o       [NUM_MODULES],
  output logic  char_valid_o [NUM_MODULES],
  input  logic  char_ready_i [NUM_MODULES],
  output logic  done_o       [NUM_MODULES]
);

  for (genvar g = 0; g < NUM_MODULES; g++) begin : g_mod
    lzw_decomp u_decomp (
      .clk, .rst_n,
      .code_i(code_i[g]), .code_valid_i(code_valid_i[g]), .code_ready_o(code_ready_o[g]),
      .char_o(char_o[g]), .char_valid_o(char_valid_o[g]), .char_ready_i(char_ready_i[g]),
      .done_o(done_o[g])
    );
  end

endmodule

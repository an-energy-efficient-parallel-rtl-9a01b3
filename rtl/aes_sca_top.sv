// aes_sca_top - the three parallel AES-128 encryption cores side by side.
//
// The cores are alternatives with different trade-offs between area,
// throughput and how well the power drawn hides the data being processed:
//
//   p32_*  aes_pipelined, 32-bit bus: 3 stages, a block every 4 clocks,
//          three blocks in flight;
//   p64_*  aes_pipelined, 64-bit bus: 5 stages, a block every 2 clocks,
//          five blocks in flight;
//   unr_*  aes_unrolled, 32-bit bus: the whole encryption in one clock.
//
// They share nothing but clock and reset. Each has its own key port
// (key_load, key, key_ready), plaintext port (in_valid, in_data, in_ready)
// and ciphertext port (out_valid, out_data); see the core modules for the
// timing. Putting them in one top is this design's packaging: in use one
// would normally take the core that suits the application. The unrolled core
// needs a clock period about five times that of the pipelined ones.
module aes_sca_top
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // 32-bit pipelined core
  input  logic        p32_key_load,
  input  block_t      p32_key,
  output logic        p32_key_ready,
  input  logic        p32_in_valid,
  input  logic [31:0] p32_in_data,
  output logic        p32_in_ready,
  output logic        p32_out_valid,
  output logic [31:0] p32_out_data,
  // 64-bit pipelined core
  input  logic        p64_key_load,
  input  block_t      p64_key,
  output logic        p64_key_ready,
  input  logic        p64_in_valid,
  input  logic [63:0] p64_in_data,
  output logic        p64_in_ready,
  output logic        p64_out_valid,
  output logic [63:0] p64_out_data,
  // unrolled core
  input  logic        unr_key_load,
  input  block_t      unr_key,
  output logic        unr_key_ready,
  input  logic        unr_in_valid,
  input  logic [31:0] unr_in_data,
  output logic        unr_in_ready,
  output logic        unr_out_valid,
  output logic [31:0] unr_out_data
);

  aes_pipelined #(.BUS_W(32)) u_p32 (
    .clk(clk), .rst_n(rst_n),
    .key_load_i(p32_key_load), .key_i(p32_key), .key_ready_o(p32_key_ready),
    .in_valid_i(p32_in_valid), .in_data_i(p32_in_data), .in_ready_o(p32_in_ready),
    .out_valid_o(p32_out_valid), .out_data_o(p32_out_data)
  );

  aes_pipelined #(.BUS_W(64)) u_p64 (
    .clk(clk), .rst_n(rst_n),
    .key_load_i(p64_key_load), .key_i(p64_key), .key_ready_o(p64_key_ready),
    .in_valid_i(p64_in_valid), .in_data_i(p64_in_data), .in_ready_o(p64_in_ready),
    .out_valid_o(p64_out_valid), .out_data_o(p64_out_data)
  );

  aes_unrolled #(.BUS_W(32)) u_unr (
    .clk(clk), .rst_n(rst_n),
    .key_load_i(unr_key_load), .key_i(unr_key), .key_ready_o(unr_key_ready),
    .in_valid_i(unr_in_valid), .in_data_i(unr_in_data), .in_ready_o(unr_in_ready),
    .out_valid_o(unr_out_valid), .out_data_o(unr_out_data)
  );

endmodule

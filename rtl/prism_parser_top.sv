// prism_parser_top: the three parser architectures of the framework side by
// side, all programmed from one SPI-loaded register file.
//
// The configuration and control words do not depend on the architecture, so
// one config_regfile drives
//   - a base parser on a 64-bit stream (one word per cycle),
//   - an overlay parser on an OVL_X x 64-bit stream (default 128 bits),
//   - a pipeline parser on a PIPE_BUS_W-bit stream (default 512 bits).
// Each stream has its own valid/data/last inputs and its own result: a
// one-cycle out_valid pulse with the packet's protocol bitmap (bit i set when
// protocol ID i+1 was found). Load the register file while the streams are
// idle.
//
// The three architectures are alternatives of one framework; placing them
// side by side on one register file is this implementation's choice, made
// possible because all three read the same configuration and control words.
module prism_parser_top
  import prism_pkg::*;
#(
  parameter int unsigned OVL_X      = 2,
  parameter int unsigned PIPE_BUS_W = 512
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // configuration port
  input  logic                     spi_sclk,
  input  logic                     spi_cs_n,
  input  logic                     spi_mosi,
  output logic                     spi_miso,
  output logic                     cfg_loaded,
  // base parser stream
  input  logic                     base_in_valid,
  input  logic [CHUNK_W-1:0]       base_in_data,
  input  logic                     base_in_last,
  output logic                     base_out_valid,
  output bitmap_t                  base_out_bitmap,
  // overlay parser stream
  input  logic                     ovl_in_valid,
  input  logic [OVL_X*CHUNK_W-1:0] ovl_in_data,
  input  logic                     ovl_in_last,
  output logic                     ovl_out_valid,
  output bitmap_t                  ovl_out_bitmap,
  // pipeline parser stream
  input  logic                     pipe_in_valid,
  input  logic [PIPE_BUS_W-1:0]    pipe_in_data,
  input  logic                     pipe_in_last,
  output logic                     pipe_out_valid,
  output bitmap_t                  pipe_out_bitmap
);

  cfg_t  cfg;
  ctrl_t ctrl;

  config_regfile u_regs (
    .clk        (clk),
    .rst_n      (rst_n),
    .spi_sclk   (spi_sclk),
    .spi_cs_n   (spi_cs_n),
    .spi_mosi   (spi_mosi),
    .spi_miso   (spi_miso),
    .cfg        (cfg),
    .ctrl       (ctrl),
    .cfg_loaded (cfg_loaded)
  );

  base_parser u_base (
    .clk        (clk),
    .rst_n      (rst_n),
    .cfg        (cfg),
    .ctrl       (ctrl),
    .in_valid   (base_in_valid),
    .in_data    (base_in_data),
    .in_last    (base_in_last),
    .out_valid  (base_out_valid),
    .out_bitmap (base_out_bitmap)
  );

  overlay_parser #(.X(OVL_X)) u_ovl (
    .clk        (clk),
    .rst_n      (rst_n),
    .cfg        (cfg),
    .ctrl       (ctrl),
    .in_valid   (ovl_in_valid),
    .in_data    (ovl_in_data),
    .in_last    (ovl_in_last),
    .out_valid  (ovl_out_valid),
    .out_bitmap (ovl_out_bitmap)
  );

  pipeline_parser #(.BUS_W(PIPE_BUS_W)) u_pipe (
    .clk        (clk),
    .rst_n      (rst_n),
    .cfg        (cfg),
    .ctrl       (ctrl),
    .in_valid   (pipe_in_valid),
    .in_data    (pipe_in_data),
    .in_last    (pipe_in_last),
    .out_valid  (pipe_out_valid),
    .out_bitmap (pipe_out_bitmap)
  );

endmodule

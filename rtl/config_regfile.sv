// config_regfile: the register file that holds the parser's configuration
// (masks, keys, next protocol IDs) and control (select/enable sets and
// candidate bitmaps), loaded over SPI.
//
// SPI mode 0, most significant bit first: while spi_cs_n is low, every rising
// edge of spi_sclk shifts spi_mosi into a LOAD_BITS-bit shadow register. The
// SPI pins are brought into the clk domain by two-flop synchronizers, so
// spi_sclk must be slower than clk/4. When spi_cs_n rises after exactly
// LOAD_BITS bits, the shadow is copied to the active registers in one cycle
// and cfg_loaded is set; a transfer of any other length is discarded. The
// stream is the configuration word followed by the control word, each in the
// bit order of prism_pkg. spi_miso returns the shadow's oldest bit, so a
// second transfer reads back the first. After reset all registers are zero,
// which parses nothing beyond the root protocol.
//
// A register file written over SPI is what the framework prescribes; the SPI
// mode, the length check, the commit on chip-select release and the read-back
// are this implementation's choices.
module config_regfile
  import prism_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  spi_sclk,
  input  logic  spi_cs_n,
  input  logic  spi_mosi,
  output logic  spi_miso,
  output cfg_t  cfg,
  output ctrl_t ctrl,
  output logic  cfg_loaded
);

  localparam int unsigned CNT_W = $clog2(LOAD_BITS + 2);

  logic [2:0] sclk_s, cs_s;    // [0] newest
  logic [1:0] mosi_s;
  logic [LOAD_BITS-1:0] shadow;
  logic [CNT_W-1:0]     count;

  wire sclk_rise = sclk_s[1] & ~sclk_s[2];
  wire cs_rise   = cs_s[1] & ~cs_s[2];
  wire selected  = ~cs_s[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s     <= '0;
      cs_s       <= '1;
      mosi_s     <= '0;
      shadow     <= '0;
      count      <= '0;
      cfg        <= '0;
      ctrl       <= '0;
      cfg_loaded <= 1'b0;
    end else begin
      sclk_s <= {sclk_s[1:0], spi_sclk};
      cs_s   <= {cs_s[1:0], spi_cs_n};
      mosi_s <= {mosi_s[0], spi_mosi};
      if (selected && sclk_rise) begin
        shadow <= {shadow[LOAD_BITS-2:0], mosi_s[1]};
        if (count != CNT_W'(LOAD_BITS + 1)) count <= count + 1'b1;
      end
      if (cs_rise) begin
        if (count == CNT_W'(LOAD_BITS)) begin
          {cfg, ctrl} <= shadow;
          cfg_loaded  <= 1'b1;
        end
        count <= '0;
      end
    end
  end

  assign spi_miso = shadow[LOAD_BITS-1];

endmodule

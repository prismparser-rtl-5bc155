// tb_config_regfile: SPI loads of random words; a short and a long transfer
// must be discarded, a full one copied to cfg/ctrl, and the next transfer
// must shift the previous content out on spi_miso. The live registers must
// not move while a transfer is in progress. Comparisons are made per 12-bit
// slice so that a wrong field shows up as such.
module tb_config_regfile;
  import prism_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  spi_sclk = 1'b0, spi_cs_n = 1'b1, spi_mosi = 1'b0;
  logic  spi_miso;
  cfg_t  cfg;
  ctrl_t ctrl;
  logic  cfg_loaded;
  int checks = 0, failures = 0;

  config_regfile dut (.*);

  int half = 3;          // SCLK half period in clk cycles
  logic busy = 1'b0;      // a transfer is in progress
  logic [LOAD_BITS-1:0] live;
  int moved = 0;

  // cfg/ctrl must stay put from cs_n low until the transfer is over
  always @(posedge clk)
    if (busy && {cfg, ctrl} != live) moved++;

  task automatic xfer(input logic [LOAD_BITS-1:0] d, input int nbits,
                      output logic [LOAD_BITS-1:0] rd);
    live = {cfg, ctrl};
    busy = 1'b1;
    rd = '0;
    @(negedge clk) spi_cs_n = 1'b0;
    for (int i = nbits - 1; i >= 0; i--) begin
      spi_mosi = d[i % LOAD_BITS];
      repeat (half) @(negedge clk);
      rd = {rd[LOAD_BITS-2:0], spi_miso};
      spi_sclk = 1'b1;
      repeat (half) @(negedge clk);
      spi_sclk = 1'b0;
    end
    repeat (3) @(negedge clk);
    busy = 1'b0;
    spi_cs_n = 1'b1;
    repeat (5) @(negedge clk);
  endtask

  function automatic logic [LOAD_BITS-1:0] rnd();
    logic [LOAD_BITS-1:0] r;
    for (int i = 0; i < LOAD_BITS; i += 32) r = {r[LOAD_BITS-33:0], $urandom};
    return r;
  endfunction

  // compare two load words slice by slice
  task automatic cmp(input logic [LOAD_BITS-1:0] got, exp, input string what);
    int bad;
    bad = 0;
    for (int i = 0; i < LOAD_BITS; i += 12) begin
      checks++;
      if (got[i +: 12] != exp[i +: 12]) begin
        failures++;
        bad++;
      end
    end
    if (bad != 0) $display("FAIL %s: %0d slices differ", what, bad);
  endtask

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [LOAD_BITS-1:0] a, b, rd;
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (cfg_loaded || cfg != '0 || ctrl != '0) failures++;
    a = rnd();
    xfer(a, LOAD_BITS - 1, rd);
    checks++;
    if (cfg_loaded) begin failures++; $display("FAIL short transfer loaded"); end
    xfer(a, LOAD_BITS + 1, rd);
    checks++;
    if (cfg_loaded) begin failures++; $display("FAIL long transfer loaded"); end
    checks++;
    if (cfg != '0 || ctrl != '0) begin failures++; $display("FAIL rejected transfer changed registers"); end
    xfer(a, LOAD_BITS, rd);
    checks++;
    if (!cfg_loaded) begin failures++; $display("FAIL cfg_loaded"); end
    cmp({cfg, ctrl}, a, "first load");
    for (int r = 0; r < 4; r++) begin
      half = (r == 3) ? 2 : 3;   // last round at clk/4
      b = rnd();
      // rejected transfer of random length: nothing changes, but it still
      // shifts the shadow register, so the read-back below is from it
      n = 1 + $urandom_range(0, LOAD_BITS - 2);
      xfer(b, n, rd);
      cmp({cfg, ctrl}, a, "after rejected transfer");
      b = rnd();
      xfer(b, LOAD_BITS, rd);
      cmp({cfg, ctrl}, b, "load");
      checks++;
      if (!cfg_loaded) failures++;
      a = b;
      b = rnd();
      xfer(b, LOAD_BITS, rd);
      cmp(rd, a, "read-back");
      cmp({cfg, ctrl}, b, "reload");
      a = b;
    end
    checks++;
    if (moved != 0) begin failures++; $display("FAIL registers moved during %0d transfer cycles", moved); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

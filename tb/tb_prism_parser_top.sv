// tb_prism_parser_top: end-to-end test of the whole parser at its default
// sizes (base 64-bit, overlay 128-bit, pipeline 512-bit).
//
// 1. With the register file still empty, a packet parses to the root only.
// 2. An SPI transfer of the wrong length is rejected (cfg_loaded stays low).
// 3. The enterprise graph is loaded over SPI; the loaded registers are compared
//    with the words sent, and a second transfer reads them back on spi_miso.
// 4. The same packet list is streamed into all three parsers at once, with
//    idle cycles; each result is checked for its bitmap and its cycle.
// 5. The registers are reloaded three times with random graphs, each time
//    without a reset, and packets are checked against the reference model
//    again: the hardware follows the new graph without any other change.
// Every mechanism the design has is counted and must occur: a rejected and an
// accepted load, read-back, bitmap-match hits and misses, parse windows
// closed by the clock-number limit and by in_last, overlay parses where a
// modified block took a transition, pipeline frames completed by the second
// beat and by in_last, and idle cycles inside packets.
module tb_prism_parser_top;
  import prism_pkg::*;
  import prism_tb_pkg::*;

  localparam int OVL_X = 2;
  localparam int PIPE_BUS_W = 512;
  localparam int SPI_HALF = 4;   // clk cycles per SPI clock phase

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic spi_sclk = 1'b0, spi_cs_n = 1'b1, spi_mosi = 1'b0;
  logic spi_miso, cfg_loaded;
  logic base_in_valid = 1'b0, base_in_last = 1'b0;
  logic [63:0] base_in_data = '0;
  logic base_out_valid;
  bitmap_t base_out_bitmap;
  logic ovl_in_valid = 1'b0, ovl_in_last = 1'b0;
  logic [OVL_X*64-1:0] ovl_in_data = '0;
  logic ovl_out_valid;
  bitmap_t ovl_out_bitmap;
  logic pipe_in_valid = 1'b0, pipe_in_last = 1'b0;
  logic [PIPE_BUS_W-1:0] pipe_in_data = '0;
  logic pipe_out_valid;
  bitmap_t pipe_out_bitmap;

  prism_parser_top dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;

  typedef struct { bitmap_t bm; longint at; } exp_t;
  exp_t q_base[$], q_ovl[$], q_pipe[$];

  // mechanism counters
  int n_load_ok = 0, n_load_reject = 0, n_readback = 0;
  int n_hit = 0, n_miss = 0, n_end_limit = 0, n_end_last = 0;
  int n_ovl_blk1 = 0, n_frame_2beat = 0, n_frame_last = 0, n_bubble = 0;
  int n_reload = 0;

  function automatic void check_out(string who, ref exp_t q[$], input bitmap_t bm);
    exp_t e;
    if (q.size() == 0) begin
      failures++;
      $display("FAIL %s unexpected result %b", who, bm);
      return;
    end
    e = q.pop_front();
    checks++;
    if (bm != e.bm || cyc != e.at) begin
      failures++;
      $display("FAIL %s bitmap %b (exp %b) at %0d (exp %0d)", who, bm, e.bm, cyc, e.at);
    end
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (base_out_valid) check_out("base", q_base, base_out_bitmap);
      if (ovl_out_valid)  check_out("overlay", q_ovl, ovl_out_bitmap);
      if (pipe_out_valid) check_out("pipeline", q_pipe, pipe_out_bitmap);
      if (base_in_valid && !dut.u_base.done_q) begin
        if (dut.u_base.u_ctrl.hit) n_hit++;
        else n_miss++;
        if (int'(dut.u_base.clk_num) == N_CLK - 1) n_end_limit++;
        else if (base_in_last) n_end_last++;
      end
      if (ovl_in_valid && dut.u_ovl.chain[2] != dut.u_ovl.chain[1]) n_ovl_blk1++;
      if (dut.u_pipe.u_sel.frame_valid) begin
        if (dut.u_pipe.u_sel.beat_q == 1) n_frame_2beat++;
        else n_frame_last++;
      end
    end
    cyc <= cyc + 1;
  end

  // ------------------------------------------------------------------ SPI
  task automatic spi_xfer(input logic [LOAD_BITS-1:0] data, input int nbits,
                          output logic [LOAD_BITS-1:0] rd);
    rd = '0;
    @(negedge clk) spi_cs_n = 1'b0;
    for (int i = nbits - 1; i >= 0; i--) begin
      spi_mosi = data[i];
      repeat (SPI_HALF) @(negedge clk);
      rd = {rd[LOAD_BITS-2:0], spi_miso};
      spi_sclk = 1'b1;
      repeat (SPI_HALF) @(negedge clk);
      spi_sclk = 1'b0;
    end
    repeat (SPI_HALF) @(negedge clk);
    spi_cs_n = 1'b1;
    repeat (6) @(negedge clk);
  endtask

  // ------------------------------------------------------------------ streams
  task automatic send_base(const ref bytes_t p, input bitmap_t ex);
    int n = words_of(p.size(), 8);
    int w_end = (n < N_CLK ? n : N_CLK) - 1;
    for (int w = 0; w < n; w++) begin
      if (w > 0 && $urandom_range(7) == 0) begin
        @(negedge clk) base_in_valid = 1'b0;
        n_bubble++;
      end
      @(negedge clk);
      base_in_valid = 1'b1;
      base_in_data  = bus_word(p, w, 8)[63:0];
      base_in_last  = (w == n - 1);
      if (w == w_end) begin
        exp_t e;
        e.bm = ex; e.at = cyc + 1;
        q_base.push_back(e);
      end
    end
    @(negedge clk) base_in_valid = 1'b0;
    base_in_last = 1'b0;
  endtask

  task automatic send_ovl(const ref bytes_t p, input bitmap_t ex);
    int bb = 8 * OVL_X;
    int n = words_of(p.size(), bb);
    int win = (N_CLK + OVL_X - 1) / OVL_X;
    int w_end = (n < win ? n : win) - 1;
    for (int w = 0; w < n; w++) begin
      @(negedge clk);
      ovl_in_valid = 1'b1;
      ovl_in_data  = bus_word(p, w, bb)[OVL_X*64-1:0];
      ovl_in_last  = (w == n - 1);
      if (w == w_end) begin
        exp_t e;
        e.bm = ex; e.at = cyc + 1;
        q_ovl.push_back(e);
      end
    end
    @(negedge clk) ovl_in_valid = 1'b0;
    ovl_in_last = 1'b0;
  endtask

  task automatic send_pipe(const ref bytes_t p, input bitmap_t ex);
    int bb = PIPE_BUS_W / 8;
    int n = words_of(p.size(), bb);
    int win = (N_CLK * 8 + bb - 1) / bb;
    int w_end = (n < win ? n : win) - 1;
    for (int w = 0; w < n; w++) begin
      @(negedge clk);
      pipe_in_valid = 1'b1;
      pipe_in_data  = bus_word(p, w, bb)[PIPE_BUS_W-1:0];
      pipe_in_last  = (w == n - 1);
      if (w == w_end) begin
        exp_t e;
        e.bm = ex; e.at = cyc + N_CLK;
        q_pipe.push_back(e);
      end
    end
    @(negedge clk) pipe_in_valid = 1'b0;
    pipe_in_last = 1'b0;
  endtask

  // Stream a packet list into all three parsers at once, each result expected
  // as the reference model computes it for that parser's bus width.
  task automatic run_ref(const ref bytes_t pk[$], input cfg_t cfg, input ctrl_t ctrl);
    fork
      for (int i = 0; i < pk.size(); i++) begin
        automatic bytes_t x = pk[i];
        send_base(x, ref_parse(cfg, ctrl, x, 8));
      end
      for (int i = 0; i < pk.size(); i++) begin
        automatic bytes_t x = pk[i];
        send_ovl(x, ref_parse(cfg, ctrl, x, 8 * OVL_X));
      end
      for (int i = 0; i < pk.size(); i++) begin
        automatic bytes_t x = pk[i];
        send_pipe(x, ref_parse(cfg, ctrl, x, PIPE_BUS_W / 8));
        if ($urandom_range(3) == 0) @(negedge clk);
      end
    join
    repeat (20) @(negedge clk);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_t  cfg;
    ctrl_t ctrl;
    logic [LOAD_BITS-1:0] word, rd;
    bytes_t pk[$];
    bitmap_t ex[$];
    bytes_t p;
    bitmap_t hand;
    int npk;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. Unprogrammed: only the root protocol.
    p = make_pkt(0, 0, 0, 80, hand);
    send_base(p, bit_of(ROOT_ID));
    repeat (12) @(negedge clk);

    // 2. Wrong-length transfer is rejected.
    enterprise_cfg(cfg, ctrl);
    word = {cfg, ctrl};
    spi_xfer(word, 100, rd);
    checks++;
    if (cfg_loaded) begin failures++; $display("FAIL short transfer accepted"); end
    else n_load_reject++;

    // 3. Full load, then read back with a second transfer.
    spi_xfer(word, LOAD_BITS, rd);
    checks++;
    if (!cfg_loaded || dut.cfg != cfg || dut.ctrl != ctrl) begin
      failures++; $display("FAIL configuration not loaded");
    end else n_load_ok++;
    spi_xfer(word, LOAD_BITS, rd);
    checks++;
    if (rd != word) begin failures++; $display("FAIL read-back differs"); end
    else n_readback++;

    // 4. Same packets into all three parsers.
    npk = 120;
    for (int i = 0; i < npk; i++) begin
      automatic int len = (i % 10 == 0) ? 64 : ($urandom_range(4) == 0) ? $urandom_range(65, 71) : $urandom_range(72, 200);
      p = make_pkt($urandom_range(2), $urandom_range(3), $urandom_range(3), len, hand);
      if (len < 72) hand = ref_parse(cfg, ctrl, p, 8);   // short: the header may be cut
      pk.push_back(p);
      ex.push_back(hand);
    end
    fork
      for (int i = 0; i < npk; i++) begin
        automatic bytes_t x = pk[i];
        automatic bitmap_t e = (x.size() >= 72) ? ex[i] : ref_parse(cfg, ctrl, x, 8);
        send_base(x, e);
      end
      for (int i = 0; i < npk; i++) begin
        automatic bytes_t x = pk[i];
        automatic bitmap_t e = (x.size() >= 72) ? ex[i] : ref_parse(cfg, ctrl, x, 8 * OVL_X);
        send_ovl(x, e);
        if ($urandom_range(2) == 0) @(negedge clk);
      end
      for (int i = 0; i < npk; i++) begin
        automatic bytes_t x = pk[i];
        automatic bitmap_t e = (x.size() >= 72) ? ex[i] : ref_parse(cfg, ctrl, x, PIPE_BUS_W / 8);
        send_pipe(x, e);
      end
    join
    repeat (20) @(negedge clk);
    checks++;
    if (q_base.size() + q_ovl.size() + q_pipe.size() != 0) begin
      failures++; $display("FAIL results missing");
    end

    // 5. Reprogram with random graphs, no reset in between.
    for (int g = 0; g < 3; g++) begin
      bytes_t rp[$];
      bytes_t p0;
      rand_case(cfg, ctrl, p0, 8);
      word = {cfg, ctrl};
      spi_xfer(word, LOAD_BITS, rd);
      checks++;
      if (dut.cfg != cfg || dut.ctrl != ctrl) begin
        failures++; $display("FAIL reload %0d not taken", g);
      end else n_reload++;
      rp.push_back(p0);
      for (int i = 0; i < 19; i++) begin
        automatic bytes_t v = p0;
        for (int j = $urandom_range(3); j > 0; j--) v[$urandom_range(v.size() - 1)] = rbyte();
        rp.push_back(v);
      end
      run_ref(rp, cfg, ctrl);
      checks++;
      if (q_base.size() + q_ovl.size() + q_pipe.size() != 0) begin
        failures++; $display("FAIL results missing after reload %0d", g);
      end
    end

    $display("mechanisms: load_ok=%0d load_reject=%0d readback=%0d hit=%0d miss=%0d end_limit=%0d end_last=%0d ovl_block1=%0d frame_2beat=%0d frame_last=%0d bubbles=%0d reload=%0d",
             n_load_ok, n_load_reject, n_readback, n_hit, n_miss, n_end_limit, n_end_last,
             n_ovl_blk1, n_frame_2beat, n_frame_last, n_bubble, n_reload);
    checks++;
    if (n_load_ok == 0 || n_load_reject == 0 || n_readback == 0 || n_hit == 0 || n_miss == 0 ||
        n_end_limit == 0 || n_end_last == 0 || n_ovl_blk1 == 0 || n_frame_2beat == 0 ||
        n_frame_last == 0 || n_bubble == 0 || n_reload != 3) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_overlay_parser: self-checking test of the overlay parser at its default
// size, X = 2 (128-bit bus).
//
// Phase 1 runs random configurations, control words and packets (8..80
// bytes, so early in_last is covered) one packet at a time against the
// reference model. Phase 2 loads the enterprise graph and streams frames of
// every kind back to back, with idle cycles inside and between packets,
// checking each result against the bitmap the frame was built to give and
// the result cycle: one cycle after the packet's 5th 128-bit word (ceil(9/2))
// or its last word.
module tb_overlay_parser;
  import prism_pkg::*;
  import prism_tb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  cfg_t         cfg;
  ctrl_t        ctrl;
  logic         in_valid = 1'b0, in_last = 1'b0;
  localparam int X = 2;
  localparam int BB = 8 * X;   // bus bytes
  logic [X*64-1:0] in_data = '0;
  logic         out_valid;
  bitmap_t      out_bitmap;

  int  checks = 0, failures = 0;
  longint cyc = 0;

  typedef struct { bitmap_t bm; longint at; } exp_t;
  exp_t expq[$];

  overlay_parser dut (.*);

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected result %b at %0d", out_bitmap, cyc);
      end else begin
        exp_t e;
        e = expq.pop_front();
        checks++;
        if (out_bitmap != e.bm || cyc != e.at) begin
          failures++;
          $display("FAIL bitmap %b (exp %b) at cycle %0d (exp %0d)", out_bitmap, e.bm, cyc, e.at);
        end
      end
    end
    cyc <= cyc + 1;
  end

  task automatic send(const ref bytes_t p, input bitmap_t exp_bm, input bit bubbles);
    int n = words_of(p.size(), BB);
    int win = (N_CLK + X - 1) / X;
    int w_end = (n < win ? n : win) - 1;
    for (int w = 0; w < n; w++) begin
      while (bubbles && $urandom_range(5) == 0) begin
        @(negedge clk) in_valid = 1'b0;
      end
      @(negedge clk);
      in_valid = 1'b1;
      in_data  = bus_word(p, w, BB)[X*64-1:0];
      in_last  = (w == n - 1);
      if (w == w_end) begin
        exp_t e;
        e.bm = exp_bm;
        e.at = cyc + 1;
        expq.push_back(e);
      end
    end
    @(negedge clk) in_valid = 1'b0;
    in_last = 1'b0;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t  p;
    bitmap_t ex, hand;
    int nonroot = 0;
    cfg  = '0;
    ctrl = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Phase 1: random.
    for (int i = 0; i < 400; i++) begin
      rand_case(cfg, ctrl, p, BB);
      ex = ref_parse(cfg, ctrl, p, BB);
      if (ex != bit_of(ROOT_ID)) nonroot++;
      send(p, ex, 1'b0);
      repeat (2) @(negedge clk);
    end
    checks++;
    if (nonroot < 100) begin failures++; $display("FAIL too few random parses went past the root (%0d)", nonroot); end
    // Phase 2: enterprise graph, streaming.
    enterprise_cfg(cfg, ctrl);
    for (int i = 0; i < 300; i++) begin
      p = rand_pkt(160, hand);
      ex = ref_parse(cfg, ctrl, p, BB);
      checks++;
      if (ex != hand) begin failures++; $display("FAIL reference %b vs built %b", ex, hand); end
      send(p, hand, 1'b1);
      if ($urandom_range(1)) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d results missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

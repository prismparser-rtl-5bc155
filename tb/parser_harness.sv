// parser_harness: drives one parser of a given bus width with NPKT random
// frames of the enterprise graph (back to back, with idle cycles) and checks
// every result for its bitmap and its cycle. PIPE = 0 selects an overlay
// parser with X = BUS_W/64, PIPE = 1 a pipeline parser. Reports its counts
// and raises done when finished.
module parser_harness
  import prism_pkg::*;
  import prism_tb_pkg::*;
#(
  parameter int BUS_W = 128,
  parameter bit PIPE  = 1'b0,
  parameter int NPKT  = 100
) (
  input  logic  clk,
  input  logic  rst_n,
  input  cfg_t  cfg,
  input  ctrl_t ctrl,
  output int    checks,
  output int    failures,
  output int    max_latency,
  output logic  done
);

  localparam int BB  = BUS_W / 8;
  localparam int X   = BUS_W / 64;
  localparam int WIN = PIPE ? (N_CLK * 8 + BB - 1) / BB : (N_CLK + X - 1) / X;
  localparam int LAT = PIPE ? N_CLK : 1;   // cycles from the last window beat to the result

  logic             in_valid = 1'b0, in_last = 1'b0;
  logic [BUS_W-1:0] in_data = '0;
  logic             out_valid;
  bitmap_t          out_bitmap;
  longint           cyc = 0;

  typedef struct { bitmap_t bm; longint at; longint first; } exp_t;
  exp_t q[$];

  if (PIPE) begin : g_pipe
    pipeline_parser #(.BUS_W(BUS_W)) dut (.*);
  end else begin : g_ovl
    overlay_parser #(.X(X)) dut (.*);
  end

  initial begin
    checks = 0;
    failures = 0;
    max_latency = 0;
    done = 1'b0;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (q.size() == 0) begin
        failures++;
        $display("FAIL %0d-bit: unexpected result", BUS_W);
      end else begin
        exp_t e;
        e = q.pop_front();
        checks++;
        if (out_bitmap != e.bm || cyc != e.at) begin
          failures++;
          $display("FAIL %0d-bit: bitmap %b exp %b, cycle %0d exp %0d", BUS_W, out_bitmap, e.bm, cyc, e.at);
        end
        if (int'(cyc - e.first) > max_latency) max_latency = int'(cyc - e.first);
      end
    end
    cyc <= cyc + 1;
  end

  initial begin
    bytes_t p;
    bitmap_t ex;
    longint first;
    wait (rst_n);
    repeat (2) @(negedge clk);
    for (int i = 0; i < NPKT; i++) begin
      automatic int n;
      automatic int w_end;
      p = rand_pkt(200, ex);
      n = words_of(p.size(), BB);
      w_end = (n < WIN ? n : WIN) - 1;
      for (int w = 0; w < n; w++) begin
        @(negedge clk);
        if (w == 0) first = cyc;
        in_valid = 1'b1;
        in_data  = bus_word(p, w, BB)[BUS_W-1:0];
        in_last  = (w == n - 1);
        if (w == w_end) begin
          exp_t e;
          e.bm = ex;
          e.at = cyc + LAT;
          e.first = first;
          q.push_back(e);
        end
      end
      @(negedge clk);
      in_valid = 1'b0;
      in_last  = 1'b0;
    end
    repeat (N_CLK + 4) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d-bit: results missing", BUS_W); end
    done = 1'b1;
  end

endmodule

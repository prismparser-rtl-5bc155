// tb_workloads: the bus sizes of the overlay and pipeline evaluations, all
// parsing the enterprise graph at once: overlay parsers with X = 1, 2, 3, 4,
// 5, 8 and 16 (64 to 1024 bits) and pipeline parsers of 512 and 1024 bits.
// Besides bitmaps and result cycles it checks the worst latency of each, in
// cycles from a packet's first beat to its result: ceil(9/X) for the overlay
// (the parse window) and, for the pipeline, the frame's beats plus 9 stages.
module tb_workloads;
  import prism_pkg::*;
  import prism_tb_pkg::*;

  localparam int NH = 9;
  localparam int WIDTH[NH]   = '{64, 128, 192, 256, 320, 512, 1024, 512, 1024};
  localparam bit ISPIPE[NH]  = '{0, 0, 0, 0, 0, 0, 0, 1, 1};
  // expected worst latency: overlay ceil(9/X); pipeline (beats per frame - 1) + 9
  localparam int EXPLAT[NH]  = '{9, 5, 3, 3, 2, 2, 1, 10, 9};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  cfg_t  cfg;
  ctrl_t ctrl;
  int    h_checks[NH], h_failures[NH], h_lat[NH];
  logic  h_done[NH];

  for (genvar h = 0; h < NH; h++) begin : g_h
    parser_harness #(.BUS_W(WIDTH[h]), .PIPE(ISPIPE[h]), .NPKT(150)) u_h (
      .clk         (clk),
      .rst_n       (rst_n),
      .cfg         (cfg),
      .ctrl        (ctrl),
      .checks      (h_checks[h]),
      .failures    (h_failures[h]),
      .max_latency (h_lat[h]),
      .done        (h_done[h])
    );
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

  initial begin
    int checks, failures;
    bit all_done;
    enterprise_cfg(cfg, ctrl);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    do begin
      @(negedge clk);
      all_done = 1'b1;
      for (int h = 0; h < NH; h++) all_done &= h_done[h];
    end while (!all_done);
    checks = 0;
    failures = 0;
    for (int h = 0; h < NH; h++) begin
      $display("%s %4d bits: %0d results, worst latency %0d cycles", ISPIPE[h] ? "pipeline" : "overlay ",
               WIDTH[h], h_checks[h], h_lat[h]);
      checks += h_checks[h] + 1;
      failures += h_failures[h];
      if (h_lat[h] != EXPLAT[h]) begin
        failures++;
        $display("FAIL latency %0d, expected %0d", h_lat[h], EXPLAT[h]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

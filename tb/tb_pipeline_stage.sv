// tb_pipeline_stage: stage 3 (a clock number the enterprise graph uses) with
// random control; one frame per cycle, each result checked one cycle later.
module tb_pipeline_stage;
  import prism_pkg::*;
  import prism_tb_pkg::*;

  localparam int S = 3;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  always #5 clk = ~clk;

  cfg_t    cfg;
  ctrl_t   ctrl;
  logic    in_valid = 1'b0;
  bitmap_t in_bitmap = '0;
  frame_t  in_frame = '0;
  logic    out_valid;
  bitmap_t out_bitmap;
  frame_t  out_frame;
  int checks = 0, failures = 0, n_add = 0, n_hold = 0;

  pipeline_stage #(.STAGE(S)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t p;
    bitmap_t e;
    frame_t  f;
    logic    v;
    rand_case(cfg, ctrl, p, 8);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // Check the previous cycle's frame.
      if (i > 0) begin
        checks++;
        if (out_valid != v || (v && (out_bitmap != e || out_frame != f))) begin
          failures++;
          $display("FAIL stage result %b exp %b", out_bitmap, e);
        end
      end
      v = ($urandom_range(4) != 0);
      in_valid = v;
      for (int w = 0; w < N_CLK; w++)
        for (int b = 0; b < 8; b++) in_frame[w][63 - 8 * b -: 8] = rbyte();
      in_bitmap = $urandom_range(1) ? ctrl.cand[S][$urandom_range(N_DIR - 1)] : bitmap_t'($urandom);
      begin
        automatic int d = ref_dir(ctrl.cand[S], in_bitmap);
        automatic bitmap_t add = (d >= 0) ? ref_found(cfg, ctrl.sel_en[S][d], in_frame[S]) : '0;
        if (v) begin
          e = in_bitmap | add;
          f = in_frame;
          if (add != '0) n_add++; else n_hold++;
        end
      end
      if ((i % 50) == 49) begin
        // New random configuration between bursts.
        @(negedge clk);
        in_valid = 1'b0;
        v = 1'b0;
        rand_case(cfg, ctrl, p, 8);
      end
    end
    checks++;
    if (n_add < 50 || n_hold < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

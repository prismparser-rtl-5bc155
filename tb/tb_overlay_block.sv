// tb_overlay_block: the modified block must give prev plus the protocols the
// select/enable set matching prev finds in its slice, or prev alone.
module tb_overlay_block;
  import prism_pkg::*;
  import prism_tb_pkg::*;

  logic [CLK_W-1:0]   clk_num;
  cfg_t               cfg;
  ctrl_t              ctrl;
  logic [CHUNK_W-1:0] data;
  bitmap_t            prev, next;
  int checks = 0, failures = 0, n_add = 0;

  overlay_block dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t p;
    for (int i = 0; i < 3000; i++) begin
      int cn, d;
      bitmap_t e;
      rand_case(cfg, ctrl, p, 8);
      cn = $urandom_range(0, N_CLK);
      clk_num = CLK_W'(cn);
      for (int b = 0; b < 8; b++) data[63 - 8 * b -: 8] = pb(p, 8 * cn + b);
      prev = (cn < N_CLK && $urandom_range(3) != 0) ? ctrl.cand[cn][$urandom_range(N_DIR - 1)]
                                                   : bitmap_t'($urandom);
      d = (cn < N_CLK) ? ref_dir(ctrl.cand[cn], prev) : -1;
      e = prev | ((d >= 0) ? ref_found(cfg, ctrl.sel_en[cn][d], data) : '0);
      #1;
      checks++;
      if (next != e) begin
        failures++;
        $display("FAIL clk %0d next %b exp %b", cn, next, e);
      end
      if (e != prev) n_add++;
    end
    checks++;
    if (n_add < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_prism_controller: random control words, every clock number (including
// ones past the programmed range) and bitmaps that hit or miss.
module tb_prism_controller;
  import prism_pkg::*;
  import prism_tb_pkg::*;

  logic [CLK_W-1:0] clk_num;
  ctrl_t            ctrl;
  bitmap_t          prev;
  sel_en_set_t      sets;
  cand_set_t        cands;
  logic             hit;
  logic [DIR_W-1:0] dir;
  sel_en_t          se;
  int checks = 0, failures = 0, n_hit = 0;

  prism_controller dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_t   c;
    bytes_t p;
    for (int i = 0; i < 3000; i++) begin
      int cn, d;
      sel_en_t e;
      rand_case(c, ctrl, p, 8);
      cn = $urandom_range(0, N_CLK + 2);
      clk_num = CLK_W'(cn);
      prev = (cn < N_CLK && $urandom_range(1)) ? ctrl.cand[cn][$urandom_range(N_DIR - 1)]
                                              : bitmap_t'($urandom);
      d = (cn < N_CLK) ? ref_dir(ctrl.cand[cn], prev) : -1;
      e = (d >= 0) ? ctrl.sel_en[cn][d] : '0;
      #1;
      checks++;
      if (se != e || hit != (d >= 0)) begin
        failures++;
        $display("FAIL clk %0d d %0d", cn, d);
      end
      checks++;
      if (cn < N_CLK && (sets != ctrl.sel_en[cn] || cands != ctrl.cand[cn])) failures++;
      if (cn >= N_CLK && (sets != '0 || cands != '0)) failures++;
      if (d >= 0) n_hit++;
    end
    checks++;
    if (n_hit < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

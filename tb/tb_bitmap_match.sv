// tb_bitmap_match: candidates with duplicates and zero (unused) slots.
module tb_bitmap_match;
  import prism_pkg::*;
  import prism_tb_pkg::*;

  bitmap_t          prev;
  cand_set_t        cand;
  logic             hit;
  logic [DIR_W-1:0] dir;
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0;

  bitmap_match dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bitmap_t pool[4] = '{10'b0, 10'b1, 10'b101, 10'b1011};
    for (int i = 0; i < 4000; i++) begin
      int d;
      prev = pool[$urandom_range(3)];
      for (int j = 0; j < N_DIR; j++) cand[j] = pool[$urandom_range(3)];
      d = ref_dir(cand, prev);
      #1;
      checks++;
      if (hit != (d >= 0) || (d >= 0 && int'(dir) != d)) begin
        failures++;
        $display("FAIL prev %b hit %b dir %0d exp %0d", prev, hit, dir, d);
      end
      if (d >= 0) n_hit++; else n_miss++;
    end
    checks++;
    if (n_hit == 0 || n_miss == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

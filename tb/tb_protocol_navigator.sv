// tb_protocol_navigator: random configurations, select/enable sets and words
// (bytes from a small set so that keys match); checks found and next.
module tb_protocol_navigator;
  import prism_pkg::*;
  import prism_tb_pkg::*;

  logic [CHUNK_W-1:0] data;
  cfg_t    cfg;
  sel_en_t se;
  bitmap_t prev, found, next;
  int checks = 0, failures = 0, n_multi = 0;

  protocol_navigator dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl_t  t;
    bytes_t p;
    for (int i = 0; i < 3000; i++) begin
      bitmap_t e;
      rand_case(cfg, t, p, 8);
      for (int b = 0; b < 8; b++) data[63 - 8 * b -: 8] = pb(p, b);
      se   = t.sel_en[0][$urandom_range(N_DIR - 1)];
      prev = bitmap_t'($urandom);
      e = ref_found(cfg, se, data);
      #1;
      checks++;
      if (found != e || next != (prev | e)) begin
        failures++;
        $display("FAIL found %b exp %b", found, e);
      end
      if ($countones(e) > 1) n_multi++;
    end
    checks++;
    if (n_multi < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

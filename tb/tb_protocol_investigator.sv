// tb_protocol_investigator: random words, masks, keys and chunk selects; the
// expected bitmap is worked out from the bytes of the word.
module tb_protocol_investigator;
  import prism_pkg::*;
  import prism_tb_pkg::*;

  logic [CHUNK_W-1:0] data;
  logic               en;
  logic [SEL_W-1:0]   sel;
  pi_cfg_t            cfg;
  logic               found;
  proto_id_t          next_id;
  bitmap_t            bitmap;
  int checks = 0, failures = 0, n_found = 0;

  protocol_investigator dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] masks[3] = '{16'hFFFF, 16'h00FF, 16'hFF00};
    for (int i = 0; i < 4000; i++) begin
      cfg_t c;
      sel_en_t se;
      bitmap_t e;
      c = '0;
      se = '0;
      for (int b = 0; b < 8; b++) data[63 - 8 * b -: 8] = rbyte();
      en  = ($urandom_range(3) != 0);
      sel = SEL_W'($urandom);
      cfg.mask = masks[$urandom_range(2)];
      for (int k = 0; k < N_KEYS; k++) begin
        cfg.keys[k]     = {rbyte(), rbyte()} & cfg.mask;
        cfg.next_ids[k] = proto_id_t'($urandom_range(0, 10));
      end
      // Reference through investigator 0 of a full configuration.
      c.mask[0] = cfg.mask;
      c.keys[0] = cfg.keys;
      c.next_ids[0] = cfg.next_ids;
      se.en[0] = en;
      se.sel[0] = sel;
      e = ref_found(c, se, data);
      #1;
      checks++;
      if (bitmap != e || found != (e != '0)) begin
        failures++;
        $display("FAIL data %h sel %0d en %b -> %b exp %b", data, sel, en, bitmap, e);
      end
      if (found) n_found++;
    end
    checks++;
    if (n_found < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

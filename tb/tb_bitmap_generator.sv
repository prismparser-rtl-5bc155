// tb_bitmap_generator: every protocol ID, including 0 and IDs past the bitmap.
module tb_bitmap_generator;
  import prism_pkg::*;

  proto_id_t id;
  bitmap_t   bitmap;
  int checks = 0, failures = 0;

  bitmap_generator dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << ID_W); i++) begin
      automatic bitmap_t e = '0;
      id = proto_id_t'(i);
      if (i >= 1 && i <= N_PROTO) e[i-1] = 1'b1;
      #1;
      checks++;
      if (bitmap != e) begin failures++; $display("FAIL id %0d -> %b", i, bitmap); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

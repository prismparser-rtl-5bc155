// tb_match_detector: random keys drawn from a small set so that hits, multiple
// hits and unused (ID 0) slots all occur; checks hit, found and next_id.
module tb_match_detector;
  import prism_pkg::*;

  key_t                   key;
  key_t      [0:N_KEYS-1] keys;
  proto_id_t [0:N_KEYS-1] next_ids;
  logic      [N_KEYS-1:0] hit;
  logic                   found;
  proto_id_t              next_id;
  int checks = 0, failures = 0, n_found = 0, n_multi = 0;

  match_detector dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key_t pool[4] = '{16'h0800, 16'h86DD, 16'h8100, 16'h0006};
    for (int i = 0; i < 4000; i++) begin
      automatic logic exp_found = 0;
      automatic proto_id_t exp_id = '0;
      automatic int nh = 0;
      key = pool[$urandom_range(3)];
      for (int k = 0; k < N_KEYS; k++) begin
        keys[k]     = pool[$urandom_range(3)];
        next_ids[k] = proto_id_t'($urandom_range(0, 15));
      end
      #1;
      for (int k = 0; k < N_KEYS; k++) begin
        checks++;
        if (hit[k] != (key == keys[k])) failures++;
        if (key == keys[k] && next_ids[k] != 0) begin
          nh++;
          if (!exp_found) begin exp_found = 1; exp_id = next_ids[k]; end
        end
      end
      if (nh > 1) n_multi++;
      if (exp_found) n_found++;
      checks++;
      if (found != exp_found || next_id != exp_id) begin
        failures++;
        $display("FAIL key %h found %b id %0d exp %b %0d", key, found, next_id, exp_found, exp_id);
      end
    end
    checks++;
    if (n_found == 0 || n_multi == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

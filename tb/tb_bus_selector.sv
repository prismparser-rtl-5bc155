// tb_bus_selector: packets of 1..4 beats on a 512-bit bus, with gaps; the
// frame must hold the first 9 words of the packet (zero past its end) and
// appear on the second beat, or on the last beat of a one-beat packet.
module tb_bus_selector;
  import prism_pkg::*;
  import prism_tb_pkg::*;

  localparam int BUS_W = 512;
  localparam int BB = BUS_W / 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             in_valid = 1'b0, in_last = 1'b0;
  logic [BUS_W-1:0] in_data = '0;
  logic             frame_valid;
  frame_t           frame;
  int checks = 0, failures = 0, n_one = 0, n_two = 0;

  bus_selector #(.BUS_W(BUS_W)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      automatic int len = $urandom_range(20, 250);
      automatic bytes_t p = new[len];
      automatic int n = words_of(len, BB);
      frame_t ef;
      for (int b = 0; b < len; b++) p[b] = 8'($urandom);
      for (int w = 0; w < N_CLK; w++) ef[w] = bus_word(p, w, 8)[63:0];
      for (int w = 0; w < n; w++) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_last  = (w == n - 1);
        in_data  = bus_word(p, w, BB)[BUS_W-1:0];
        #1;
        checks++;
        if (frame_valid != (w == 1 || (n == 1 && w == 0))) begin
          failures++;
          $display("FAIL frame_valid %b on beat %0d of %0d", frame_valid, w, n);
        end
        if (frame_valid) begin
          checks++;
          if (frame != ef) begin failures++; $display("FAIL frame content"); end
          if (n == 1) n_one++; else n_two++;
        end
      end
      @(negedge clk);
      in_valid = 1'b0;
      in_last  = 1'b0;
      if ($urandom_range(1)) @(negedge clk);
    end
    checks++;
    if (n_one == 0 || n_two == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

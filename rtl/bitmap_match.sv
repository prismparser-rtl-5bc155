// bitmap_match: compares the protocol bitmap reached so far with the N_DIR
// candidate bitmaps of one clock number and reports which one it equals.
//
// A candidate equal to zero marks an unused slot and never matches (the root
// protocol bit is always set in a real bitmap). If several candidates are equal
// to the bitmap the lowest index is taken. Combinational.
//
// Exact equality against the candidates is as described; zero = unused slot
// and lowest-index priority are this implementation's conventions.
module bitmap_match
  import prism_pkg::*;
(
  input  bitmap_t           prev,
  input  cand_set_t         cand,
  output logic              hit,
  output logic [DIR_W-1:0]  dir
);

  always_comb begin
    hit = 1'b0;
    dir = '0;
    for (int d = N_DIR - 1; d >= 0; d--) begin
      if (cand[d] != '0 && cand[d] == prev) begin
        hit = 1'b1;
        dir = DIR_W'(d);
      end
    end
  end

endmodule

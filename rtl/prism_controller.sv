// prism_controller: chooses the control of the protocol navigator for one
// 64-bit bus word.
//
// Multiplexer #0, addressed by the clock number (the index of the 64-bit word
// within the packet), picks the N_DIR select/enable sets of that clock;
// multiplexer #1, addressed the same way, picks its N_DIR candidate bitmaps.
// The bitmap match compares the bitmap reached so far with those candidates
// and its result drives multiplexer #2, which picks the one select/enable set
// to use. Clock numbers past the last programmed one, or a bitmap that equals
// no candidate, give an all-disabled set. Combinational.
//
// The three multiplexers and the bitmap match are those of the PrismParser
// architecture; the all-disabled set on a miss is this implementation's choice.
module prism_controller
  import prism_pkg::*;
(
  input  logic [CLK_W-1:0] clk_num,  // 0 = first 64-bit word of the packet
  input  ctrl_t            ctrl,
  input  bitmap_t          prev,
  output sel_en_set_t      sets,     // multiplexer #0 output
  output cand_set_t        cands,    // multiplexer #1 output
  output logic             hit,
  output logic [DIR_W-1:0] dir,
  output sel_en_t          se        // multiplexer #2 output
);

  always_comb begin
    sets  = '0;
    cands = '0;
    if (int'(clk_num) < N_CLK) begin
      sets  = ctrl.sel_en[clk_num];
      cands = ctrl.cand[clk_num];
    end
  end

  bitmap_match u_bm (
    .prev (prev),
    .cand (cands),
    .hit  (hit),
    .dir  (dir)
  );

  always_comb se = hit ? sets[dir] : '0;

endmodule

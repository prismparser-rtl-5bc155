// pipeline_stage: the parser pipeline block for one fixed clock number.
//
// Stage STAGE always handles 64-bit word STAGE of the header frame, so the
// two clock-addressed multiplexers of the prism controller are not needed: the
// stage reads the select/enable sets and candidate bitmaps of its own clock
// number straight from the control word. The bitmap match compares the
// incoming bitmap with those candidates, the chosen set drives a protocol
// navigator on the stage's word, and the updated bitmap is registered together
// with the frame, so that the next stage works on the same packet one cycle
// later. A new frame can enter every cycle.
//
// The stage contents follow the PrismParser pipeline architecture; carrying the frame
// along with the bitmap through registers is this implementation's choice.
module pipeline_stage
  import prism_pkg::*;
#(
  parameter int unsigned STAGE = 0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  cfg_t    cfg,
  input  ctrl_t   ctrl,
  input  logic    in_valid,
  input  bitmap_t in_bitmap,
  input  frame_t  in_frame,
  output logic    out_valid,
  output bitmap_t out_bitmap,
  output frame_t  out_frame
);

  logic             hit;
  logic [DIR_W-1:0] dir;
  sel_en_t          se;
  bitmap_t          next_bm;

  bitmap_match u_bm (
    .prev (in_bitmap),
    .cand (ctrl.cand[STAGE]),
    .hit  (hit),
    .dir  (dir)
  );

  always_comb se = hit ? ctrl.sel_en[STAGE][dir] : '0;

  protocol_navigator u_nav (
    .data  (in_frame[STAGE]),
    .cfg   (cfg),
    .se    (se),
    .prev  (in_bitmap),
    .found (),
    .next  (next_bm)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_bitmap <= '0;
      out_frame  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_bitmap <= next_bm;
        out_frame  <= in_frame;
      end
    end
  end

endmodule

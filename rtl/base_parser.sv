// base_parser: the base block, a streaming parser for a 64-bit bus.
//
// Each cycle with in_valid it takes one 64-bit word of a packet (first byte on
// the wire in bits 63:56). A counter gives the clock number of the word in
// its packet. The prism controller uses the clock number and the protocol
// bitmap reached so far to choose one select/enable set, the protocol
// navigator applies it to the word, and the updated bitmap is registered for
// the next word. Nothing is stored: the packet only streams past.
//
// The bitmap starts every packet with only the root protocol (ID 1) set. The
// parse ends after word N_CLK-1 (the longest path of the graph) or at in_last,
// whichever comes first; one cycle later out_valid pulses with the final
// protocol bitmap, the packet header vector handed to the next stage. Words
// after the end are ignored until in_last. There is no back-pressure: a word
// is accepted every cycle, so a 9-word header gives its result 9 cycles after
// its first word.
//
// The datapath follows the base block of the PrismParser architecture. The
// valid/data/last interface, the one-cycle result pulse, the end of the parse
// at word 9 and the reset behaviour are this implementation's choices.
module base_parser
  import prism_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  cfg_t               cfg,
  input  ctrl_t              ctrl,
  input  logic               in_valid,
  input  logic [CHUNK_W-1:0] in_data,
  input  logic               in_last,
  output logic               out_valid,
  output bitmap_t            out_bitmap
);

  localparam bitmap_t ROOT_BM = bitmap_t'(1) << (ROOT_ID - 1);

  logic [CLK_W-1:0] clk_num;
  bitmap_t          bitmap_q;
  logic             done_q;     // parse window closed, waiting for in_last
  sel_en_t          se;
  bitmap_t          next_bm;

  prism_controller u_ctrl (
    .clk_num (clk_num),
    .ctrl    (ctrl),
    .prev    (bitmap_q),
    .sets    (),
    .cands   (),
    .hit     (),
    .dir     (),
    .se      (se)
  );

  protocol_navigator u_nav (
    .data  (in_data),
    .cfg   (cfg),
    .se    (se),
    .prev  (bitmap_q),
    .found (),
    .next  (next_bm)
  );

  wire window_end = (int'(clk_num) == N_CLK - 1) || in_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clk_num    <= '0;
      bitmap_q   <= ROOT_BM;
      done_q     <= 1'b0;
      out_valid  <= 1'b0;
      out_bitmap <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (!done_q) begin
          bitmap_q <= next_bm;
          if (window_end) begin
            out_valid  <= 1'b1;
            out_bitmap <= next_bm;
            done_q     <= 1'b1;
          end else begin
            clk_num <= clk_num + 1'b1;
          end
        end
        if (in_last) begin
          clk_num  <= '0;
          bitmap_q <= ROOT_BM;
          done_q   <= 1'b0;
        end
      end
    end
  end

endmodule

// overlay_parser: a streaming parser for a bus of X x 64 bits.
//
// Slice 0 of each bus word (the first 8 bytes on the wire, in the most
// significant bits) goes to a base block datapath (prism controller and one
// protocol navigator); slices 1..X-1 go to overlay_block instances. Slice i
// of word w stands for clock number w*X+i, so the configuration and control
// words are exactly those of the 64-bit base parser. All blocks compute in the
// same cycle; each block's bitmap selects the result of the next one, and the
// bitmap of the last slice is registered for the next word.
//
// The parse covers the first ceil(N_CLK/X) words of a packet (or ends at
// in_last); out_valid pulses with the protocol bitmap one cycle after the
// last of them. X=1 is the base parser; the default X=2 gives a 128-bit bus.
//
// The slicing and the clock numbering follow the PrismParser overlay architecture; the
// stream interface and the parse window are this implementation's choices.
module overlay_parser
  import prism_pkg::*;
#(
  parameter int unsigned X = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  cfg_t                 cfg,
  input  ctrl_t                ctrl,
  input  logic                 in_valid,
  input  logic [X*CHUNK_W-1:0] in_data,
  input  logic                 in_last,
  output logic                 out_valid,
  output bitmap_t              out_bitmap
);

  localparam bitmap_t     ROOT_BM = bitmap_t'(1) << (ROOT_ID - 1);
  localparam int unsigned WORDS   = (N_CLK + X - 1) / X;   // words in the parse window

  logic [CLK_W-1:0]      word_q;
  bitmap_t               bitmap_q;
  logic                  done_q;
  bitmap_t [0:X]         chain;     // chain[i] = bitmap entering slice i
  sel_en_t               se0;

  assign chain[0] = bitmap_q;

  // Slice 0: the unmodified base block datapath.
  prism_controller u_ctrl0 (
    .clk_num (CLK_W'(int'(word_q) * X)),
    .ctrl    (ctrl),
    .prev    (chain[0]),
    .sets    (),
    .cands   (),
    .hit     (),
    .dir     (),
    .se      (se0)
  );

  protocol_navigator u_nav0 (
    .data  (in_data[X*CHUNK_W-1 -: CHUNK_W]),
    .cfg   (cfg),
    .se    (se0),
    .prev  (chain[0]),
    .found (),
    .next  (chain[1])
  );

  // Slices 1..X-1: modified blocks.
  for (genvar i = 1; i < X; i++) begin : g_blk
    overlay_block u_blk (
      .clk_num (CLK_W'(int'(word_q) * X + i)),
      .cfg     (cfg),
      .ctrl    (ctrl),
      .data    (in_data[(X-i)*CHUNK_W-1 -: CHUNK_W]),
      .prev    (chain[i]),
      .next    (chain[i+1])
    );
  end

  wire window_end = (int'(word_q) == WORDS - 1) || in_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_q     <= '0;
      bitmap_q   <= ROOT_BM;
      done_q     <= 1'b0;
      out_valid  <= 1'b0;
      out_bitmap <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (!done_q) begin
          bitmap_q <= chain[X];
          if (window_end) begin
            out_valid  <= 1'b1;
            out_bitmap <= chain[X];
            done_q     <= 1'b1;
          end else begin
            word_q <= word_q + 1'b1;
          end
        end
        if (in_last) begin
          word_q   <= '0;
          bitmap_q <= ROOT_BM;
          done_q   <= 1'b0;
        end
      end
    end
  end

endmodule

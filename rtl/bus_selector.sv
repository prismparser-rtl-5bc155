// bus_selector: turns the wide input bus into header frames for the pipeline.
//
// The bus is cut into BUS_W/64 words of 64 bits (first byte on the wire in
// the most significant bits). Bus word b of a packet carries frame words
// b*BUS_W/64 and up, so with a 1024-bit bus a whole frame arrives in one beat
// and goes straight to the pipeline, while with a 512-bit bus the first beat
// fills the first half of the frame, is held for one cycle, and the second
// beat completes it. The frame is issued (frame_valid, combinational) on the
// beat that completes it or on in_last, whichever is first; frame words the
// packet did not reach are zero. Beats after that are ignored until in_last.
//
// Splitting the bus and filling the halves of the pipeline follows the
// PrismParser pipeline architecture; holding the first beat and keeping only 9 words are
// this implementation's choices.
module bus_selector
  import prism_pkg::*;
#(
  parameter int unsigned BUS_W = 512
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [BUS_W-1:0] in_data,
  input  logic             in_last,
  output logic             frame_valid,
  output frame_t           frame
);

  localparam int unsigned WPB   = BUS_W / CHUNK_W;            // 64-bit words per beat
  localparam int unsigned BEATS = (N_CLK + WPB - 1) / WPB;    // beats per frame

  logic [CLK_W-1:0] beat_q;
  logic             done_q;
  frame_t           hold_q;
  frame_t           placed;

  // Place the words of the current beat in their frame slots.
  always_comb begin
    placed = hold_q;
    for (int j = 0; j < WPB; j++) begin
      if (int'(beat_q) * WPB + j < N_CLK)
        placed[int'(beat_q) * WPB + j] = in_data[BUS_W - 1 - CHUNK_W * j -: CHUNK_W];
    end
  end

  wire last_beat = (int'(beat_q) == BEATS - 1) || in_last;

  assign frame_valid = in_valid && !done_q && last_beat;
  assign frame       = placed;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beat_q <= '0;
      done_q <= 1'b0;
      hold_q <= '0;
    end else if (in_valid) begin
      if (!done_q) begin
        if (last_beat) begin
          hold_q <= '0;
          done_q <= 1'b1;
        end else begin
          hold_q <= placed;
          beat_q <= beat_q + 1'b1;
        end
      end
      if (in_last) begin
        beat_q <= '0;
        done_q <= 1'b0;
        hold_q <= '0;
      end
    end
  end

endmodule

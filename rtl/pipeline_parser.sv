// pipeline_parser: the pipelined parser for wide buses (512 or 1024 bits).
//
// The bus selector assembles the first N_CLK 64-bit words of each packet into
// a frame; stage s of the pipeline handles word s, takes the bitmap of stage
// s-1 and hands its own to stage s+1. Stage 0 starts from the root protocol.
// One frame can enter per cycle, so a 1024-bit bus takes a packet every cycle
// and a 512-bit bus one every two cycles (the frame spans two beats). The
// protocol bitmap comes out N_CLK cycles after the beat that completed the
// frame.
//
// Stage count (one per clock number of the longest path) and 9-cycle latency
// match the PrismParser pipeline architecture.
module pipeline_parser
  import prism_pkg::*;
#(
  parameter int unsigned BUS_W = 512
) (
  input  logic             clk,
  input  logic             rst_n,
  input  cfg_t             cfg,
  input  ctrl_t            ctrl,
  input  logic             in_valid,
  input  logic [BUS_W-1:0] in_data,
  input  logic             in_last,
  output logic             out_valid,
  output bitmap_t          out_bitmap
);

  localparam bitmap_t ROOT_BM = bitmap_t'(1) << (ROOT_ID - 1);

  logic    [0:N_CLK] v;
  bitmap_t [0:N_CLK] bm;
  frame_t  [0:N_CLK] fr;

  bus_selector #(.BUS_W(BUS_W)) u_sel (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_valid    (in_valid),
    .in_data     (in_data),
    .in_last     (in_last),
    .frame_valid (v[0]),
    .frame       (fr[0])
  );

  assign bm[0] = ROOT_BM;

  for (genvar s = 0; s < N_CLK; s++) begin : g_stage
    pipeline_stage #(.STAGE(s)) u_stage (
      .clk        (clk),
      .rst_n      (rst_n),
      .cfg        (cfg),
      .ctrl       (ctrl),
      .in_valid   (v[s]),
      .in_bitmap  (bm[s]),
      .in_frame   (fr[s]),
      .out_valid  (v[s+1]),
      .out_bitmap (bm[s+1]),
      .out_frame  (fr[s+1])
    );
  end

  assign out_valid  = v[N_CLK];
  assign out_bitmap = bm[N_CLK];

endmodule

// track_distributor: spreads incoming roads evenly over NCHAN channels and
// decodes every cluster combination of a road into track candidates.
//
// Roads are handed to the channels in strict round-robin order (road k goes to
// channel k mod NCHAN), which balances the load in number of roads. Each
// channel owns a road_decoder that emits one track per cycle. If the channel
// whose turn it is still decodes an earlier road, the input stalls
// (in_ready low) until that channel is free; strict rotation and stalling are
// this design's choices, the document only asks for an even distribution.
//
// Interface: road input with valid/ready, NCHAN track outputs with
// valid/ready. Latency from an accepted road to its first track is one cycle.
module track_distributor
  import tf_pkg::*;
#(
  parameter int NCHAN = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  road_t  in_road,
  output logic   out_valid [NCHAN],
  input  logic   out_ready [NCHAN],
  output track_t out_track [NCHAN]
);
  localparam int CW = (NCHAN > 1) ? $clog2(NCHAN) : 1;

  logic [CW-1:0] turn_q;
  logic          dec_ready [NCHAN];
  logic          dec_valid [NCHAN];

  assign in_ready = dec_ready[turn_q];

  for (genvar c = 0; c < NCHAN; c++) begin : g_chan
    assign dec_valid[c] = in_valid && (turn_q == CW'(c));
    road_decoder u_dec (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (dec_valid[c]),
      .in_ready  (dec_ready[c]),
      .in_road   (in_road),
      .out_valid (out_valid[c]),
      .out_ready (out_ready[c]),
      .out_track (out_track[c])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) turn_q <= '0;
    else if (in_valid && in_ready)
      turn_q <= (turn_q == CW'(NCHAN - 1)) ? '0 : turn_q + 1'b1;
  end

endmodule

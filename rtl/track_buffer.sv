// track_buffer: FIFO of tracks in front of a track/constant aligner.
//
// Used twice in the fitter. As Track Buffer I (REQUEST = 1) it sits behind a
// channel of the track distributor: when the first track of a road is written
// it sends the road's sector identifier to the HBM interface, which fetches
// the chi2 constants of that sector. A first track is only accepted in a cycle
// in which the request is accepted too, so every stored road has exactly one
// request outstanding. As Track Buffer II (REQUEST = 0) it holds the tracks
// that passed the chi2 cut; their requests are made by the track multiplexer.
//
// Interface: valid/ready input and output, request output valid/ready.
// The head entry is visible combinationally; a write appears at the output
// one cycle later. Depths are this design's choice.
module track_buffer
  import tf_pkg::*;
#(
  parameter type T       = track_t,
  parameter int  DEPTH   = 64,
  parameter bit  REQUEST = 1'b1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  T      in_data,
  input  logic  in_first,      // first track of its road
  input  ctag_t in_tag,        // road and sector of the incoming track
  output logic  out_valid,
  input  logic  out_ready,
  output T      out_data,
  output logic  req_valid,
  input  logic  req_ready,
  output ctag_t req_tag
);
  logic full, empty;
  logic [$clog2(DEPTH):0] count;
  logic need_req;

  assign need_req  = REQUEST && in_first;
  assign in_ready  = !full && (!need_req || req_ready);
  assign req_valid = in_valid && need_req && !full;
  assign req_tag   = in_tag;
  assign out_valid = !empty;

  sync_fifo #(.T(T), .DEPTH(DEPTH)) u_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (in_valid && in_ready),
    .wr_data (in_data),
    .rd_en   (out_ready),
    .rd_data (out_data),
    .full    (full),
    .empty   (empty),
    .count   (count)
  );

endmodule

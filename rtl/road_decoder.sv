// road_decoder: turns one road into all of its track candidates, one per
// clock cycle.
//
// A road holds up to MAX_CLUS clusters in each of NLAYERS layers. A track takes
// one cluster from every layer, so a road with n_l clusters in layer l yields
// prod(max(n_l,1)) tracks. The decoder keeps one road in a holding register
// and steps an odometer of per-layer cluster indices, lowest layer fastest.
// A layer with no cluster contributes a zero coordinate (this design's choice;
// the treatment of empty layers is not specified). The first and last tracks
// of the road are flagged so that downstream buffers know the road
// boundaries.
//
// Interface: valid/ready on both sides. in_ready is high only while no road is
// held, so a new road is taken in the cycle after the last track of the
// previous one has been accepted. Throughput is one track per cycle.
module road_decoder
  import tf_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  road_t  in_road,
  output logic   out_valid,
  input  logic   out_ready,
  output track_t out_track
);
  road_t road_q;
  logic  busy_q, first_q;
  logic [NLAYERS-1:0][NCLUS_W-1:0] idx_q, idx_nxt;
  logic  last_comb;

  assign in_ready  = !busy_q;
  assign out_valid = busy_q;

  // Odometer step and end-of-road detection.
  always_comb begin
    logic carry;
    carry     = 1'b1;
    last_comb = 1'b1;
    idx_nxt   = idx_q;
    for (int l = 0; l < NLAYERS; l++) begin
      logic at_max;
      at_max = (road_q.nclus[l] <= 1) || (idx_q[l] == road_q.nclus[l] - 1'b1);
      if (!at_max) last_comb = 1'b0;
      if (carry) begin
        if (at_max) idx_nxt[l] = '0;
        else begin
          idx_nxt[l] = idx_q[l] + 1'b1;
          carry      = 1'b0;
        end
      end
    end
  end

  always_comb begin
    out_track.ids   = road_q.ids;
    out_track.first = first_q;
    out_track.last  = last_comb;
    for (int l = 0; l < NLAYERS; l++)
      out_track.x[l] = (road_q.nclus[l] == '0) ? hit_t'(0) : road_q.clus[l][idx_q[l]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      first_q <= 1'b0;
      idx_q   <= '0;
      road_q  <= '0;
    end else if (!busy_q) begin
      if (in_valid) begin
        road_q  <= in_road;
        busy_q  <= 1'b1;
        first_q <= 1'b1;
        idx_q   <= '0;
      end
    end else if (out_ready) begin
      first_q <= 1'b0;
      idx_q   <= idx_nxt;
      if (last_comb) busy_q <= 1'b0;
    end
  end

endmodule

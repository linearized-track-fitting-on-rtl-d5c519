// track_multiplexer: merges the tracks that passed the chi2 cut in the NCHAN
// CHI2 units into one stream.
//
// A round-robin arbiter picks one waiting CHI2 output per cycle. The chosen
// track is written into Track Buffer II and, in the same cycle, its road and
// sector are sent to the HBM interface to request the helix-parameter
// constants; a track moves only when both accept, so tracks and requests stay
// in the same order (one request per track). Arbitration and the
// one-request-per-track rule are this design's choices.
//
// Interface: NCHAN valid/ready inputs, valid/ready output and request.
// Combinational, no latency.
module track_multiplexer
  import tf_pkg::*;
#(
  parameter int NCHAN = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid [NCHAN],
  output logic        in_ready [NCHAN],
  input  good_track_t in_data  [NCHAN],
  output logic        out_valid,
  input  logic        out_ready,
  output good_track_t out_data,
  output logic        req_valid,
  input  logic        req_ready,
  output ctag_t       req_tag
);
  localparam int CW = (NCHAN > 1) ? $clog2(NCHAN) : 1;

  logic [CW-1:0] prio_q, grant;
  logic          any, fire;

  always_comb begin
    int k;
    any   = 1'b0;
    grant = '0;
    for (int i = 0; i < NCHAN; i++) begin
      k = int'(prio_q) + i;
      if (k >= NCHAN) k -= NCHAN;
      if (!any && in_valid[k]) begin
        any   = 1'b1;
        grant = CW'(k);
      end
    end
  end

  assign out_data  = in_data[grant];
  assign req_tag   = '{road: out_data.trk.ids.road, sector: out_data.trk.ids.sector};
  assign fire      = any && out_ready && req_ready;
  assign out_valid = any && req_ready;
  assign req_valid = any && out_ready;

  always_comb
    for (int c = 0; c < NCHAN; c++) in_ready[c] = fire && (grant == CW'(c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) prio_q <= '0;
    else if (fire) prio_q <= (grant == CW'(NCHAN - 1)) ? '0 : grant + 1'b1;
  end

endmodule

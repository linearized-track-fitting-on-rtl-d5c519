// track_fitter: linearized track fitter.
//
// Data flow (one road in, fitted tracks out):
//   road -> track_distributor (round robin over NCHAN channels, every cluster
//   combination becomes a track) -> Track Buffer I per channel, which asks the
//   HBM interface for the chi2 constants of the road's sector -> Constant
//   Buffer I per channel -> Track Constant Aligner I -> CHI2 unit (goodness
//   and threshold cut) -> track_multiplexer, which writes passing tracks to
//   Track Buffer II and asks for the helix-parameter constants -> Constant
//   Buffer II -> Track Constant Aligner II -> parameter_calculator -> result.
// Computing the goodness first means that only the tracks that pass the cut
// (about one in five is expected to) need parameter constants and the
// parameter arithmetic, which is therefore built once instead of per channel.
//
// The memory holding the constants is outside this module: requests leave on
// hbm_req_*, answers return on hbm_rsp_* in request order after any latency.
// Status pulses report tracks failing the chi2 cut, constant sets lost in a
// full constant buffer and tracks dropped because their constants were lost.
//
// The structure follows the fitter's data-flow specification; buffer depths,
// handshakes, tags and the fixed-point format are this design's choices.
module track_fitter
  import tf_pkg::*;
#(
  parameter int NCHAN     = 4,
  parameter int TB1_DEPTH = 64,
  parameter int CB1_DEPTH = 16,
  parameter int TB2_DEPTH = 64,
  parameter int CB2_DEPTH = 64,
  parameter int RSP_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  fix16_t      chi2_threshold,
  // roads from the data organizer
  input  logic        road_valid,
  output logic        road_ready,
  input  road_t       road,
  // constant memory
  output logic        hbm_req_valid,
  input  logic        hbm_req_ready,
  output hbm_req_t    hbm_req,
  input  logic        hbm_rsp_valid,
  output logic        hbm_rsp_ready,
  input  hbm_rsp_t    hbm_rsp,
  // fitted tracks
  output logic        fit_valid,
  input  logic        fit_ready,
  output fit_result_t fit,
  // status pulses
  output logic [NCHAN-1:0] chi2_reject,
  output logic [NCHAN-1:0] cb1_lost,
  output logic [NCHAN-1:0] align1_drop,
  output logic        cb2_lost,
  output logic        align2_drop
);
  // distributor -> Track Buffer I
  logic        dist_valid [NCHAN];
  logic        dist_ready [NCHAN];
  track_t      dist_trk   [NCHAN];
  // Track Buffer I -> aligner I, requests
  logic        tb1_valid  [NCHAN];
  logic        tb1_pop    [NCHAN];
  track_t      tb1_trk    [NCHAN];
  logic        chi_req_valid [NCHAN];
  logic        chi_req_ready [NCHAN];
  ctag_t       chi_req_tag   [NCHAN];
  // HBM interface -> constant buffers
  logic        cb1_wr_valid [NCHAN];
  ctag_t       cb1_wr_tag;
  chi2_const_t cb1_wr_data;
  logic        cb2_wr_valid;
  ctag_t       cb2_wr_tag;
  par_const_t  cb2_wr_data;
  // Constant Buffer I -> aligner I
  logic        cb1_valid [NCHAN];
  ctag_t       cb1_tag   [NCHAN];
  chi2_const_t cb1_data  [NCHAN];
  logic        cb1_pop   [NCHAN];
  // aligner I -> CHI2
  logic        al1_valid [NCHAN];
  logic        al1_ready [NCHAN];
  track_t      al1_trk   [NCHAN];
  chi2_const_t al1_cst   [NCHAN];
  // CHI2 -> multiplexer
  logic        chi_valid [NCHAN];
  logic        chi_ready [NCHAN];
  good_track_t chi_data  [NCHAN];
  // multiplexer -> Track Buffer II, request
  logic        mux_valid, mux_ready;
  good_track_t mux_data;
  logic        par_req_valid, par_req_ready;
  ctag_t       par_req_tag;
  // Track Buffer II / Constant Buffer II -> aligner II -> calculator
  logic        tb2_valid, tb2_pop;
  good_track_t tb2_data;
  logic        cb2_valid, cb2_pop, cb2_pending;
  ctag_t       cb2_tag;
  par_const_t  cb2_data;
  logic        al2_valid, al2_ready;
  good_track_t al2_trk;
  par_const_t  al2_cst;

  track_distributor #(.NCHAN(NCHAN)) u_dist (
    .clk, .rst_n,
    .in_valid  (road_valid),
    .in_ready  (road_ready),
    .in_road   (road),
    .out_valid (dist_valid),
    .out_ready (dist_ready),
    .out_track (dist_trk)
  );

  for (genvar c = 0; c < NCHAN; c++) begin : g_chan
    logic [31:0] lost_cnt, drop_cnt;
    ctag_t       trk_tag;
    logic        cb1_pending;
    assign trk_tag = '{road: tb1_trk[c].ids.road, sector: tb1_trk[c].ids.sector};

    track_buffer #(.T(track_t), .DEPTH(TB1_DEPTH), .REQUEST(1'b1)) u_tb1 (
      .clk, .rst_n,
      .in_valid  (dist_valid[c]),
      .in_ready  (dist_ready[c]),
      .in_data   (dist_trk[c]),
      .in_first  (dist_trk[c].first),
      .in_tag    ('{road: dist_trk[c].ids.road, sector: dist_trk[c].ids.sector}),
      .out_valid (tb1_valid[c]),
      .out_ready (tb1_pop[c]),
      .out_data  (tb1_trk[c]),
      .req_valid (chi_req_valid[c]),
      .req_ready (chi_req_ready[c]),
      .req_tag   (chi_req_tag[c])
    );

    constant_buffer #(.T(chi2_const_t), .DEPTH(CB1_DEPTH)) u_cb1 (
      .clk, .rst_n,
      .wr_valid   (cb1_wr_valid[c]),
      .wr_tag     (cb1_wr_tag),
      .wr_data    (cb1_wr_data),
      .rd_valid   (cb1_valid[c]),
      .rd_tag     (cb1_tag[c]),
      .rd_data    (cb1_data[c]),
      .rd_pop     (cb1_pop[c]),
      .req_sent   (chi_req_valid[c] && chi_req_ready[c]),
      .pending    (cb1_pending),
      .lost       (cb1_lost[c]),
      .lost_count (lost_cnt)
    );

    track_constant_aligner #(.TRK_T(track_t), .CST_T(chi2_const_t)) u_al1 (
      .clk, .rst_n,
      .trk_valid  (tb1_valid[c]),
      .trk_data   (tb1_trk[c]),
      .trk_tag    (trk_tag),
      .trk_last   (tb1_trk[c].last),
      .trk_pop    (tb1_pop[c]),
      .cst_valid  (cb1_valid[c]),
      .cst_pending(cb1_pending),
      .cst_data   (cb1_data[c]),
      .cst_tag    (cb1_tag[c]),
      .cst_pop    (cb1_pop[c]),
      .out_valid  (al1_valid[c]),
      .out_ready  (al1_ready[c]),
      .out_trk    (al1_trk[c]),
      .out_cst    (al1_cst[c]),
      .dropped    (align1_drop[c]),
      .drop_count (drop_cnt)
    );

    chi2_unit u_chi2 (
      .clk, .rst_n,
      .threshold (chi2_threshold),
      .in_valid  (al1_valid[c]),
      .in_ready  (al1_ready[c]),
      .in_trk    (al1_trk[c]),
      .in_cst    (al1_cst[c]),
      .out_valid (chi_valid[c]),
      .out_ready (chi_ready[c]),
      .out_data  (chi_data[c]),
      .reject    (chi2_reject[c])
    );
  end

  hbm_interface #(.NCHAN(NCHAN), .RSP_DEPTH(RSP_DEPTH)) u_hbm_if (
    .clk, .rst_n,
    .chi_req_valid (chi_req_valid),
    .chi_req_ready (chi_req_ready),
    .chi_req_tag   (chi_req_tag),
    .par_req_valid (par_req_valid),
    .par_req_ready (par_req_ready),
    .par_req_tag   (par_req_tag),
    .hbm_req_valid (hbm_req_valid),
    .hbm_req_ready (hbm_req_ready),
    .hbm_req       (hbm_req),
    .hbm_rsp_valid (hbm_rsp_valid),
    .hbm_rsp_ready (hbm_rsp_ready),
    .hbm_rsp       (hbm_rsp),
    .cb1_wr_valid  (cb1_wr_valid),
    .cb1_wr_tag    (cb1_wr_tag),
    .cb1_wr_data   (cb1_wr_data),
    .cb2_wr_valid  (cb2_wr_valid),
    .cb2_wr_tag    (cb2_wr_tag),
    .cb2_wr_data   (cb2_wr_data)
  );

  track_multiplexer #(.NCHAN(NCHAN)) u_mux (
    .clk, .rst_n,
    .in_valid  (chi_valid),
    .in_ready  (chi_ready),
    .in_data   (chi_data),
    .out_valid (mux_valid),
    .out_ready (mux_ready),
    .out_data  (mux_data),
    .req_valid (par_req_valid),
    .req_ready (par_req_ready),
    .req_tag   (par_req_tag)
  );

  logic        tb2_req_valid;
  ctag_t       tb2_req_tag, tb2_tag;
  logic [31:0] cb2_lost_cnt, al2_drop_cnt;

  track_buffer #(.T(good_track_t), .DEPTH(TB2_DEPTH), .REQUEST(1'b0)) u_tb2 (
    .clk, .rst_n,
    .in_valid  (mux_valid),
    .in_ready  (mux_ready),
    .in_data   (mux_data),
    .in_first  (1'b1),
    .in_tag    (par_req_tag),
    .out_valid (tb2_valid),
    .out_ready (tb2_pop),
    .out_data  (tb2_data),
    .req_valid (tb2_req_valid),
    .req_ready (1'b1),
    .req_tag   (tb2_req_tag)
  );

  constant_buffer #(.T(par_const_t), .DEPTH(CB2_DEPTH)) u_cb2 (
    .clk, .rst_n,
    .wr_valid   (cb2_wr_valid),
    .wr_tag     (cb2_wr_tag),
    .wr_data    (cb2_wr_data),
    .rd_valid   (cb2_valid),
    .rd_tag     (cb2_tag),
    .rd_data    (cb2_data),
    .rd_pop     (cb2_pop),
    .req_sent   (par_req_valid && par_req_ready),
    .pending    (cb2_pending),
    .lost       (cb2_lost),
    .lost_count (cb2_lost_cnt)
  );

  assign tb2_tag = '{road: tb2_data.trk.ids.road, sector: tb2_data.trk.ids.sector};

  track_constant_aligner #(.TRK_T(good_track_t), .CST_T(par_const_t)) u_al2 (
    .clk, .rst_n,
    .trk_valid  (tb2_valid),
    .trk_data   (tb2_data),
    .trk_tag    (tb2_tag),
    .trk_last   (1'b1),
    .trk_pop    (tb2_pop),
    .cst_valid  (cb2_valid),
    .cst_pending(cb2_pending),
    .cst_data   (cb2_data),
    .cst_tag    (cb2_tag),
    .cst_pop    (cb2_pop),
    .out_valid  (al2_valid),
    .out_ready  (al2_ready),
    .out_trk    (al2_trk),
    .out_cst    (al2_cst),
    .dropped    (align2_drop),
    .drop_count (al2_drop_cnt)
  );

  parameter_calculator u_pcalc (
    .clk, .rst_n,
    .in_valid  (al2_valid),
    .in_ready  (al2_ready),
    .in_trk    (al2_trk),
    .in_cst    (al2_cst),
    .out_valid (fit_valid),
    .out_ready (fit_ready),
    .out_data  (fit)
  );

endmodule

// prm_fpga: the logic of the pattern-recognition mezzanine FPGA that is
// built here, the associative-memory emulator and the linearized track
// fitter.
//
// On the mezzanine the two are joined by a data organizer, which keeps the
// full-resolution clusters of an event, receives the road identifiers found by
// the pattern matching and assembles road packages (road, event and sector
// identifiers, up to three clusters per layer) for the fitter. The data
// organizer, the cluster-to-SSID encoding in front of the pattern matching and
// the output formatting behind the fitter are not part of this RTL, so both
// blocks bring their ports out: the emulator's SSID input and road-identifier
// output, the fitter's road input, its constant-memory port and its fitted
// tracks. The constant memory (HBM) itself is external.
//
// Parameters are passed through unchanged; defaults are the fitter's
// configuration (four channels, eight layers, three clusters per layer).
module prm_fpga
  import tf_pkg::*;
#(
  parameter int NCHAN     = 4,
  parameter int TB1_DEPTH = 64,
  parameter int CB1_DEPTH = 16,
  parameter int TB2_DEPTH = 64,
  parameter int CB2_DEPTH = 64,
  parameter int RSP_DEPTH = 16,
  parameter int NPAT      = 256,
  parameter int SSID_W    = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // associative-memory emulator
  input  logic        am_pat_wr_en,
  input  logic [$clog2(NPAT)-1:0] am_pat_wr_addr,
  input  logic [NLAYERS-1:0][SSID_W-1:0] am_pat_wr_ssid,
  input  logic        am_cmd_valid,
  output logic        am_cmd_ready,
  input  logic [1:0]  am_cmd,
  input  logic [NLAYERS-1:0] am_layer_valid,
  input  logic [NLAYERS-1:0][SSID_W-1:0] am_ssid,
  input  logic [$clog2(NLAYERS+1)-1:0] am_threshold,
  output logic        am_road_valid,
  input  logic        am_road_ready,
  output logic [$clog2(NPAT)-1:0] am_road_id,
  output logic        am_done,
  // track fitter
  input  fix16_t      chi2_threshold,
  input  logic        road_valid,
  output logic        road_ready,
  input  road_t       road,
  output logic        hbm_req_valid,
  input  logic        hbm_req_ready,
  output hbm_req_t    hbm_req,
  input  logic        hbm_rsp_valid,
  output logic        hbm_rsp_ready,
  input  hbm_rsp_t    hbm_rsp,
  output logic        fit_valid,
  input  logic        fit_ready,
  output fit_result_t fit,
  output logic [NCHAN-1:0] chi2_reject,
  output logic [NCHAN-1:0] cb1_lost,
  output logic [NCHAN-1:0] align1_drop,
  output logic        cb2_lost,
  output logic        align2_drop
);

  am_emulator #(.NLAYERS(NLAYERS), .NPAT(NPAT), .SSID_W(SSID_W)) u_am (
    .clk, .rst_n,
    .pat_wr_en   (am_pat_wr_en),
    .pat_wr_addr (am_pat_wr_addr),
    .pat_wr_ssid (am_pat_wr_ssid),
    .cmd_valid   (am_cmd_valid),
    .cmd_ready   (am_cmd_ready),
    .cmd         (am_cmd),
    .layer_valid (am_layer_valid),
    .ssid        (am_ssid),
    .threshold   (am_threshold),
    .out_valid   (am_road_valid),
    .out_ready   (am_road_ready),
    .out_id      (am_road_id),
    .done        (am_done)
  );

  track_fitter #(
    .NCHAN(NCHAN), .TB1_DEPTH(TB1_DEPTH), .CB1_DEPTH(CB1_DEPTH),
    .TB2_DEPTH(TB2_DEPTH), .CB2_DEPTH(CB2_DEPTH), .RSP_DEPTH(RSP_DEPTH)
  ) u_tf (
    .clk, .rst_n,
    .chi2_threshold, .road_valid, .road_ready, .road,
    .hbm_req_valid, .hbm_req_ready, .hbm_req,
    .hbm_rsp_valid, .hbm_rsp_ready, .hbm_rsp,
    .fit_valid, .fit_ready, .fit,
    .chi2_reject, .cb1_lost, .align1_drop, .cb2_lost, .align2_drop
  );

endmodule

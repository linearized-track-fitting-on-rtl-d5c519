// chi2_unit: goodness of fit of a track candidate and the chi2 cut.
//
// Computes chi2 = sum_j (S_j . x + h_j)^2 over the NDOF rows of the sector's
// chi2 constants, with all NDOF x NLAYERS products formed in parallel so that
// one track is accepted per clock cycle. Pipeline: products, row sums with the
// offset h_j, squares, sum of squares and comparison with the threshold.
// A track passes if chi2 <= threshold; it is then presented at the output
// together with its chi2 rounded and saturated to a signed 16-bit word with
// OUT_FRAC fraction bits. A failing track is discarded and reject pulses.
//
// Number format: fixed point (this design's choice; the original computes in
// single-precision float). x: integer; S: COEF_FRAC fraction bits; h:
// COEF_FRAC fraction bits; the full-precision chi2 keeps 2*COEF_FRAC fraction
// bits, so the cut is exact. The threshold is a 16-bit word with OUT_FRAC
// fraction bits. It is applied in the last stage, so it should only change
// while no track is in the unit.
//
// Interface: valid/ready input and output. The whole pipeline stalls while a
// passing track waits at the output. Latency is 4 cycles.
module chi2_unit
  import tf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  fix16_t      threshold,
  input  logic        in_valid,
  output logic        in_ready,
  input  track_t      in_trk,
  input  chi2_const_t in_cst,
  output logic        out_valid,
  input  logic        out_ready,
  output good_track_t out_data,
  output logic        reject          // pulses for a track that fails the cut
);
  localparam int PW = HIT_W + COEF_W;   // product
  localparam int RW = PW + 8;           // row sum with offset
  localparam int QW = 2 * RW;           // square
  localparam int CW = QW + 4;           // sum of squares

  logic advance;

  // stage 1: products
  logic                           v1;
  track_t                         t1;
  logic signed [PW-1:0]           prod1 [NDOF][NLAYERS];
  offs_t                          h1    [NDOF];
  // stage 2: residuals
  logic                           v2;
  track_t                         t2;
  logic signed [RW-1:0]           res2  [NDOF];
  // stage 3: squares
  logic                           v3;
  track_t                         t3;
  logic signed [QW-1:0]           sq3   [NDOF];
  // stage 4: output
  logic                           v4, pass4;

  assign advance   = !(out_valid && !out_ready);
  assign in_ready  = advance;
  assign out_valid = v4 && pass4;
  assign reject    = v4 && !pass4 && advance;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; v4 <= 1'b0; pass4 <= 1'b0;
      t1 <= '0; t2 <= '0; t3 <= '0; out_data <= '0;
      for (int j = 0; j < NDOF; j++) begin
        h1[j] <= '0; res2[j] <= '0; sq3[j] <= '0;
        for (int l = 0; l < NLAYERS; l++) prod1[j][l] <= '0;
      end
    end else if (advance) begin
      v1 <= in_valid;
      t1 <= in_trk;
      for (int j = 0; j < NDOF; j++) begin
        h1[j] <= in_cst.h[j];
        for (int l = 0; l < NLAYERS; l++)
          prod1[j][l] <= PW'($signed(in_cst.s[j][l]) * $signed(in_trk.x[l]));
      end

      v2 <= v1;
      t2 <= t1;
      for (int j = 0; j < NDOF; j++) begin
        logic signed [RW-1:0] acc;
        acc = RW'($signed(h1[j]));
        for (int l = 0; l < NLAYERS; l++) acc += RW'(prod1[j][l]);
        res2[j] <= acc;
      end

      v3 <= v2;
      t3 <= t2;
      for (int j = 0; j < NDOF; j++) sq3[j] <= res2[j] * res2[j];

      begin
        logic signed [CW-1:0] sum;
        logic signed [CW-1:0] thr_full;
        sum = '0;
        for (int j = 0; j < NDOF; j++) sum += CW'(sq3[j]);
        thr_full = CW'($signed(threshold)) <<< (2 * COEF_FRAC - OUT_FRAC);
        v4                <= v3;
        pass4             <= (sum <= thr_full);
        out_data.trk      <= t3;
        out_data.chi2     <= sat16(80'(sum >>> COEF_FRAC));
      end
    end
  end

endmodule

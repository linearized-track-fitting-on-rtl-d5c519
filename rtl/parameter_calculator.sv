// parameter_calculator: helix parameters of a track that passed the chi2
// cut, p_i = C_i . x + q_i for the NPAR parameters.
//
// All NPAR x NLAYERS products are formed in parallel (one track per cycle).
// Pipeline: products, row sums with the offset q_i, rounding to the output
// format. Results are signed 16-bit words with OUT_FRAC fraction bits,
// saturated at the ends of the range; the track's identifiers and its chi2
// travel alongside.
//
// Number format: fixed point (this design's choice; the original computes in
// single-precision float and converts to 16-bit fixed point at the output).
// x: integer; C and q: COEF_FRAC fraction bits.
//
// Interface: valid/ready input and output; the pipeline stalls while the
// output waits. Latency is 3 cycles.
module parameter_calculator
  import tf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  good_track_t in_trk,
  input  par_const_t  in_cst,
  output logic        out_valid,
  input  logic        out_ready,
  output fit_result_t out_data
);
  localparam int PW = HIT_W + COEF_W;
  localparam int RW = PW + 8;

  logic advance;

  logic                 v1, v2;
  ids_t                 id1, id2;
  fix16_t               c1, c2;
  logic signed [PW-1:0] prod1 [NPAR][NLAYERS];
  offs_t                q1    [NPAR];
  logic signed [RW-1:0] sum2  [NPAR];

  assign advance  = !(out_valid && !out_ready);
  assign in_ready = advance;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0;
      id1 <= '0; id2 <= '0; c1 <= '0; c2 <= '0; out_data <= '0;
      for (int i = 0; i < NPAR; i++) begin
        q1[i] <= '0; sum2[i] <= '0;
        for (int l = 0; l < NLAYERS; l++) prod1[i][l] <= '0;
      end
    end else if (advance) begin
      v1  <= in_valid;
      id1 <= in_trk.trk.ids;
      c1  <= in_trk.chi2;
      for (int i = 0; i < NPAR; i++) begin
        q1[i] <= in_cst.q[i];
        for (int l = 0; l < NLAYERS; l++)
          prod1[i][l] <= PW'($signed(in_cst.c[i][l]) * $signed(in_trk.trk.x[l]));
      end

      v2  <= v1;
      id2 <= id1;
      c2  <= c1;
      for (int i = 0; i < NPAR; i++) begin
        logic signed [RW-1:0] acc;
        acc = RW'($signed(q1[i]));
        for (int l = 0; l < NLAYERS; l++) acc += RW'(prod1[i][l]);
        sum2[i] <= acc;
      end

      out_valid     <= v2;
      out_data.ids  <= id2;
      out_data.chi2 <= c2;
      for (int i = 0; i < NPAR; i++) out_data.p[i] <= sat16(80'(sum2[i]));
    end
  end

endmodule

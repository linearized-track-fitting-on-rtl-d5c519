// am_emulator: FPGA emulation of the associative-memory pattern matching
// that turns coarse hits (super-strip identifiers, SSIDs) into roads.
//
// A pattern bank holds NPAT patterns of one SSID per layer. An event is
// processed in three phases, one clock cycle per step:
//   * INIT clears the per-layer match flags of every pattern.
//   * Each HIT word carries at most one SSID per layer (layer_valid marks the
//     layers that have one). Every pattern compares all layers in parallel
//     and sets the flag of each layer whose SSID equals the word's; flags stay
//     set for the rest of the event.
//   * END closes the event: a pattern is matched when at least `threshold` of
//     its layers are flagged. The identifiers of the matched patterns are then
//     returned one per cycle, lowest identifier first, and `done` pulses once
//     after the last one (also when nothing matched).
// Patterns are written through a direct load port (pat_wr_*), which stands in
// for the direct database access of the emulator.
//
// The three-phase algorithm, the parallel per-layer flags and the threshold
// on matched layers follow the pattern-recognition description. The bank
// size, SSID width, command encoding, readout order and handshakes are this
// design's choices. Commands are accepted only while cmd_ready is high, i.e.
// not during readout.
module am_emulator #(
  parameter int NLAYERS = 8,
  parameter int NPAT    = 256,
  parameter int SSID_W  = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // pattern bank load port
  input  logic                        pat_wr_en,
  input  logic [$clog2(NPAT)-1:0]     pat_wr_addr,
  input  logic [NLAYERS-1:0][SSID_W-1:0] pat_wr_ssid,
  // event stream
  input  logic                        cmd_valid,
  output logic                        cmd_ready,
  input  logic [1:0]                  cmd,          // see am_cmd_e
  input  logic [NLAYERS-1:0]          layer_valid,
  input  logic [NLAYERS-1:0][SSID_W-1:0] ssid,
  input  logic [$clog2(NLAYERS+1)-1:0] threshold,
  // matched pattern identifiers
  output logic                        out_valid,
  input  logic                        out_ready,
  output logic [$clog2(NPAT)-1:0]     out_id,
  output logic                        done
);
  typedef enum logic [1:0] {
    AM_INIT = 2'd0,
    AM_HIT  = 2'd1,
    AM_END  = 2'd2
  } am_cmd_e;

  localparam int IW = $clog2(NPAT);

  logic [NLAYERS-1:0][SSID_W-1:0] bank  [NPAT];
  logic [NLAYERS-1:0]             flags [NPAT];
  logic [NPAT-1:0]                matched_q;
  logic                           reading_q;

  assign cmd_ready = !reading_q;

  // Lowest matched pattern still to be returned.
  logic          found;
  logic [IW-1:0] first_id;
  always_comb begin
    found    = 1'b0;
    first_id = '0;
    for (int p = NPAT - 1; p >= 0; p--)
      if (matched_q[p]) begin
        found    = 1'b1;
        first_id = IW'(p);
      end
  end

  assign out_valid = reading_q && found;
  assign out_id    = first_id;

  always_ff @(posedge clk) begin
    if (pat_wr_en) bank[pat_wr_addr] <= pat_wr_ssid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPAT; p++) flags[p] <= '0;
      matched_q <= '0;
      reading_q <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (reading_q) begin
        if (!found) begin
          reading_q <= 1'b0;
          done      <= 1'b1;
        end else if (out_ready) begin
          matched_q[first_id] <= 1'b0;
        end
      end else if (cmd_valid) begin
        unique case (am_cmd_e'(cmd))
          AM_INIT: for (int p = 0; p < NPAT; p++) flags[p] <= '0;
          AM_HIT:
            for (int p = 0; p < NPAT; p++)
              for (int l = 0; l < NLAYERS; l++)
                if (layer_valid[l] && bank[p][l] == ssid[l]) flags[p][l] <= 1'b1;
          AM_END: begin
            for (int p = 0; p < NPAT; p++)
              matched_q[p] <= ($countones(flags[p]) >= int'(threshold));
            reading_q <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

endmodule

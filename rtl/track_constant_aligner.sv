// track_constant_aligner: pairs the head of a track buffer with the head of a
// constant buffer so that every track leaves with the constants of its own
// sector (Track Constant Aligner I in front of the CHI2 unit, II in front of
// the parameter calculator).
//
// Both buffers carry a tag (road identifier and sector identifier). When both
// heads are present and the tags agree, the track and a copy of the constants
// are loaded into the output register and the track is popped. The constant
// set is popped together with the last track that uses it (trk_last); tie
// trk_last high where every track has a constant set of its own.
// Constants come back from the memory in request order, so a head constant
// whose tag differs from the head track belongs to a later road: the track's
// own constants were lost in a full constant buffer. The same holds when the
// constant buffer is empty and no request is outstanding (cst_pending low).
// Such a track is dropped and counted. There is no timeout: a track whose
// constants are still on their way simply waits. Dropping on a mismatch is this design's choice; the
// specification only says that there is no timeout and that constants meeting
// a full buffer are lost.
//
// Interface: pop strobes towards the buffers, valid/ready output from a
// register; one pair per cycle, one cycle latency.
module track_constant_aligner
  import tf_pkg::*;
#(
  parameter type TRK_T = track_t,
  parameter type CST_T = chi2_const_t
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        trk_valid,
  input  TRK_T        trk_data,
  input  ctag_t       trk_tag,
  input  logic        trk_last,
  output logic        trk_pop,
  input  logic        cst_valid,
  input  logic        cst_pending,
  input  CST_T        cst_data,
  input  ctag_t       cst_tag,
  output logic        cst_pop,
  output logic        out_valid,
  input  logic        out_ready,
  output TRK_T        out_trk,
  output CST_T        out_cst,
  output logic        dropped,      // pulses when a track is discarded
  output logic [31:0] drop_count
);
  logic both, match, slot_free, emit;

  assign both      = trk_valid && cst_valid;
  assign match     = (trk_tag == cst_tag);
  assign slot_free = !out_valid || out_ready;
  assign emit      = both && match && slot_free;
  assign dropped   = trk_valid && (cst_valid ? !match : !cst_pending);
  assign trk_pop   = emit || dropped;
  assign cst_pop   = emit && trk_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_trk    <= '0;
      out_cst    <= '0;
      drop_count <= '0;
    end else begin
      if (emit) begin
        out_valid <= 1'b1;
        out_trk   <= trk_data;
        out_cst   <= cst_data;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
      if (dropped) drop_count <= drop_count + 1'b1;
    end
  end

endmodule

// constant_buffer: FIFO for the constant sets that the HBM interface returns
// (Constant Buffer I per channel for the chi2 constants, Constant Buffer II
// for the helix-parameter constants).
//
// The HBM interface cannot be held off, so the buffer always accepts a write:
// a constant set that arrives while the buffer is full is lost, as the
// fitter's specification prescribes, and the lost counter counts it. Each
// entry holds the constants and the tag (road and sector) they were requested
// for, which the aligner checks against the head track.
//
// The buffer also counts the requests still outstanding for it (req_sent
// pulses when a request leaves, every arriving write, kept or lost, ends one).
// pending low with an empty buffer tells the aligner that no constants are
// on their way, so a waiting track has lost its constants.
//
// Interface: write strobe, head entry with valid, pop strobe. Written data is
// visible one cycle after the write. DEPTH is this design's choice.
module constant_buffer
  import tf_pkg::*;
#(
  parameter type T     = chi2_const_t,
  parameter int  DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_valid,
  input  ctag_t       wr_tag,
  input  T            wr_data,
  output logic        rd_valid,
  output ctag_t       rd_tag,
  output T            rd_data,
  input  logic        rd_pop,
  input  logic        req_sent,    // a request for this buffer was issued
  output logic        pending,     // requests issued whose answer has not arrived
  output logic        lost,        // pulses when a write is dropped
  output logic [31:0] lost_count
);
  typedef struct packed {
    ctag_t tag;
    T      data;
  } entry_t;

  logic   full, empty;
  logic [$clog2(DEPTH):0] count;
  entry_t head;

  assign lost     = wr_valid && full;
  assign rd_valid = !empty;
  assign rd_tag   = head.tag;
  assign rd_data  = head.data;

  // A write that meets a full buffer is dropped even if the head is popped in
  // the same cycle.
  sync_fifo #(.T(entry_t), .DEPTH(DEPTH)) u_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (wr_valid && !lost),
    .wr_data ('{tag: wr_tag, data: wr_data}),
    .rd_en   (rd_pop),
    .rd_data (head),
    .full    (full),
    .empty   (empty),
    .count   (count)
  );

  logic [15:0] outstanding;
  assign pending = (outstanding != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lost_count  <= '0;
      outstanding <= '0;
    end else begin
      if (lost) lost_count <= lost_count + 1'b1;
      outstanding <= outstanding + 16'(req_sent) - 16'(wr_valid);
    end
  end

endmodule

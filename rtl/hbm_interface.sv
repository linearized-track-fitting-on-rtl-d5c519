// hbm_interface: fetches the fit constants of a sector from the high-bandwidth
// memory and hands them to the constant buffers.
//
// Requests come from the NCHAN Track Buffers I (chi2 constants of a road's
// sector) and from the track multiplexer (helix-parameter constants of a
// track that passed the chi2 cut). A round-robin arbiter over these NCHAN+1
// sources forwards one request per cycle to the memory, tagged with its
// destination, road and sector. The memory answers after an unknown latency,
// in request order, with the tag echoed. Answers are stored in an internal
// FIFO of RSP_DEPTH entries (the memory is held off with hbm_rsp_ready when it
// is full) and one per cycle is written to the Constant Buffer I of the
// destination channel or to the Constant Buffer II. chi2 constants travel in
// the low bits of the memory word.
//
// The request format, the in-order answer and the arbitration are this
// design's choices; the specification gives the function of the block only.
module hbm_interface
  import tf_pkg::*;
#(
  parameter int NCHAN     = 4,
  parameter int RSP_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // chi2-constant requests from Track Buffer I of each channel
  input  logic        chi_req_valid [NCHAN],
  output logic        chi_req_ready [NCHAN],
  input  ctag_t       chi_req_tag   [NCHAN],
  // parameter-constant requests from the track multiplexer
  input  logic        par_req_valid,
  output logic        par_req_ready,
  input  ctag_t       par_req_tag,
  // memory side
  output logic        hbm_req_valid,
  input  logic        hbm_req_ready,
  output hbm_req_t    hbm_req,
  input  logic        hbm_rsp_valid,
  output logic        hbm_rsp_ready,
  input  hbm_rsp_t    hbm_rsp,
  // Constant Buffer I of each channel
  output logic        cb1_wr_valid [NCHAN],
  output ctag_t       cb1_wr_tag,
  output chi2_const_t cb1_wr_data,
  // Constant Buffer II
  output logic        cb2_wr_valid,
  output ctag_t       cb2_wr_tag,
  output par_const_t  cb2_wr_data
);
  localparam int NSRC = NCHAN + 1;
  localparam int SW   = $clog2(NSRC);

  // ---------------- request arbitration ----------------
  logic          src_valid [NSRC];
  ctag_t         src_tag   [NSRC];
  logic [SW-1:0] prio_q, grant;
  logic          any;

  always_comb begin
    for (int s = 0; s < NCHAN; s++) begin
      src_valid[s] = chi_req_valid[s];
      src_tag[s]   = chi_req_tag[s];
    end
    src_valid[NCHAN] = par_req_valid;
    src_tag[NCHAN]   = par_req_tag;
  end

  always_comb begin
    int k;
    any   = 1'b0;
    grant = '0;
    for (int i = 0; i < NSRC; i++) begin
      k = int'(prio_q) + i;
      if (k >= NSRC) k -= NSRC;
      if (!any && src_valid[k]) begin
        any   = 1'b1;
        grant = SW'(k);
      end
    end
  end

  assign hbm_req_valid = any;
  assign hbm_req.dest  = (grant == SW'(NCHAN)) ? DEST_PAR : DEST_W'(grant);
  assign hbm_req.tag   = src_tag[grant];

  always_comb begin
    for (int s = 0; s < NCHAN; s++)
      chi_req_ready[s] = any && hbm_req_ready && (grant == SW'(s));
    par_req_ready = any && hbm_req_ready && (grant == SW'(NCHAN));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) prio_q <= '0;
    else if (any && hbm_req_ready)
      prio_q <= (grant == SW'(NSRC - 1)) ? '0 : grant + 1'b1;
  end

  // ---------------- answer storage and routing ----------------
  logic     rf_full, rf_empty;
  logic [$clog2(RSP_DEPTH):0] rf_count;
  hbm_rsp_t head;

  assign hbm_rsp_ready = !rf_full;

  sync_fifo #(.T(hbm_rsp_t), .DEPTH(RSP_DEPTH)) u_rsp_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (hbm_rsp_valid),
    .wr_data (hbm_rsp),
    .rd_en   (1'b1),
    .rd_data (head),
    .full    (rf_full),
    .empty   (rf_empty),
    .count   (rf_count)
  );

  always_comb begin
    for (int c = 0; c < NCHAN; c++)
      cb1_wr_valid[c] = !rf_empty && (head.dest == DEST_W'(c));
    cb2_wr_valid = !rf_empty && (head.dest == DEST_PAR);
  end
  assign cb1_wr_tag  = head.tag;
  assign cb2_wr_tag  = head.tag;
  assign cb1_wr_data = chi2_const_t'(head.data[$bits(chi2_const_t)-1:0]);
  assign cb2_wr_data = par_const_t'(head.data);

endmodule

// hbm_model: behavioural model of the constant memory seen by the fitter.
//
// Not synthesizable. Takes one request per cycle (ready may be withheld at
// random), answers each after a random latency in [LAT_MIN, LAT_MAX] cycles,
// in request order, with the tag echoed. The data are the reference constant
// sets of the requested sector: chi2 constants in the low bits for channel
// destinations, helix-parameter constants for DEST_PAR.
module hbm_model
  import tf_pkg::*;
  import tf_ref_pkg::*;
#(
  parameter int LAT_MIN     = 20,
  parameter int LAT_MAX     = 40,
  parameter int READY_PCT   = 100
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid,
  output logic     req_ready,
  input  hbm_req_t req,
  output logic     rsp_valid,
  input  logic     rsp_ready,
  output hbm_rsp_t rsp
);
  hbm_rsp_t    q_rsp  [$];
  longint      q_time [$];
  longint      now = 0;
  longint      last_time = 0;
  int unsigned n_req = 0;
  int          ready_pct = READY_PCT;  // may be changed by the testbench

  always @(posedge clk) begin
    now <= now + 1;
    req_ready <= ($urandom_range(99) < ready_pct);
    if (!rst_n) req_ready <= 1'b0;
  end

  // One process keeps the queue and the registered outputs consistent.
  always @(posedge clk) begin
    if (!rst_n) begin
      rsp_valid <= 1'b0;
      rsp       <= '0;
    end else begin
      if (rsp_valid && rsp_ready) begin
        void'(q_rsp.pop_front());
        void'(q_time.pop_front());
      end
      if (req_valid && req_ready) begin
        hbm_rsp_t r;
        longint   t;
        r.dest = req.dest;
        r.tag  = req.tag;
        if (req.dest == DEST_PAR) r.data = HBM_DATA_W'(ref_par_const(int'(req.tag.sector)));
        else                      r.data = HBM_DATA_W'(ref_chi2_const(int'(req.tag.sector)));
        t = now + longint'($urandom_range(LAT_MAX, LAT_MIN));
        if (t <= last_time) t = last_time + 1;
        last_time = t;
        q_rsp.push_back(r);
        q_time.push_back(t);
        n_req++;
      end
      rsp_valid <= (q_rsp.size() > 0) && (q_time[0] <= now + 1);
      rsp       <= (q_rsp.size() > 0) ? q_rsp[0] : '0;
    end
  end

endmodule

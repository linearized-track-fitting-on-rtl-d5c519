// tb_track_fitter: end-to-end test of the linearized track fitter with small
// buffers, so that every overflow path is taken.
//
// Roads with random cluster counts are fed in four phases: a steady stream at
// one road every three cycles (the 80 MHz road rate at a 250 MHz clock) with a
// chi2 cut that about a quarter of the tracks pass, where the latency of
// every fitted track is checked against one microsecond (250 cycles); an
// overload with one-track roads every cycle, a cut that nearly all tracks
// pass, a slow consumer and a hesitant memory, which fills the buffers and
// loses constants; a single road with three clusters in all eight layers
// (6561 tracks); and a trickle of roads that flushes tracks waiting for lost
// constants. Every fitted track is compared with a reference computed in the
// testbench. Tracks of a road leave in decoding order, so each output must be
// the next expected passing track of its road, possibly after tracks that
// were dropped; the number of such missing tracks may not exceed the number
// of drops the fitter reports, and must be zero when it reports none.
module tb_track_fitter;
  import tf_pkg::*;
  import tf_ref_pkg::*;

  localparam int NCHAN     = 4;
  localparam int TB1_DEPTH = 16;
  localparam int CB1_DEPTH = 4;
  localparam int TB2_DEPTH = 16;
  localparam int CB2_DEPTH = 4;
  localparam int RSP_DEPTH = 8;
  localparam int MAXROADS  = 4096;
  localparam fix16_t THR_CUT = 16'sd5120;  // 20.0
  localparam fix16_t THR_ALL = 16'sh7fff;

  logic clk = 1'b0, rst_n = 1'b0;
  always #2 clk = ~clk;

  fix16_t      thr;
  logic        road_valid, road_ready;
  road_t       road;
  logic        hbm_req_valid, hbm_req_ready, hbm_rsp_valid, hbm_rsp_ready;
  hbm_req_t    hbm_req;
  hbm_rsp_t    hbm_rsp;
  logic        fit_valid, fit_ready;
  fit_result_t fit;
  logic [NCHAN-1:0] chi2_reject, cb1_lost, align1_drop;
  logic        cb2_lost, align2_drop;

  track_fitter #(
    .NCHAN(NCHAN), .TB1_DEPTH(TB1_DEPTH), .CB1_DEPTH(CB1_DEPTH),
    .TB2_DEPTH(TB2_DEPTH), .CB2_DEPTH(CB2_DEPTH), .RSP_DEPTH(RSP_DEPTH)
  ) dut (
    .clk, .rst_n, .chi2_threshold(thr),
    .road_valid, .road_ready, .road,
    .hbm_req_valid, .hbm_req_ready, .hbm_req,
    .hbm_rsp_valid, .hbm_rsp_ready, .hbm_rsp,
    .fit_valid, .fit_ready, .fit,
    .chi2_reject, .cb1_lost, .align1_drop, .cb2_lost, .align2_drop
  );

  hbm_model #(.LAT_MIN(60), .LAT_MAX(90)) u_hbm (
    .clk, .rst_n,
    .req_valid(hbm_req_valid), .req_ready(hbm_req_ready), .req(hbm_req),
    .rsp_valid(hbm_rsp_valid), .rsp_ready(hbm_rsp_ready), .rsp(hbm_rsp)
  );

  // ---------------- bookkeeping ----------------
  int          checks = 0, failures = 0;
  longint      cyc = 0;
  fit_result_t exp_q [MAXROADS][$];
  longint      t_acc [MAXROADS];
  bit          lat_road [MAXROADS];
  int          n_expected = 0, n_out = 0, n_missing = 0, n_tracks = 0;
  int          n_road_stall = 0, n_hbm_stall = 0, n_fit_stall = 0;
  int          n_reject = 0, n_cb1_lost = 0, n_al1_drop = 0, n_cb2_lost = 0, n_al2_drop = 0;
  int          n_multi = 0, n_empty_layer = 0;
  longint      lat_sum = 0, lat_max = 0;
  int          lat_n = 0;
  int          fit_ready_pct = 100;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    fit_ready <= ($urandom_range(99) < fit_ready_pct);
    if (rst_n) begin
      if (road_valid && !road_ready) n_road_stall++;
      if (hbm_req_valid && !hbm_req_ready) n_hbm_stall++;
      if (fit_valid && !fit_ready) n_fit_stall++;
      n_reject   += $countones(chi2_reject);
      n_cb1_lost += $countones(cb1_lost);
      n_al1_drop += $countones(align1_drop);
      n_cb2_lost += int'(cb2_lost);
      n_al2_drop += int'(align2_drop);
      if (road_valid && road_ready) t_acc[road.ids.road] <= cyc;
      if (fit_valid && fit_ready) begin
        int r;
        bit found;
        r = int'(fit.ids.road);
        n_out++;
        found = 1'b0;
        while (exp_q[r].size() > 0 && !found) begin
          if (exp_q[r][0] == fit) found = 1'b1;
          else n_missing++;
          void'(exp_q[r].pop_front());
        end
        check(found, $sformatf("unexpected fit for road %0d chi2=%0d", r, fit.chi2));
        if (lat_road[r]) begin
          longint lat;
          lat = cyc - t_acc[r];
          lat_sum += lat; lat_n++;
          if (lat > lat_max) lat_max = lat;
          check(lat <= 250, $sformatf("road %0d latency %0d cycles > 1 us", r, lat));
        end
      end
    end
  end

  // ---------------- stimulus ----------------
  int next_road = 0;

  // Builds a road, queues the expected fits of all its tracks.
  task automatic make_road(input int maxclus, input bit allow_empty, output road_t rd);
    int n [NLAYERS];
    int idx [NLAYERS];
    int sector;
    bit done;
    chi2_const_t kc;
    par_const_t  kp;
    rd = '0;
    sector = $urandom_range(999);
    rd.ids.road     = road_id_t'(next_road);
    rd.ids.event_id = event_id_t'(next_road / 8);
    rd.ids.sector   = sector_id_t'(sector);
    for (int l = 0; l < NLAYERS; l++) begin
      n[l] = $urandom_range(maxclus, (allow_empty && $urandom_range(9) == 0) ? 0 : 1);
      if (n[l] == 0) n_empty_layer++;
      rd.nclus[l] = NCLUS_W'(n[l]);
      for (int c = 0; c < MAX_CLUS; c++)
        rd.clus[l][c] = (c < n[l]) ? hit_t'($urandom_range(128) - 64) : hit_t'(0);
    end
    kc = ref_chi2_const(sector);
    kp = ref_par_const(sector);
    for (int l = 0; l < NLAYERS; l++) idx[l] = 0;
    done = 1'b0;
    while (!done) begin
      hit_t x [NLAYERS];
      logic signed [127:0] c2;
      for (int l = 0; l < NLAYERS; l++) x[l] = (n[l] == 0) ? hit_t'(0) : rd.clus[l][idx[l]];
      c2 = ref_chi2_full(x, kc);
      n_tracks++;
      if (ref_pass(c2, thr)) begin
        fit_result_t e;
        e.ids  = rd.ids;
        e.chi2 = ref_chi2_out(c2);
        for (int i = 0; i < NPAR; i++) e.p[i] = ref_param(x, kp, i);
        exp_q[next_road].push_back(e);
        n_expected++;
      end
      // odometer, lowest layer fastest
      done = 1'b1;
      for (int l = 0; l < NLAYERS; l++) begin
        if (idx[l] < n[l] - 1) begin
          idx[l]++;
          done = 1'b0;
          break;
        end
        idx[l] = 0;
      end
    end
    next_road++;
  endtask

  task automatic send_road(input int maxclus, input bit allow_empty, input int gap);
    road_t rd;
    make_road(maxclus, allow_empty, rd);
    if (rd.nclus != {NLAYERS{NCLUS_W'(1)}}) n_multi++;
    drive_road(rd);
    repeat (gap) @(negedge clk);
  endtask

  // Inputs change at the falling edge; a road is taken at the rising edge
  // at which road_ready is high.
  task automatic drive_road(input road_t rd);
    road       = rd;
    road_valid = 1'b1;
    while (!road_ready) @(negedge clk);
    @(negedge clk);
    road_valid = 1'b0;
  endtask

  task automatic wait_idle(input int quiet);
    int q;
    q = 0;
    while (q < quiet) begin
      @(negedge clk);
      if (fit_valid || road_valid) q = 0; else q++;
    end
  endtask

  initial begin
    road_valid = 1'b0;
    road       = '0;
    thr        = THR_CUT;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);

    // phase A: steady 80 MHz road stream, latency checked
    for (int k = 0; k < 200; k++) begin
      lat_road[next_road] = 1'b1;
      send_road(1, 1'b0, 2);
    end
    check(n_road_stall == 0, $sformatf("road input stalled %0d cycles at the nominal rate", n_road_stall));
    wait_idle(300);

    // phase B: overload
    thr = THR_ALL;
    fit_ready_pct = 40;
    u_hbm.ready_pct = 60;
    for (int k = 0; k < 300; k++) send_road(($urandom_range(3) == 0) ? 2 : 1, 1'b1, 0);
    wait_idle(400);
    fit_ready_pct = 100;
    u_hbm.ready_pct = 100;

    // phase C: the largest road, three clusters in every layer
    thr = THR_CUT;
    send_full_road();
    // phase D: flush
    for (int k = 0; k < 32; k++) send_road(1, 1'b0, 40);
    wait_idle(600);

    // results
    check(n_out > 0, "no fitted tracks");
    check(n_missing <= n_al1_drop + n_al2_drop,
          $sformatf("%0d tracks missing, only %0d drops reported", n_missing, n_al1_drop + n_al2_drop));
    if (n_al1_drop + n_al2_drop == 0) check(n_missing == 0, "tracks missing without drops");
    for (int r = 0; r < next_road; r++) begin
      if (exp_q[r].size() > 0 && r < 220) $display("road %0d: %0d fits dropped", r, exp_q[r].size());
      n_missing += exp_q[r].size();
    end
    check(n_out + n_missing == n_expected, "output count does not add up");
    // every mechanism must have been seen
    check(n_road_stall > 0, "no road-input stall");
    check(n_hbm_stall > 0, "no memory back-pressure");
    check(n_fit_stall > 0, "no output back-pressure");
    check(n_reject > 0, "no track failed the chi2 cut");
    check(n_cb1_lost + n_cb2_lost > 0, "no constant set lost in a full buffer");
    check(n_al1_drop + n_al2_drop > 0, "no track dropped for lost constants");
    check(n_multi > 0, "no multi-track road");
    check(n_empty_layer > 0, "no road with an empty layer");
    $display("tracks=%0d expected_fits=%0d fits=%0d missing=%0d rejects=%0d", n_tracks, n_expected, n_out, n_missing, n_reject);
    $display("stalls: road=%0d hbm=%0d out=%0d  lost: cb1=%0d cb2=%0d  drops: al1=%0d al2=%0d",
             n_road_stall, n_hbm_stall, n_fit_stall, n_cb1_lost, n_cb2_lost, n_al1_drop, n_al2_drop);
    if (lat_n > 0) $display("phase A latency: mean %0d max %0d cycles over %0d fits", lat_sum / lat_n, lat_max, lat_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sends a road with three clusters in all layers and queues its 6561 fits.
  task automatic send_full_road();
    road_t rd;
    make_full(rd);
    drive_road(rd);
  endtask

  task automatic make_full(output road_t rd);
    // same as make_road with every layer at three clusters
    int idx [NLAYERS];
    int sector;
    bit done;
    chi2_const_t kc;
    par_const_t  kp;
    rd = '0;
    sector = $urandom_range(999);
    rd.ids.road     = road_id_t'(next_road);
    rd.ids.event_id = event_id_t'(next_road / 8);
    rd.ids.sector   = sector_id_t'(sector);
    for (int l = 0; l < NLAYERS; l++) begin
      rd.nclus[l] = NCLUS_W'(MAX_CLUS);
      for (int c = 0; c < MAX_CLUS; c++) rd.clus[l][c] = hit_t'($urandom_range(128) - 64);
    end
    kc = ref_chi2_const(sector);
    kp = ref_par_const(sector);
    for (int l = 0; l < NLAYERS; l++) idx[l] = 0;
    done = 1'b0;
    while (!done) begin
      hit_t x [NLAYERS];
      logic signed [127:0] c2;
      for (int l = 0; l < NLAYERS; l++) x[l] = rd.clus[l][idx[l]];
      c2 = ref_chi2_full(x, kc);
      n_tracks++;
      if (ref_pass(c2, thr)) begin
        fit_result_t e;
        e.ids  = rd.ids;
        e.chi2 = ref_chi2_out(c2);
        for (int i = 0; i < NPAR; i++) e.p[i] = ref_param(x, kp, i);
        exp_q[next_road].push_back(e);
        n_expected++;
      end
      done = 1'b1;
      for (int l = 0; l < NLAYERS; l++) begin
        if (idx[l] < MAX_CLUS - 1) begin
          idx[l]++;
          done = 1'b0;
          break;
        end
        idx[l] = 0;
      end
    end
    n_multi++;
    next_road++;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired: outs=%0d fit_valid=%0d road_valid=%0d", n_out, fit_valid, road_valid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

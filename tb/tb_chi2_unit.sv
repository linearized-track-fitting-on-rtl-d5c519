// tb_chi2_unit: test of the chi2 unit against the wide-integer reference.
//
// Random tracks and constant sets are sent, first with the testbench's usual
// small values and a cut that some tracks pass and some fail, then with
// full-range hits, slopes and offsets (which must all fail), and finally
// with a negative threshold. Every passing track must appear at the output, in order, with
// the reference chi2; failing tracks must raise reject and vanish. A single
// track checks the latency of four cycles, and a random consumer exercises
// the stall of the pipeline.
module tb_chi2_unit;
  import tf_pkg::*;
  import tf_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  fix16_t      thr;
  logic        in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1, reject;
  track_t      in_trk = '0;
  chi2_const_t in_cst = '0;
  good_track_t out_data;

  chi2_unit dut (.clk, .rst_n, .threshold(thr), .in_valid, .in_ready, .in_trk, .in_cst,
                 .out_valid, .out_ready, .out_data, .reject);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  good_track_t exp_q [$];
  int n_pass = 0, n_rej = 0, n_rej_seen = 0, n_stall = 0;
  int out_ready_pct = 100;

  always @(posedge clk) if (rst_n) begin
    out_ready <= ($urandom_range(99) < out_ready_pct);
    if (reject) n_rej_seen++;
    if (out_valid && !out_ready) n_stall++;
    if (out_valid && out_ready) begin
      check(exp_q.size() > 0 && out_data == exp_q[0],
            $sformatf("output road %h chi2 %h, expected road %h chi2 %h (%0d queued)",
                      out_data.trk.ids.road, out_data.chi2, exp_q[0].trk.ids.road,
                      exp_q[0].chi2, exp_q.size()));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
  end

  task automatic send(input bit big);
    hit_t x [NLAYERS];
    logic signed [127:0] c2;
    in_trk = '0;
    in_trk.ids.road = road_id_t'($urandom);
    in_trk.ids.sector = sector_id_t'($urandom);
    in_trk.last = 1'b1;
    for (int l = 0; l < NLAYERS; l++) begin
      x[l] = big ? hit_t'($urandom) : hit_t'($urandom_range(128) - 64);
      in_trk.x[l] = x[l];
    end
    in_cst = big ? chi2_const_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                                  $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                                  $urandom, $urandom, $urandom})
                 : ref_chi2_const($urandom_range(999));
    c2 = ref_chi2_full(x, in_cst);
    if (ref_pass(c2, thr)) begin
      good_track_t e;
      e.trk = in_trk;
      e.chi2 = ref_chi2_out(c2);
      exp_q.push_back(e);
      n_pass++;
    end else n_rej++;
    in_valid = 1'b1;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    thr = 16'sd5120;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // latency of one passing track
    begin
      int lat;
      thr = 16'sh7fff;
      in_trk = '0; in_cst = '0; in_trk.x[0] = 16'sd3;
      in_cst.s[0][0] = 16'sd256; // residual 3.0, chi2 9.0
      exp_q.push_back('{trk: in_trk, chi2: 16'sd2304});
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      lat = 1;
      while (!out_valid && lat < 20) begin @(negedge clk); lat++; end
      check(lat == 4, $sformatf("latency %0d cycles, expected 4", lat));
      @(negedge clk);
    end
    thr = 16'sd5120;
    out_ready_pct = 60;
    for (int k = 0; k < 400; k++) send(1'b0);
    repeat (10) @(negedge clk);   // the threshold is static while tracks are in flight
    thr = 16'sh7fff;
    for (int k = 0; k < 100; k++) send(1'b1);
    repeat (10) @(negedge clk);
    thr = 16'sh8000;   // negative threshold: everything fails
    for (int k = 0; k < 20; k++) send(1'b0);
    out_ready_pct = 100;
    repeat (20) @(negedge clk);
    check(exp_q.size() == 0, $sformatf("%0d passing tracks not delivered", exp_q.size()));
    check(n_rej_seen == n_rej, $sformatf("reject pulses %0d, expected %0d", n_rej_seen, n_rej));
    check(n_pass > 0 && n_rej > 0 && n_stall > 0, "coverage: pass, reject and stall");
    $display("pass=%0d reject=%0d stall=%0d", n_pass, n_rej, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

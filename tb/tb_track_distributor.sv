// tb_track_distributor: test of the road distribution and decoding.
//
// Random roads (one to three clusters per layer, sometimes an empty layer)
// are offered back to back while every channel's consumer is randomly ready.
// Road k must appear on channel k mod 4, and each channel must emit every
// cluster combination of its roads, lowest layer fastest, with zero for an
// empty layer, first set on the first and last on the final track. With all
// consumers ready, a road of N tracks must occupy its channel for exactly N
// cycles, and the first track must follow the road by one cycle.
module tb_track_distributor;
  import tf_pkg::*;

  localparam int NCHAN = 4;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   in_valid = 1'b0, in_ready;
  road_t  in_road = '0;
  logic   out_valid [NCHAN];
  logic   out_ready [NCHAN];
  track_t out_track [NCHAN];

  track_distributor #(.NCHAN(NCHAN)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_road,
                                          .out_valid, .out_ready, .out_track);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  track_t exp_q [NCHAN][$];
  int     ready_pct = 70;
  int     n_tracks = 0, n_empty = 0;

  always @(posedge clk) begin
    for (int c = 0; c < NCHAN; c++) begin
      if (rst_n && out_valid[c] && out_ready[c]) begin
        check(exp_q[c].size() > 0 && out_track[c] == exp_q[c][0],
              $sformatf("channel %0d: road %0d track differs", c, out_track[c].ids.road));
        if (exp_q[c].size() > 0) void'(exp_q[c].pop_front());
      end
      out_ready[c] <= ($urandom_range(99) < ready_pct);
    end
  end

  int next_road = 0;

  function automatic road_t make_road(input int maxclus);
    road_t rd;
    int n [NLAYERS];
    int idx [NLAYERS];
    bit done;
    rd = '0;
    rd.ids.road = road_id_t'(next_road);
    rd.ids.event_id = event_id_t'($urandom);
    rd.ids.sector = sector_id_t'($urandom);
    for (int l = 0; l < NLAYERS; l++) begin
      n[l] = ($urandom_range(9) == 0) ? 0 : $urandom_range(maxclus, 1);
      if (n[l] == 0) n_empty++;
      rd.nclus[l] = NCLUS_W'(n[l]);
      for (int k = 0; k < MAX_CLUS; k++) rd.clus[l][k] = hit_t'($urandom);
    end
    for (int l = 0; l < NLAYERS; l++) idx[l] = 0;
    done = 0;
    while (!done) begin
      track_t t;
      t.ids = rd.ids;
      for (int l = 0; l < NLAYERS; l++) t.x[l] = (n[l] == 0) ? hit_t'(0) : rd.clus[l][idx[l]];
      t.first = 1'b1;
      for (int l = 0; l < NLAYERS; l++) if (idx[l] != 0) t.first = 1'b0;
      done = 1;
      for (int l = 0; l < NLAYERS; l++) begin
        if (idx[l] < n[l] - 1) begin idx[l]++; done = 0; break; end
        idx[l] = 0;
      end
      t.last = done;
      exp_q[next_road % NCHAN].push_back(t);
      n_tracks++;
    end
    next_road++;
    return rd;
  endfunction

  task automatic send(input road_t rd);
    in_road = rd;
    in_valid = 1'b1;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    for (int c = 0; c < NCHAN; c++) out_ready[c] = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int k = 0; k < 200; k++) send(make_road($urandom_range(3, 1)));
    repeat (3000) @(negedge clk);
    for (int c = 0; c < NCHAN; c++)
      check(exp_q[c].size() == 0, $sformatf("channel %0d: %0d tracks missing", c, exp_q[c].size()));
    // timing with all consumers ready
    ready_pct = 100;
    repeat (3) @(negedge clk);
    begin
      road_t rd;
      int ch, ntr, cycles, first_at;
      ch = next_road % NCHAN;
      ntr = n_tracks;
      rd = make_road(2);
      ntr = n_tracks - ntr;
      in_road = rd; in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      cycles = 0; first_at = -1;
      for (int c = 0; c < 600; c++) begin
        if (out_valid[ch]) begin
          cycles++;
          if (first_at < 0) first_at = c;
        end
        @(negedge clk);
      end
      check(first_at == 0, $sformatf("first track %0d cycles after the road", first_at + 1));
      check(cycles == ntr, $sformatf("%0d tracks took %0d cycles", ntr, cycles));
      check(exp_q[ch].size() == 0, "timing road incomplete");
    end
    check(n_empty > 0, "no empty layer");
    $display("roads=%0d tracks=%0d", next_road, n_tracks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

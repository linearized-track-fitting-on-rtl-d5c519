// tb_track_buffer: test of the track buffer in both of its uses.
//
// Track Buffer I (REQUEST = 1, depth 8): random tracks, a random fraction of
// them marked first of a road, are offered while the request port and the
// reader are randomly ready. A first track may only enter together with its
// request, which must carry the track's road and sector; no other track may
// raise a request; tracks must leave in order; the buffer must hold exactly
// its depth and refuse more. Track Buffer II (REQUEST = 0) must take tracks
// without ever requesting.
module tb_track_buffer;
  import tf_pkg::*;

  localparam int DEPTH = 8;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic   in_valid = 1'b0, in_ready, in_first = 1'b0, out_valid, out_ready = 1'b0;
  logic   req_valid, req_ready = 1'b0;
  track_t in_data = '0, out_data;
  ctag_t  in_tag, req_tag;
  logic   b_in_ready, b_out_valid, b_out_ready = 1'b0, b_req_valid;
  good_track_t b_out_data;
  ctag_t  b_req_tag;
  good_track_t b_in_data = '0;

  assign in_tag = '{road: in_data.ids.road, sector: in_data.ids.sector};

  track_buffer #(.T(track_t), .DEPTH(DEPTH), .REQUEST(1'b1)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .in_first, .in_tag,
    .out_valid, .out_ready, .out_data, .req_valid, .req_ready, .req_tag);

  track_buffer #(.T(good_track_t), .DEPTH(DEPTH), .REQUEST(1'b0)) dut2 (
    .clk, .rst_n, .in_valid, .in_ready(b_in_ready), .in_data(b_in_data), .in_first(1'b1),
    .in_tag, .out_valid(b_out_valid), .out_ready(b_out_ready), .out_data(b_out_data),
    .req_valid(b_req_valid), .req_ready(1'b0), .req_tag(b_req_tag));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  track_t exp_q [$];
  int n_in = 0, n_req = 0, n_full = 0, n_req_wait = 0;
  int req_pct = 60, rd_pct = 50;

  always @(posedge clk) if (rst_n) begin
    int occ;
    occ = exp_q.size();
    check(out_valid == (exp_q.size() > 0), "out_valid disagrees with occupancy");
    if (out_valid && out_ready) begin
      check(exp_q.size() > 0 && out_data == exp_q[0], "track order or content");
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
    if (in_valid && in_ready) begin
      exp_q.push_back(in_data);
      n_in++;
      check(in_first == (req_valid && req_ready), "request and first track not together");
    end
    if (req_valid) begin
      check(in_first && in_valid, "request without a first track");
      check(req_tag == in_tag, "request tag differs from track");
      if (req_ready) n_req++;
    end
    if (in_valid && in_first && !req_ready && !in_ready) n_req_wait++;
    if (in_valid && !in_ready && occ == DEPTH) n_full++;
    check(!(occ < DEPTH && in_valid && !in_first && !in_ready), "input refused while not full");
    check(!b_req_valid, "Track Buffer II raised a request");
    req_ready <= ($urandom_range(99) < req_pct);
    out_ready <= ($urandom_range(99) < rd_pct);
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // fill without reading: exactly DEPTH entries fit
    req_pct = 100; rd_pct = 0;
    repeat (2) @(negedge clk);
    for (int k = 0; k < DEPTH + 3; k++) begin
      in_data = track_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      in_first = 1'b0;
      in_valid = 1'b1;
      @(negedge clk);
    end
    in_valid = 1'b0;
    check(n_in == DEPTH, $sformatf("buffer took %0d tracks, depth is %0d", n_in, DEPTH));
    // random traffic
    req_pct = 60; rd_pct = 50;
    for (int k = 0; k < 2000; k++) begin
      in_data = track_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      in_first = ($urandom_range(2) == 0);
      in_valid = ($urandom_range(3) != 0);
      @(negedge clk);
      while (in_valid && !in_ready) @(negedge clk);
    end
    in_valid = 1'b0;
    rd_pct = 100;
    repeat (DEPTH + 5) @(negedge clk);
    check(exp_q.size() == 0, "tracks left over");
    check(n_req > 0 && n_full > 0 && n_req_wait > 0, "coverage: requests, full, waiting request");
    $display("tracks=%0d requests=%0d full=%0d", n_in, n_req, n_full);
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

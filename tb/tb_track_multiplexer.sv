// tb_track_multiplexer: test of the track multiplexer.
//
// Four CHI2-unit outputs offer random tracks; Track Buffer II and the request
// port of the memory interface are randomly ready. A track may only move when
// both accept it, the request must carry the moving track's road and sector,
// the tracks of each input must leave in order, and with all four inputs
// always valid each must be served at least once every four cycles.
module tb_track_multiplexer;
  import tf_pkg::*;

  localparam int NCHAN = 4;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid [NCHAN];
  logic        in_ready [NCHAN];
  good_track_t in_data  [NCHAN];
  logic        out_valid, out_ready = 1'b0, req_valid, req_ready = 1'b0;
  good_track_t out_data;
  ctag_t       req_tag;

  track_multiplexer #(.NCHAN(NCHAN)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data, .req_valid, .req_ready, .req_tag);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  good_track_t sent_q [NCHAN][$];
  int  valid_pct = 50, out_pct = 70, req_pct = 70, n_moved = 0, max_wait = 0;
  int  wait_cnt [NCHAN];
  bit  all_busy = 0;

  function automatic good_track_t rnd_track();
    return good_track_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
  endfunction

  always @(posedge clk) if (rst_n) begin
    bit moved;
    moved = 0;
    begin
      bit any;
      any = 0;
      for (int c = 0; c < NCHAN; c++) any |= in_valid[c];
      check(out_valid == (any && req_ready) && req_valid == (any && out_ready), "handshake");
    end
    for (int c = 0; c < NCHAN; c++) begin
      if (in_valid[c] && in_ready[c]) begin
        check(!moved, "two inputs taken");
        moved = 1;
        n_moved++;
        check(out_valid && out_ready && req_valid && req_ready, "moved without both ready");
        check(out_data == in_data[c], "output differs from the taken input");
        check(req_tag == '{road: in_data[c].trk.ids.road, sector: in_data[c].trk.ids.sector},
              "request tag");
        if (all_busy && wait_cnt[c] > max_wait) max_wait = wait_cnt[c];
        wait_cnt[c] = 0;
      end else if (in_valid[c] && out_ready && req_ready) wait_cnt[c]++;
    end
    if (!moved) check(!(out_valid && out_ready && req_valid && req_ready), "transfer without a taken input");
    out_ready <= ($urandom_range(99) < out_pct);
    req_ready <= ($urandom_range(99) < req_pct);
    for (int c = 0; c < NCHAN; c++)
      if (!in_valid[c] || in_ready[c]) begin
        in_valid[c] <= ($urandom_range(99) < valid_pct);
        in_data[c]  <= rnd_track();
      end
  end

  initial begin
    for (int c = 0; c < NCHAN; c++) begin
      in_valid[c] = 0; in_data[c] = '0; wait_cnt[c] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3000) @(negedge clk);
    valid_pct = 100; out_pct = 100; req_pct = 100;
    repeat (5) @(negedge clk);
    all_busy = 1;
    repeat (400) @(negedge clk);
    check(max_wait <= NCHAN - 1, $sformatf("an input waited %0d cycles", max_wait));
    check(n_moved > 1000, "too few tracks moved");
    $display("moved=%0d max_wait=%0d", n_moved, max_wait);
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

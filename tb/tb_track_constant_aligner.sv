// tb_track_constant_aligner: test of the track/constant aligner.
//
// The testbench models the two buffers in front of the aligner. Roads of one
// to four tracks enter the track queue; the constant set of each road is
// either lost (one in five) or arrives in the constant queue after a random
// delay, in road order; pending is high while sets are still on their way.
// Every track of a road whose set arrives must leave paired with that set, in
// order; every track of a road whose set was lost must be dropped and
// counted; a set must be popped with the last track of its road. The
// consumer is randomly ready.
module tb_track_constant_aligner;
  import tf_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        trk_valid, trk_last, trk_pop, cst_valid, cst_pending, cst_pop;
  track_t      trk_data;
  ctag_t       trk_tag, cst_tag;
  chi2_const_t cst_data, out_cst;
  logic        out_valid, out_ready = 1'b0, dropped;
  track_t      out_trk;
  logic [31:0] drop_count;

  track_constant_aligner #(.TRK_T(track_t), .CST_T(chi2_const_t)) dut (
    .clk, .rst_n, .trk_valid, .trk_data, .trk_tag, .trk_last, .trk_pop,
    .cst_valid, .cst_data, .cst_tag, .cst_pending, .cst_pop,
    .out_valid, .out_ready, .out_trk, .out_cst, .dropped, .drop_count);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  typedef struct packed { ctag_t tag; chi2_const_t data; } cst_t;
  typedef struct packed { track_t trk; chi2_const_t data; } pair_t;

  track_t trk_q [$];
  cst_t   cst_q [$];
  cst_t   fly_q [$];
  longint fly_t [$];
  pair_t  exp_q [$];
  longint cyc = 0;
  int     n_drop_exp = 0, n_drop_seen = 0, n_out = 0, n_wait = 0;

  // The buffer heads are driven from the queues after every rising edge.
  assign trk_tag  = '{road: trk_data.ids.road, sector: trk_data.ids.sector};
  assign trk_last = trk_data.last;

  task automatic drive();
    trk_valid   <= trk_q.size() > 0;
    trk_data    <= (trk_q.size() > 0) ? trk_q[0] : '0;
    cst_valid   <= cst_q.size() > 0;
    cst_tag     <= (cst_q.size() > 0) ? cst_q[0].tag : '0;
    cst_data    <= (cst_q.size() > 0) ? cst_q[0].data : '0;
    cst_pending <= fly_q.size() > 0;
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (trk_valid && !cst_valid && cst_pending) n_wait++;
    if (dropped) n_drop_seen++;
    if (out_valid && out_ready) begin
      n_out++;
      check(exp_q.size() > 0 && out_trk == exp_q[0].trk && out_cst == exp_q[0].data,
            $sformatf("output road %0d", out_trk.ids.road));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
    if (cst_pop) check(trk_pop && trk_last, "set popped without the last track of its road");
    if (trk_pop) void'(trk_q.pop_front());
    if (cst_pop) void'(cst_q.pop_front());
    while (fly_q.size() > 0 && fly_t[0] <= cyc) begin
      cst_q.push_back(fly_q.pop_front());
      void'(fly_t.pop_front());
    end
    out_ready <= ($urandom_range(2) != 0);
    drive();
  end

  longint last_arrival = 0;

  task automatic add_road(input int r);
    int     ntr;
    bit     lost;
    cst_t   c;
    c.tag  = '{road: road_id_t'(r), sector: sector_id_t'($urandom)};
    c.data = chi2_const_t'({$urandom, $urandom, $urandom, $urandom, $urandom,
                            $urandom, $urandom, $urandom, $urandom, $urandom,
                            $urandom, $urandom, $urandom, $urandom, $urandom});
    ntr  = $urandom_range(4, 1);
    lost = ($urandom_range(4) == 0);
    for (int k = 0; k < ntr; k++) begin
      track_t t;
      t = track_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
      t.ids.road = c.tag.road;
      t.ids.sector = c.tag.sector;
      t.first = (k == 0);
      t.last = (k == ntr - 1);
      trk_q.push_back(t);
      if (lost) n_drop_exp++;
      else exp_q.push_back('{trk: t, data: c.data});
    end
    if (!lost) begin
      longint t_arr;
      t_arr = cyc + longint'($urandom_range(20));
      if (t_arr < last_arrival) t_arr = last_arrival;
      last_arrival = t_arr;
      fly_q.push_back(c);
      fly_t.push_back(t_arr);
    end
  endtask

  initial begin
    trk_valid = 1'b0; cst_valid = 1'b0; cst_pending = 1'b0;
    trk_data = '0; cst_tag = '0; cst_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 400; r++) begin
      add_road(r);
      repeat ($urandom_range(4)) @(negedge clk);
    end
    for (int k = 0; k < 5000 && trk_q.size() > 0; k++) @(negedge clk);
    repeat (10) @(negedge clk);
    check(trk_q.size() == 0, $sformatf("%0d tracks stuck", trk_q.size()));
    check(exp_q.size() == 0, $sformatf("%0d pairs missing", exp_q.size()));
    check(n_drop_seen == n_drop_exp && drop_count == 32'(n_drop_exp),
          $sformatf("dropped %0d (count %0d), expected %0d", n_drop_seen, drop_count, n_drop_exp));
    check(n_wait > 0 && n_drop_exp > 0, "coverage: waiting for a set, dropping");
    $display("pairs=%0d dropped=%0d waits=%0d", n_out, n_drop_seen, n_wait);
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

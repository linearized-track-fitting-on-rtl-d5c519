// tb_am_emulator: test of the associative-memory emulator.
//
// Part 1 replays the worked example of the pattern-matching algorithm: six
// layers, a bank of four patterns and three hit words, after which only
// patterns 0 and 2 have all six layers flagged; with a threshold of six they
// must come out in that order, one per cycle after the end-of-event step, and
// with a threshold of three pattern 3 joins them. Part 2 runs random events
// against the default-size emulator (eight layers, 256 patterns) with a
// reference model of the per-layer flags and a random consumer.
module tb_am_emulator;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- small emulator of the worked example ----------------
  logic        s_wr_en = 0, s_cmd_valid = 0, s_cmd_ready, s_out_valid, s_out_ready = 1, s_done;
  logic [1:0]  s_wr_addr = 0, s_out_id;
  logic [5:0][7:0] s_wr_ssid = '0, s_ssid = '0;
  logic [1:0]  s_cmd = 0;
  logic [5:0]  s_lv = '0;
  logic [2:0]  s_thr = 3'd6;

  am_emulator #(.NLAYERS(6), .NPAT(4), .SSID_W(8)) u_small (
    .clk, .rst_n,
    .pat_wr_en(s_wr_en), .pat_wr_addr(s_wr_addr), .pat_wr_ssid(s_wr_ssid),
    .cmd_valid(s_cmd_valid), .cmd_ready(s_cmd_ready), .cmd(s_cmd),
    .layer_valid(s_lv), .ssid(s_ssid), .threshold(s_thr),
    .out_valid(s_out_valid), .out_ready(s_out_ready), .out_id(s_out_id), .done(s_done)
  );

  // ---------------- default-size emulator ----------------
  localparam int NL = 8, NP = 256, SW = 16;
  logic            b_wr_en = 0, b_cmd_valid = 0, b_cmd_ready, b_out_valid, b_out_ready = 1, b_done;
  logic [7:0]      b_wr_addr = 0, b_out_id;
  logic [NL-1:0][SW-1:0] b_wr_ssid = '0, b_ssid = '0;
  logic [1:0]      b_cmd = 0;
  logic [NL-1:0]   b_lv = '0;
  logic [3:0]      b_thr = 4'd8;

  am_emulator u_big (
    .clk, .rst_n,
    .pat_wr_en(b_wr_en), .pat_wr_addr(b_wr_addr), .pat_wr_ssid(b_wr_ssid),
    .cmd_valid(b_cmd_valid), .cmd_ready(b_cmd_ready), .cmd(b_cmd),
    .layer_valid(b_lv), .ssid(b_ssid), .threshold(b_thr),
    .out_valid(b_out_valid), .out_ready(b_out_ready), .out_id(b_out_id), .done(b_done)
  );

  // pattern bank and hit words of the worked example, layer 0 first
  int ex_bank [4][6] = '{'{3,1,3,8,9,0}, '{4,5,3,0,1,7}, '{8,1,7,9,5,2}, '{4,2,5,3,2,0}};
  int ex_hit  [3][6] = '{'{4,1,3,8,0,2}, '{8,6,7,9,5,0}, '{3,4,5,7,9,0}};
  bit ex_lv   [3][6] = '{'{1,1,1,1,1,1}, '{1,1,1,1,1,0}, '{1,1,1,1,1,1}};

  task automatic small_event(input int thr, input int exp_ids [$]);
    int got [$];
    int cyc_end, cyc_first;
    s_thr = 3'(thr);
    s_cmd_valid = 1; s_cmd = 2'd0; s_lv = '0;
    @(negedge clk);
    for (int w = 0; w < 3; w++) begin
      s_cmd = 2'd1;
      for (int l = 0; l < 6; l++) begin
        s_ssid[l] = 8'(ex_hit[w][l]);
        s_lv[l]   = ex_lv[w][l];
      end
      @(negedge clk);
    end
    s_cmd = 2'd2;
    @(negedge clk);
    s_cmd_valid = 0;
    cyc_first = -1;
    for (int c = 0; c < 10 && !s_done; c++) begin
      check(!s_cmd_ready, "commands accepted during readout");
      if (s_out_valid) begin
        got.push_back(int'(s_out_id));
        if (cyc_first < 0) cyc_first = c;
      end
      @(negedge clk);
    end
    check(got == exp_ids, $sformatf("threshold %0d: got %p expected %p", thr, got, exp_ids));
    check(cyc_first == 0, "first identifier not in the cycle after the end step");
    @(negedge clk);
    check(s_cmd_ready, "not ready after readout");
  endtask

  // ---------------- random events on the default-size emulator ----------------
  logic [NL-1:0][SW-1:0] bank [NP];

  task automatic big_event(input int nwords, input int thr);
    logic [NL-1:0] flags [NP];
    int exp_ids [$];
    int guard;
    b_thr = 4'(thr);
    for (int p = 0; p < NP; p++) flags[p] = '0;
    b_cmd_valid = 1; b_cmd = 2'd0;
    @(negedge clk);
    for (int w = 0; w < nwords; w++) begin
      b_cmd = 2'd1;
      for (int l = 0; l < NL; l++) begin
        b_ssid[l] = SW'($urandom_range(15));
        b_lv[l]   = ($urandom_range(3) != 0);
      end
      for (int p = 0; p < NP; p++)
        for (int l = 0; l < NL; l++)
          if (b_lv[l] && bank[p][l] == b_ssid[l]) flags[p][l] = 1'b1;
      @(negedge clk);
    end
    b_cmd = 2'd2;
    @(negedge clk);
    b_cmd_valid = 0;
    for (int p = 0; p < NP; p++) if ($countones(flags[p]) >= thr) exp_ids.push_back(p);
    guard = 0;
    while (!b_done && guard < 2000) begin
      b_out_ready = ($urandom_range(2) != 0);
      #1;
      if (b_out_valid && b_out_ready) begin
        check(exp_ids.size() > 0 && int'(b_out_id) == exp_ids[0],
              $sformatf("returned pattern %0d", b_out_id));
        if (exp_ids.size() > 0) void'(exp_ids.pop_front());
      end
      @(negedge clk);
      guard++;
    end
    b_out_ready = 1;
    check(exp_ids.size() == 0, $sformatf("%0d matched patterns not returned", exp_ids.size()));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // load the example bank through the direct load port
    for (int p = 0; p < 4; p++) begin
      s_wr_en = 1; s_wr_addr = 2'(p);
      for (int l = 0; l < 6; l++) s_wr_ssid[l] = 8'(ex_bank[p][l]);
      @(negedge clk);
    end
    s_wr_en = 0;
    small_event(6, '{0, 2});
    small_event(3, '{0, 2, 3});
    small_event(2, '{0, 1, 2, 3});

    for (int p = 0; p < NP; p++) begin
      for (int l = 0; l < NL; l++) bank[p][l] = SW'($urandom_range(15));
      b_wr_en = 1; b_wr_addr = 8'(p); b_wr_ssid = bank[p];
      @(negedge clk);
    end
    b_wr_en = 0;
    for (int e = 0; e < 6; e++) big_event($urandom_range(12, 3), $urandom_range(8, 4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_parameter_calculator: test of the helix-parameter calculator against the
// wide-integer reference.
//
// Random tracks with the testbench's constant sets, then full-range values
// that drive the outputs into saturation, are sent under a random consumer.
// Every result must match p_i = C_i.x + q_i rounded and saturated to 16 bits,
// carry the identifiers and chi2 of its track, arrive in order, and the
// first one must appear three cycles after it was accepted.
module tb_parameter_calculator;
  import tf_pkg::*;
  import tf_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1;
  good_track_t in_trk = '0;
  par_const_t  in_cst = '0;
  fit_result_t out_data;

  parameter_calculator dut (.clk, .rst_n, .in_valid, .in_ready, .in_trk, .in_cst,
                            .out_valid, .out_ready, .out_data);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  fit_result_t exp_q [$];
  int n_sat = 0, n_stall = 0, n_out = 0;
  int out_ready_pct = 100;

  always @(posedge clk) if (rst_n) begin
    out_ready <= ($urandom_range(99) < out_ready_pct);
    if (out_valid && !out_ready) n_stall++;
    if (out_valid && out_ready) begin
      n_out++;
      check(exp_q.size() > 0 && out_data == exp_q[0], $sformatf("result %0d differs", n_out));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
  end

  task automatic send(input bit big);
    hit_t x [NLAYERS];
    fit_result_t e;
    in_trk = '0;
    in_trk.trk.ids = ids_t'({$urandom, $urandom});
    in_trk.chi2 = fix16_t'($urandom);
    for (int l = 0; l < NLAYERS; l++) begin
      x[l] = big ? hit_t'($urandom) : hit_t'($urandom_range(128) - 64);
      in_trk.trk.x[l] = x[l];
    end
    if (big)
      for (int i = 0; i < NPAR; i++) begin
        for (int l = 0; l < NLAYERS; l++) in_cst.c[i][l] = coef_t'($urandom);
        in_cst.q[i] = offs_t'($urandom);
      end
    else in_cst = ref_par_const($urandom_range(999));
    e.ids = in_trk.trk.ids;
    e.chi2 = in_trk.chi2;
    for (int i = 0; i < NPAR; i++) begin
      e.p[i] = ref_param(x, in_cst, i);
      if (e.p[i] == 16'sh7fff || e.p[i] == 16'sh8000) n_sat++;
    end
    exp_q.push_back(e);
    in_valid = 1'b1;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    begin
      int lat;
      send(1'b0);
      lat = 1;
      while (!out_valid && lat < 20) begin @(negedge clk); lat++; end
      check(lat == 3, $sformatf("latency %0d cycles, expected 3", lat));
      @(negedge clk);
    end
    out_ready_pct = 60;
    for (int k = 0; k < 300; k++) send(1'b0);
    for (int k = 0; k < 100; k++) send(1'b1);
    out_ready_pct = 100;
    repeat (20) @(negedge clk);
    check(exp_q.size() == 0, $sformatf("%0d results missing", exp_q.size()));
    check(n_sat > 0 && n_stall > 0, "coverage: saturation and stall");
    $display("results=%0d saturated=%0d stall=%0d", n_out, n_sat, n_stall);
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

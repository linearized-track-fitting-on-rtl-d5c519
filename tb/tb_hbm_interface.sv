// tb_hbm_interface: test of the constant-memory interface.
//
// Four chi2 sources and the parameter source raise random requests with
// random tags. A memory model in the testbench accepts requests when
// randomly ready, answers each with a random data word after a random delay,
// in order, and is held off by hbm_rsp_ready (which the interface only
// lowers when its answer store is full). Checks: each source's requests
// reach the memory in order with the right destination and tag; every answer
// is written exactly once, in order, to the constant buffer of its
// destination with its tag and the right part of the data word; with every source requesting all
// the time, each is served within NCHAN+1 memory-ready cycles.
module tb_hbm_interface;
  import tf_pkg::*;

  localparam int NCHAN = 4;
  localparam int NSRC  = NCHAN + 1;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        chi_req_valid [NCHAN];
  logic        chi_req_ready [NCHAN];
  ctag_t       chi_req_tag   [NCHAN];
  logic        par_req_valid, par_req_ready;
  ctag_t       par_req_tag;
  logic        hbm_req_valid, hbm_req_ready = 1'b0, hbm_rsp_valid = 1'b0, hbm_rsp_ready;
  hbm_req_t    hbm_req;
  hbm_rsp_t    hbm_rsp = '0;
  logic        cb1_wr_valid [NCHAN];
  ctag_t       cb1_wr_tag, cb2_wr_tag;
  chi2_const_t cb1_wr_data;
  logic        cb2_wr_valid;
  par_const_t  cb2_wr_data;

  hbm_interface #(.NCHAN(NCHAN), .RSP_DEPTH(4)) dut (
    .clk, .rst_n, .chi_req_valid, .chi_req_ready, .chi_req_tag,
    .par_req_valid, .par_req_ready, .par_req_tag,
    .hbm_req_valid, .hbm_req_ready, .hbm_req, .hbm_rsp_valid, .hbm_rsp_ready, .hbm_rsp,
    .cb1_wr_valid, .cb1_wr_tag, .cb1_wr_data, .cb2_wr_valid, .cb2_wr_tag, .cb2_wr_data);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // source side
  logic  s_valid [NSRC];
  ctag_t s_tag   [NSRC];
  logic  s_ready [NSRC];
  always_comb begin
    for (int s = 0; s < NCHAN; s++) begin
      chi_req_valid[s] = s_valid[s];
      chi_req_tag[s]   = s_tag[s];
      s_ready[s]       = chi_req_ready[s];
    end
    par_req_valid   = s_valid[NCHAN];
    par_req_tag     = s_tag[NCHAN];
    s_ready[NCHAN]  = par_req_ready;
  end

  hbm_rsp_t mem_q  [$];             // answers not yet given
  longint   mem_t  [$];
  hbm_rsp_t wr_q   [$];             // answers given, not yet written to a buffer
  longint   cyc = 0;
  int       req_pct = 50, mem_pct = 70, rsp_pct = 80, n_wr = 0, n_hold = 0;
  int       wait_cnt [NSRC];
  int       max_wait = 0;
  bit       all_busy = 0;

  function automatic logic [DEST_W-1:0] dest_of(input int s);
    return (s == NCHAN) ? DEST_PAR : DEST_W'(s);
  endfunction

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    // requests
    if (hbm_req_valid && hbm_req_ready) begin
      bit hit;
      hbm_rsp_t r;
      hit = 0;
      for (int s = 0; s < NSRC; s++)
        if (s_valid[s] && s_ready[s]) begin
          check(!hit, "two sources granted");
          hit = 1;
          check(hbm_req.dest == dest_of(s) && hbm_req.tag == s_tag[s], "request dest/tag");
        end
      check(hit, "request without a granted source");
      r.dest = hbm_req.dest;
      r.tag  = hbm_req.tag;
      r.data = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                $urandom};
      mem_q.push_back(r);
      mem_t.push_back(cyc + longint'($urandom_range(30, 5)));
    end else begin
      for (int s = 0; s < NSRC; s++) check(!(s_valid[s] && s_ready[s]), "grant without memory request");
    end
    // fairness: count memory-ready cycles a valid source waits
    for (int s = 0; s < NSRC; s++) begin
      if (s_valid[s] && !s_ready[s] && hbm_req_ready) wait_cnt[s]++;
      if (s_valid[s] && s_ready[s]) begin
        if (all_busy && wait_cnt[s] > max_wait) max_wait = wait_cnt[s];
        wait_cnt[s] = 0;
      end
    end
    // buffer writes
    begin
      int nv;
      nv = int'(cb2_wr_valid);
      for (int c = 0; c < NCHAN; c++) nv += int'(cb1_wr_valid[c]);
      check(nv <= 1, "several buffers written at once");
      if (nv == 1) begin
        n_wr++;
        check(wr_q.size() > 0, "write without an answer");
        if (wr_q.size() > 0) begin
          hbm_rsp_t e;
          e = wr_q.pop_front();
          if (e.dest == DEST_PAR)
            check(cb2_wr_valid && cb2_wr_tag == e.tag && cb2_wr_data == par_const_t'(e.data),
                  "Constant Buffer II write");
          else
            check(cb1_wr_valid[e.dest] && cb1_wr_tag == e.tag &&
                  cb1_wr_data == chi2_const_t'(e.data[$bits(chi2_const_t)-1:0]),
                  "Constant Buffer I write");
        end
      end
    end
    // answers
    if (hbm_rsp_valid && !hbm_rsp_ready) n_hold++;
    if (hbm_rsp_valid && hbm_rsp_ready) begin
      wr_q.push_back(hbm_rsp);
      void'(mem_q.pop_front());
      void'(mem_t.pop_front());
    end
    // drive the memory outputs for the next cycle
    hbm_req_ready <= ($urandom_range(99) < mem_pct);
    if (mem_q.size() > 0 && mem_t[0] <= cyc && $urandom_range(99) < rsp_pct) begin
      hbm_rsp_valid <= 1'b1;
      hbm_rsp       <= mem_q[0];
    end else hbm_rsp_valid <= 1'b0;
    // sources: a request stays until it is taken
    for (int s = 0; s < NSRC; s++) begin
      if (!s_valid[s] || s_ready[s]) begin
        s_valid[s] <= ($urandom_range(99) < req_pct);
        s_tag[s]   <= ctag_t'($urandom);
      end
    end
  end

  initial begin
    for (int s = 0; s < NSRC; s++) begin
      s_valid[s] = 0; s_tag[s] = '0; wait_cnt[s] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3000) @(negedge clk);
    // saturate: every source requests every cycle, memory always ready
    req_pct = 100; mem_pct = 100; rsp_pct = 100; all_busy = 1;
    repeat (500) @(negedge clk);
    req_pct = 0;
    repeat (200) @(negedge clk);
    check(wr_q.size() == 0 && mem_q.size() == 0, "answers not delivered");
    check(max_wait <= NSRC, $sformatf("a source waited %0d cycles", max_wait));
    $display("writes=%0d max_wait=%0d held=%0d", n_wr, max_wait, n_hold);
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

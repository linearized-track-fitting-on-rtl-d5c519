// tb_constant_buffer: test of the constant buffer.
//
// Tagged constant sets are written at random (the writer never waits) while
// the head is popped at random. Sets must leave in order; a set that arrives
// while the buffer holds DEPTH entries must be lost, raise lost and count;
// pending must be high exactly while more requests were issued than sets
// arrived.
module tb_constant_buffer;
  import tf_pkg::*;

  localparam int DEPTH = 4;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        wr_valid = 1'b0, rd_valid, rd_pop = 1'b0, lost, req_sent = 1'b0, pending;
  ctag_t       wr_tag = '0, rd_tag;
  chi2_const_t wr_data = '0, rd_data;
  logic [31:0] lost_count;

  constant_buffer #(.T(chi2_const_t), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .wr_valid, .wr_tag, .wr_data, .rd_valid, .rd_tag, .rd_data, .rd_pop,
    .req_sent, .pending, .lost, .lost_count);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  typedef struct packed { ctag_t tag; chi2_const_t data; } ent_t;
  ent_t   q [$];
  int     n_lost = 0, outstanding = 0, n_wr = 0, n_full_pop = 0;

  // reference model, updated at every rising edge from the values before it
  always @(posedge clk) if (rst_n) begin
    int pre;
    pre = q.size();
    check(rd_valid == (pre > 0), "rd_valid disagrees with occupancy");
    check(pending == (outstanding > 0), "pending disagrees with outstanding requests");
    if (rd_valid && rd_pop)
      check(rd_tag == q[0].tag && rd_data == q[0].data, "head differs");
    if (wr_valid) check(lost == (pre == DEPTH), "lost flag");
    if (rd_pop && pre > 0) void'(q.pop_front());
    if (wr_valid) begin
      n_wr++;
      if (pre < DEPTH) q.push_back('{tag: wr_tag, data: wr_data});
      else begin
        n_lost++;
        if (rd_pop) n_full_pop++;
      end
    end
    outstanding += int'(req_sent) - int'(wr_valid);
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int k = 0; k < 3000; k++) begin
      // sets never outnumber the requests issued for them
      req_sent = ($urandom_range(1) == 0);
      wr_valid = (outstanding > 0) && ($urandom_range(1) == 0);
      rd_pop   = rd_valid && ($urandom_range(2) == 0) && (k % 500 < 400);
      wr_tag   = ctag_t'($urandom);
      wr_data  = chi2_const_t'({$urandom, $urandom, $urandom, $urandom, $urandom,
                                $urandom, $urandom, $urandom, $urandom, $urandom,
                                $urandom, $urandom, $urandom, $urandom, $urandom});
      @(negedge clk);
    end
    wr_valid = 1'b0; rd_pop = 1'b0; req_sent = 1'b0;
    @(negedge clk);
    check(lost_count == 32'(n_lost), $sformatf("lost_count %0d, expected %0d", lost_count, n_lost));
    check(n_lost > 0 && n_full_pop > 0, "coverage: lost sets, write to a full buffer during a pop");
    $display("writes=%0d lost=%0d", n_wr, n_lost);
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

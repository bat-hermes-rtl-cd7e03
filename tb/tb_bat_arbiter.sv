// tb_bat_arbiter: self-checking test of the output-interface arbiter.
//
// Four requesters raise a level request at random moments and, once
// granted, hold it for a random number of edges (a packet) before dropping
// it. A reference model in the testbench checks on every edge: at most one
// grant, grants only to requesters, a holder keeps its grant while it
// requests, a free output is granted on the next edge, and simultaneous
// requesters are served in round-robin order. It also counts how often
// two or more requests were pending at once (contention) and requires that
// to have happened.
module tb_bat_arbiter;
  localparam int unsigned N = 4;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] req = '0, grant;
  int checks = 0, failures = 0;
  int hold [N] = '{default: 0};
  int served [N] = '{default: 0};
  int contention = 0;
  int last = N - 1;
  logic [N-1:0] exp_grant = '0;

  bat_arbiter #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .req_i(req), .grant_o(grant));

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      check(grant == exp_grant, $sformatf("cyc %0d grant %b expected %b (req %b)", cyc, grant, exp_grant, req));
      // Requesters: a granted one counts down its packet, others may ask.
      for (int k = 0; k < N; k++) begin
        if (grant[k] && req[k]) begin
          if (hold[k] == 0) req[k] = 0; else hold[k]--;
        end else if (!req[k] && $urandom_range(0, 3) == 0) begin
          req[k]  = 1;
          hold[k] = $urandom_range(0, 6);
        end
      end
      if ($countones(req) > 1) contention++;
      // Reference: next grant from the requests now presented.
      if ((exp_grant & req) != '0) exp_grant = exp_grant & req;
      else begin
        exp_grant = '0;
        for (int off = 1; off <= N; off++) begin
          int idx;
          idx = (last + off) % N;
          if (exp_grant == '0 && req[idx]) begin exp_grant[idx] = 1; last = idx; served[idx]++; end
        end
      end
    end
    for (int k = 0; k < N; k++) check(served[k] > 10, $sformatf("requester %0d served %0d times", k, served[k]));
    check(contention > 0, "contention never happened");
    $display("contention cycles: %0d", contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

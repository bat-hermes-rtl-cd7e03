// tb_bat_fifo: self-checking test of the circular 2-phase FIFO.
//
// A writer pushes random flits with random gaps and a reader consumes them
// with random delays; every flit read is compared, in order, with a copy
// kept by the testbench. A second phase stalls the reader and checks that
// exactly BUFFER_DEPTH writes are acknowledged before backpressure holds the
// writer, and that the buffer then drains in order. The read request must
// appear one edge after the first write into an empty buffer.
module tb_bat_fifo;
  localparam int unsigned FS = 16;
  localparam int unsigned BD = 8;

  logic clk = 0, rst_n = 0;
  logic req_wr = 0, ack_rd = 0;
  logic ack_wr, req_rd;
  logic [FS-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [FS-1:0] q[$];
  int nread = 0, nwritten = 0;
  bit stall = 0;

  bat_fifo #(.FLIT_SIZE(FS), .BUFFER_DEPTH(BD)) dut (
    .clk(clk), .rst_n(rst_n), .req_wr_i(req_wr), .ack_wr_o(ack_wr), .data_i(wdata),
    .req_rd_o(req_rd), .ack_rd_i(ack_rd), .data_o(rdata));

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Reader: acknowledges each offered flit after a random delay.
  initial begin
    forever begin
      @(negedge clk);
      if (rst_n && !stall && req_rd != ack_rd) begin
        repeat ($urandom_range(0, 2)) @(negedge clk);
        check(q.size() > 0 && rdata == q[0], $sformatf("read %0d data %h", nread, rdata));
        if (q.size() > 0) void'(q.pop_front());
        ack_rd = ~ack_rd;
        nread++;
      end
    end
  end

  task automatic write_flit(logic [FS-1:0] d);
    wdata  = d;
    req_wr = ~req_wr;
    q.push_back(d);
    while (ack_wr != req_wr) @(negedge clk);
    nwritten++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // Latency: first write into an empty buffer.
    write_flit(16'hA5A5);
    check(req_rd == 1'b0, "no read request before the write lands");
    @(negedge clk);
    check(req_rd == 1'b1, "read request one edge after the write");
    // Random traffic.
    for (int n = 0; n < 300; n++) begin
      repeat ($urandom_range(0, 1)) @(negedge clk);
      write_flit(FS'($urandom));
    end
    while (q.size() != 0) @(negedge clk);
    // Backpressure: stalled reader.
    stall = 1;
    repeat (2) @(negedge clk);
    for (int n = 0; n < BD; n++) write_flit(FS'(16'h1000 + n));
    wdata  = 16'hBEEF;
    req_wr = ~req_wr;
    q.push_back(16'hBEEF);
    repeat (10) @(negedge clk);
    check(ack_wr != req_wr, "write beyond depth is held back");
    stall = 0;
    while (ack_wr != req_wr) @(negedge clk);
    check(1'b1, "held write accepted after the reader resumed");
    while (q.size() != 0) @(negedge clk);
    check(nread == nwritten + 1 + 0, $sformatf("all flits read (%0d of %0d)", nread, nwritten + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

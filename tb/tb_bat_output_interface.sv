// tb_bat_output_interface: self-checking test of an Output Interface.
//
// Four models of Input Interfaces send packets to the OI at random times,
// so they often compete for it. A header flit carries the sender index and
// a packet number, the size flit a random payload size, and every payload
// flit the sender, packet number and position. The sink on the output link
// acknowledges after random delays and checks that packets arrive whole
// and in order, never interleaved (wormhole: the grant is held for a whole
// packet), with every flit's data intact. The models also make foreign
// transitions on their shared data request, as if a flit had gone to
// another OI, which the OI must ignore. Contention (two or more senders
// waiting at once) must occur.
module tb_bat_output_interface;
  import bat_pkg::*;
  localparam int unsigned FS = 16;
  localparam int NPKT = 25;

  logic clk = 0, rst_n = 0;
  logic [NOTHER-1:0] req_outport = '0, req_data = '0, last_flit = '0;
  logic [NOTHER-1:0] ack_outport, ack_data;
  logic [FS-1:0] data [NOTHER];
  logic req_link, ack_link = 0;
  logic [FS-1:0] data_link;
  int checks = 0, failures = 0;
  int contention = 0, foreign = 0, received = 0;
  logic [NOTHER-1:0] waiting = '0;

  bat_output_interface #(.FLIT_SIZE(FS)) dut (
    .clk(clk), .rst_n(rst_n), .req_outport_i(req_outport), .ack_outport_o(ack_outport),
    .req_data_i(req_data), .ack_data_o(ack_data), .last_flit_i(last_flit), .data_i(data),
    .req_o(req_link), .ack_i(ack_link), .data_o(data_link));

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic sender(int k);
    for (int p = 0; p < NPKT; p++) begin
      int size;
      size = $urandom_range(0, 6);
      repeat ($urandom_range(0, 10)) @(negedge clk);
      if ($urandom_range(0, 2) == 0) begin
        req_data[k] = ~req_data[k];     // a flit that went to another OI
        foreign++;
        @(negedge clk);
      end
      data[k] = FS'({4'hA, 4'(k), 8'(p)});
      req_outport[k] = ~req_outport[k];
      waiting[k] = 1;
      while (ack_outport[k] != req_outport[k]) @(negedge clk);
      waiting[k] = 0;
      for (int n = 0; n <= size; n++) begin
        data[k] = (n == 0) ? FS'(size) : FS'({4'(k), 6'(p), 6'(n)});
        req_data[k] = ~req_data[k];
        if (n == size) last_flit[k] = ~last_flit[k];
        while (ack_data[k] == expect_old[k]) @(negedge clk);
        expect_old[k] = ack_data[k];
      end
    end
  endtask
  logic [NOTHER-1:0] expect_old = '0;

  // Sink: parses packets on the output link.
  int next_pkt [NOTHER] = '{default: 0};
  initial begin
    int src, pkt, size, pos;
    pos = -2; src = 0; pkt = 0; size = 0;
    forever begin
      @(negedge clk);
      if ($countones(waiting) > 1) contention++;
      if (rst_n && req_link != ack_link) begin
        if (pos == -2) begin
          check(data_link[15:12] == 4'hA, $sformatf("header expected, got %h", data_link));
          src = int'(data_link[11:8]);
          pkt = int'(data_link[7:0]);
          check(src < NOTHER && pkt == next_pkt[src], $sformatf("packet order src %0d pkt %0d", src, pkt));
          if (src < NOTHER) next_pkt[src] = pkt + 1;
          pos = -1;
        end else if (pos == -1) begin
          size = int'(data_link);
          pos  = (size == 0) ? -2 : 1;
          if (size == 0) received++;
        end else begin
          check(data_link == FS'({4'(src), 6'(pkt), 6'(pos)}), $sformatf("payload %h src %0d pkt %0d pos %0d", data_link, src, pkt, pos));
          if (pos == size) begin pos = -2; received++; end else pos++;
        end
        repeat ($urandom_range(0, 2)) @(negedge clk);
        ack_link = ~ack_link;
      end
    end
  end

  initial begin
    for (int k = 0; k < NOTHER; k++) data[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    fork
      sender(0);
      sender(1);
      sender(2);
      sender(3);
    join
    repeat (10) @(negedge clk);
    check(received == NOTHER * NPKT, $sformatf("received %0d packets", received));
    check(contention > 0, "contention never happened");
    check(foreign > 0, "no foreign data request");
    $display("contention cycles %0d, foreign requests %0d", contention, foreign);
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

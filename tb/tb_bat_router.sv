// tb_bat_router: end-to-end self-checking test of the five-port router.
//
// Router (1,1) with its default parameters. A source on each input port
// sends NPKT packets to random other ports (targets chosen so that XY
// routing leads to that port), with random gaps and payload sizes 0..24;
// a sink on each output port acknowledges after random delays and, now and
// then, stalls for a long time. The header's upper byte names the source
// port and packet number, and each payload flit is a function of source,
// packet number and position, so every sink can check that it receives only
// packets routed to it, whole and never interleaved, in order per source,
// with every flit intact. The mechanisms of the design are counted and each
// must occur: a packet to each output, arbitration between two or more
// inputs, a full input buffer holding back its link, the OI phase matcher
// absorbing a data-request phase left by a packet that went elsewhere,
// zero-size packets, and four or more connections active at once.
module tb_bat_router;
  import bat_pkg::*;
  localparam int unsigned FS = 16;
  localparam int unsigned BD = 8;
  localparam int NPKT = 60;

  logic clk = 0, rst_n = 0;
  logic [NPORTS-1:0] rx_req = '0, rx_ack, tx_req, tx_ack = '0;
  logic [FS-1:0] rx_data [NPORTS], tx_data [NPORTS];
  int checks = 0, failures = 0;

  bat_router dut (
    .clk(clk), .rst_n(rst_n), .rx_req(rx_req), .rx_ack(rx_ack), .rx_data(rx_data),
    .tx_req(tx_req), .tx_ack(tx_ack), .tx_data(tx_data));

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [7:0] addr_of(int port);
    case (port)
      0: return 8'h21;
      1: return 8'h01;
      2: return 8'h12;
      3: return 8'h10;
      default: return 8'h11;
    endcase
  endfunction

  function automatic int port_of(logic [7:0] a);
    if (a[7:4] > 4'h1) return 0;
    if (a[7:4] < 4'h1) return 1;
    if (a[3:0] > 4'h1) return 2;
    if (a[3:0] < 4'h1) return 3;
    return 4;
  endfunction

  function automatic logic [FS-1:0] payload(int src, int seq, int n);
    return FS'({3'(src), 5'(seq), 8'(n)}) ^ FS'(n * 16'h3b1);
  endfunction

  // Expected sizes per (source, destination), in order.
  int exp_size [NPORTS][NPORTS][$];
  int exp_seq  [NPORTS][NPORTS][$];
  int delivered = 0, to_port [NPORTS] = '{default: 0}, zero_size = 0;
  int sent_done = 0;

  // ---------------- sources ----------------
  task automatic source(int i);
    for (int p = 0; p < NPKT; p++) begin
      int dest, size;
      do dest = $urandom_range(0, NPORTS - 1); while (dest == i);
      size = ($urandom_range(0, 9) == 0) ? 0 : $urandom_range(1, 24);
      if (size == 0) zero_size++;
      exp_size[i][dest].push_back(size);
      exp_seq[i][dest].push_back(p);
      repeat ($urandom_range(0, 6)) @(negedge clk);
      for (int n = -1; n <= size; n++) begin
        rx_data[i] = (n == -1) ? {3'(i), 5'(p), addr_of(dest)}
                   : (n == 0)  ? FS'(size) : payload(i, p, n);
        rx_req[i] = ~rx_req[i];
        while (rx_ack[i] != rx_req[i]) @(negedge clk);
      end
    end
    sent_done++;
  endtask

  // ---------------- sinks ----------------
  task automatic sink(int o);
    int pos, src, seq, size;
    pos = -2; src = 0; seq = 0; size = 0;
    forever begin
      @(negedge clk);
      if (tx_req[o] != tx_ack[o]) begin
        if (pos == -2) begin
          src = int'(tx_data[o][15:13]);
          seq = int'(tx_data[o][12:8]);
          check(port_of(tx_data[o][7:0]) == o, $sformatf("port %0d got header %h", o, tx_data[o]));
          check(src < NPORTS && exp_seq[src][o].size() > 0 && exp_seq[src][o][0] % 32 == seq,
                $sformatf("port %0d unexpected packet src %0d seq %0d", o, src, seq));
          pos = -1;
        end else if (pos == -1) begin
          size = int'(tx_data[o]);
          if (src < NPORTS && exp_size[src][o].size() > 0) begin
            check(size == exp_size[src][o][0], $sformatf("port %0d size %0d", o, size));
            void'(exp_size[src][o].pop_front());
            void'(exp_seq[src][o].pop_front());
          end
          if (size == 0) begin pos = -2; delivered++; to_port[o]++; end
          else pos = 1;
        end else begin
          check(tx_data[o] == payload(src, seq, pos), $sformatf("port %0d payload %h pos %0d", o, tx_data[o], pos));
          if (pos == size) begin pos = -2; delivered++; to_port[o]++; end
          else pos++;
        end
        if ($urandom_range(0, 60) == 0) repeat (40) @(negedge clk);   // long stall
        else repeat ($urandom_range(0, 2)) @(negedge clk);
        tx_ack[o] = ~tx_ack[o];
      end
    end
  endtask

  // ---------------- mechanism counters ----------------
  int contention = 0, buffer_full = 0, phase_match = 0, busy4 = 0;
  for (genvar p = 0; p < NPORTS; p++) begin : g_mon
    always @(negedge clk) begin
      if ($countones(dut.g_port[p].g_oi.u_oi.arb_req) > 1) contention++;
      if (dut.g_port[p].g_ii.u_ii.u_fifo.count == BD) buffer_full++;
    end
    for (genvar k = 0; k < NOTHER; k++) begin : g_oc
      always @(negedge clk) begin
        if (dut.g_port[p].g_oi.u_oi.g_ctrl[k].u_ctrl.state_q == 3'd0 &&
            dut.g_port[p].g_oi.u_oi.g_ctrl[k].u_ctrl.req_outport_i != dut.g_port[p].g_oi.u_oi.g_ctrl[k].u_ctrl.ack_outport_o &&
            dut.g_port[p].g_oi.u_oi.g_ctrl[k].u_ctrl.req_data_i != dut.g_port[p].g_oi.u_oi.g_ctrl[k].u_ctrl.ack_data_o)
          phase_match++;
      end
    end
  end
  always @(negedge clk) if ($countones(tx_req ^ tx_ack) >= 4) busy4++;

  initial begin
    for (int i = 0; i < NPORTS; i++) rx_data[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    fork
      sink(0); sink(1); sink(2); sink(3); sink(4);
    join_none
    fork
      source(0); source(1); source(2); source(3); source(4);
    join
    while (delivered < NPORTS * NPKT) @(negedge clk);
    repeat (20) @(negedge clk);
    check(delivered == NPORTS * NPKT, $sformatf("delivered %0d packets", delivered));
    for (int o = 0; o < NPORTS; o++) check(to_port[o] > 0, $sformatf("no packet to port %0d", o));
    for (int i = 0; i < NPORTS; i++)
      for (int o = 0; o < NPORTS; o++)
        check(exp_size[i][o].size() == 0, $sformatf("packets %0d->%0d missing", i, o));
    check(tx_req == tx_ack && rx_req == rx_ack, "all links idle at the end");
    check(contention > 0, "arbitration contention never happened");
    check(buffer_full > 0, "input buffer never filled");
    check(phase_match > 0, "phase matcher never needed");
    check(zero_size > 0, "no zero-size packet");
    check(busy4 > 0, "never four connections at once");
    $display("mechanisms: contention=%0d buffer_full=%0d phase_match=%0d zero_size=%0d busy4=%0d",
             contention, buffer_full, phase_match, zero_size, busy4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (delivered %0d)", delivered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bat_router_full: the power-measurement traffic pattern on a router with
// all parameters at their defaults (16-bit flits, 8-flit buffers).
//
// Five packets of 4,096 flits each (header, size flit 4,094, 4,094 payload
// flits) enter all five ports at once and leave through all five ports, with
// no contention: LOCAL->EAST, EAST->WEST, WEST->NORTH, NORTH->SOUTH,
// SOUTH->LOCAL. Sources issue the next flit as soon as the previous one is
// acknowledged and sinks acknowledge on the next edge. The pattern runs
// twice: best case (all payload flits zero) and worst case (each payload
// flit the inverse of the one before). Every flit is checked at its output,
// and the time between successive link acknowledges at an output, the
// quantity the throughput figure is based on, is checked against this
// clocked rendition's steady-state rate of one flit per three edges per
// connection. The header latency through the idle router (input request
// to output request) must be seven edges.
module tb_bat_router_full;
  import bat_pkg::*;
  localparam int unsigned FS = 16;
  localparam int PKT_FLITS = 4096;

  logic clk = 0, rst_n = 0;
  logic [NPORTS-1:0] rx_req = '0, rx_ack, tx_req, tx_ack = '0;
  logic [FS-1:0] rx_data [NPORTS], tx_data [NPORTS];
  int checks = 0, failures = 0;
  int dest_of [NPORTS] = '{0: 1, 1: 2, 2: 3, 3: 4, 4: 0};
  int src_of  [NPORTS] = '{0: 4, 1: 0, 2: 1, 3: 2, 4: 3};
  bit worst = 0;
  int got [NPORTS];
  int first_ack [NPORTS], last_ack [NPORTS];
  int cycle = 0;
  int t_start = 0;

  bat_router dut (
    .clk(clk), .rst_n(rst_n), .rx_req(rx_req), .rx_ack(rx_ack), .rx_data(rx_data),
    .tx_req(tx_req), .tx_ack(tx_ack), .tx_data(tx_data));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

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

  function automatic logic [FS-1:0] flit(int src, int n);
    if (n == 0) return {8'(src), addr_of(dest_of[src])};
    if (n == 1) return FS'(PKT_FLITS - 2);
    if (!worst) return '0;
    return (n % 2 == 0) ? FS'(16'h5A5A ^ src) : ~FS'(16'h5A5A ^ src);
  endfunction

  task automatic source(int i);
    for (int n = 0; n < PKT_FLITS; n++) begin
      rx_data[i] = flit(i, n);
      rx_req[i]  = ~rx_req[i];
      while (rx_ack[i] != rx_req[i]) @(negedge clk);
    end
  endtask

  task automatic sink(int o);
    int s;
    s = src_of[o];
    got[o] = 0;
    while (got[o] < PKT_FLITS) begin
      @(negedge clk);
      if (tx_req[o] != tx_ack[o]) begin
        if (tx_data[o] != flit(s, got[o])) begin
          failures++;
          $display("FAIL: port %0d flit %0d %h expected %h", o, got[o], tx_data[o], flit(s, got[o]));
        end
        checks++;
        tx_ack[o] = ~tx_ack[o];
        if (got[o] == 0) begin
          first_ack[o] = cycle;
          check(cycle - t_start == 7, $sformatf("port %0d header latency %0d edges", o, cycle - t_start));
        end
        last_ack[o] = cycle;
        got[o]++;
      end
    end
  endtask

  task automatic run(bit w, string name);
    int t0;
    worst = w;
    t0 = cycle;
    t_start = cycle;
    fork
      source(0); source(1); source(2); source(3); source(4);
      sink(0); sink(1); sink(2); sink(3); sink(4);
    join
    $display("%s: %0d flits per port in %0d edges, %0.1f bits per edge over five connections",
             name, PKT_FLITS, cycle - t0, real'(NPORTS * PKT_FLITS * FS) / real'(cycle - t0));
    for (int o = 0; o < NPORTS; o++) begin
      real per_flit;
      per_flit = real'(last_ack[o] - first_ack[o]) / real'(PKT_FLITS - 1);
      check(got[o] == PKT_FLITS, $sformatf("%s: port %0d got %0d flits", name, o, got[o]));
      check(per_flit <= 3.0, $sformatf("%s: port %0d %f edges per flit", name, o, per_flit));
    end
    check(cycle - t0 < 3 * PKT_FLITS + 40, $sformatf("%s took %0d edges", name, cycle - t0));
  endtask

  initial begin
    for (int i = 0; i < NPORTS; i++) rx_data[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run(0, "best case");
    repeat (10) @(negedge clk);
    run(1, "worst case");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

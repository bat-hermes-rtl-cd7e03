// tb_bat_routing_unit: exhaustive test of the XY routing decision.
//
// One routing unit per port (MY_PORT = 0..4) at router address X=1, Y=1 is
// given every 8-bit target address with en_i high. The expected port is
// computed here from the XY rule (X first: larger -> EAST, smaller -> WEST;
// then Y: larger -> NORTH, smaller -> SOUTH; else LOCAL) and converted to the
// 4-entry index of that unit; routes back to the unit's own port are
// skipped (that unit is not enabled). With en_i low every output must be zero.
module tb_bat_routing_unit;
  import bat_pkg::*;
  localparam int unsigned FS = 16;
  localparam logic [7:0] ADDR = 8'h11;

  logic en;
  logic [NPORTS-1:0] en_p;   // no unit is enabled for a route back to itself
  logic [7:0] addr;
  logic [NOTHER-1:0] req [NPORTS];
  int checks = 0, failures = 0;

  for (genvar p = 0; p < NPORTS; p++) begin : g_ru
    bat_routing_unit #(.FLIT_SIZE(FS), .MY_PORT(p), .ADDRESS(ADDR)) dut (
      .en_i(en_p[p]), .target_address_i(addr), .req_outport_o(req[p]));
  end

  function automatic int xy(logic [7:0] t);
    if (t[7:4] > ADDR[7:4]) return 0;
    if (t[7:4] < ADDR[7:4]) return 1;
    if (t[3:0] > ADDR[3:0]) return 2;
    if (t[3:0] < ADDR[3:0]) return 3;
    return 4;
  endfunction

  initial begin
    for (int a = 0; a < 256; a++) begin
      int d;
      addr = 8'(a);
      d = xy(addr);
      en = 1;
      for (int p = 0; p < NPORTS; p++) en_p[p] = (d != p);
      #1;
      for (int p = 0; p < NPORTS; p++) begin
        logic [NOTHER-1:0] e;
        if (d == p) continue;
        e = '0;
        e[(d < p) ? d : d - 1] = 1'b1;
        checks++;
        if (req[p] !== e) begin
          failures++;
          $display("FAIL: port %0d addr %h got %b expected %b", p, addr, req[p], e);
        end
      end
      en = 0;
      en_p = '0;
      #1;
      for (int p = 0; p < NPORTS; p++) begin
        checks++;
        if (req[p] != '0) begin failures++; $display("FAIL: output while disabled"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

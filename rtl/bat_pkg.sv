// bat_pkg: shared constants and helpers of the BAT-Hermes router.
//
// The router has five ports, numbered as in the Hermes family: EAST, WEST,
// NORTH, SOUTH and LOCAL (the attached IP). Every Input Interface (II)
// reaches the Output Interfaces (OI) of the four other ports, so both sides
// use a 4-entry "other port" index. The two mapping functions below fix that
// wiring in one place:
//   II i -> OI p   uses outport index  j = (p < i) ? p : p-1
//   OI p <- II i   uses input index    k = (i < p) ? i : i-1
// The five ports and the four-way fan-out follow the published design; the port
// numbering and the index order are this design's choice.
package bat_pkg;

  localparam int unsigned NPORTS = 5;
  localparam int unsigned NOTHER = NPORTS - 1;

  typedef enum logic [2:0] {
    EAST  = 3'd0,
    WEST  = 3'd1,
    NORTH = 3'd2,
    SOUTH = 3'd3,
    LOCAL = 3'd4
  } port_e;

  // Index, on the II of port `src`, of the request line toward OI `dst`.
  function automatic int unsigned outport_index(int unsigned src, int unsigned dst);
    return (dst < src) ? dst : dst - 1;
  endfunction

  // Port number reached by outport index `j` of the II of port `src`.
  function automatic int unsigned outport_port(int unsigned src, int unsigned j);
    return (j < src) ? j : j + 1;
  endfunction

endpackage

// port_decoder: selects the module row that holds a given port.
//
// When modules are cascaded for more ports, each row of modules owns a
// contiguous block of NPORTS/NROWS ports. The decoder turns a port number into
// a one-hot row select; the selected row's rightmost module runs in master
// mode and the other rows stay idle. It also returns the port's address
// inside the row's pools. The decoder itself is named in the document; the
// contiguous block assignment is this design's choice.
//
// Purely combinational.
module port_decoder #(
  parameter int unsigned NPORTS = 16,  // ports of the whole system
  parameter int unsigned NROWS  = 1,   // module rows, a power of two
  localparam int unsigned PAW  = (NPORTS > 1) ? $clog2(NPORTS) : 1,
  localparam int unsigned PPR  = NPORTS / NROWS,                  // ports per row
  localparam int unsigned LPAW = (PPR > 1) ? $clog2(PPR) : 1
) (
  input  logic [PAW-1:0]   port,
  output logic [NROWS-1:0] row_sel,   // one-hot
  output logic [LPAW-1:0]  local_port
);

  always_comb begin
    row_sel    = '0;
    local_port = LPAW'(port % PPR);
    for (int r = 0; r < NROWS; r++)
      if (32'(port) / PPR == r) row_sel[r] = 1'b1;
  end

endmodule

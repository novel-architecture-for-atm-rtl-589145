// priority_pool: embedded memory with one QoS entry per output port.
//
// An entry holds the records of all NQ queues of a port in rank order
// (element NQ-1 is the highest rank, the next output candidate). Each record
// carries the queue's empty flag, priority value, cost, queue id and cell
// count (see qos_rec.svh). The memory has one synchronous read port and one
// write port: rd_data shows the entry addressed at the previous clock edge.
// A read and a write of the same address at the same edge return the old
// entry; the manager forwards the newer one itself.
//
// The document only asks for an embedded memory fast enough for one access
// per sort (a single-port SRAM or a FIFO when ports are served in turn).
// The separate read and write ports, which let a new request start while the
// previous one is written back, are this design's choice. The memory is not
// reset; every port must be written (OP_LOAD) before it is used.
module priority_pool #(
  parameter int unsigned NPORTS = 16,  // output ports sharing the manager
  parameter int unsigned NQ     = 4,   // queues per port
  parameter int unsigned PW     = 6,   // priority bits
  parameter int unsigned CW     = 4,   // cost bits
  parameter int unsigned NW     = 8,   // cell-count bits
  parameter int unsigned QW     = (NQ > 1) ? $clog2(NQ) : 1, // queue-id bits
  localparam int unsigned PAW = (NPORTS > 1) ? $clog2(NPORTS) : 1,
  localparam int unsigned RW  = 1 + PW + CW + QW + NW
) (
  input  logic                  clk,
  input  logic                  rd_en,
  input  logic [PAW-1:0]        rd_addr,
  output logic [NQ-1:0][RW-1:0] rd_data,
  input  logic                  wr_en,
  input  logic [PAW-1:0]        wr_addr,
  input  logic [NQ-1:0][RW-1:0] wr_data
);

  logic [NQ-1:0][RW-1:0] mem [NPORTS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule

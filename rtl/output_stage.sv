// output_stage: hands the output candidate's cell to the output port and
// performs the empty check.
//
// On an output request (serve = 1) the stage looks at the candidate record,
// the highest-ranked queue of the port. If its empty flag is 1 the queue has
// cells: one is sent (send = 1), the cell count is decremented, and last = 1
// when that was the queue's last cell. last goes to the priority processor,
// which then bypasses the subtractor and clears the empty flag. If the
// candidate is empty, every queue of the port is empty and nothing is sent.
//
// send, last and cnt_next are combinational. The cell output (port number and
// queue id, to be turned into a cell pointer by the switch's buffer manager)
// is registered: cell_valid rises one clock edge after serve.
// Tracking occupancy with a per-queue cell count, rather than reading the
// switch's cell-pointer lists, is this design's choice.
module output_stage #(
  parameter int unsigned NPORTS = 16,
  parameter int unsigned NQ     = 4,
  parameter int unsigned NW     = 8,
  localparam int unsigned PAW = (NPORTS > 1) ? $clog2(NPORTS) : 1,
  localparam int unsigned QW  = (NQ > 1) ? $clog2(NQ) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           serve,        // output request in this cycle
  input  logic [PAW-1:0] port,         // port being served
  input  logic           cand_eflag,   // candidate's empty flag (1 = has cells)
  input  logic [QW-1:0]  cand_qid,
  input  logic [NW-1:0]  cand_cnt,
  output logic           send,         // a cell leaves in this cycle
  output logic           last,         // empty check: it is the queue's last cell
  output logic [NW-1:0]  cnt_next,     // cell count after the send
  output logic           cell_valid,   // registered cell output
  output logic [PAW-1:0] cell_port,
  output logic [QW-1:0]  cell_qid
);

  assign send     = serve && cand_eflag && (cand_cnt != '0);
  assign last     = send && (cand_cnt == NW'(1));
  assign cnt_next = send ? cand_cnt - NW'(1) : cand_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cell_valid <= 1'b0;
      cell_port  <= '0;
      cell_qid   <= '0;
    end else begin
      cell_valid <= send;
      if (send) begin
        cell_port <= port;
        cell_qid  <= cand_qid;
      end
    end
  end

endmodule

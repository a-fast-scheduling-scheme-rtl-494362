// voq_input: the virtual output queues of one input port.
//
// Every input keeps a separate FIFO for each output, so a cell waiting for
// a busy output does not block cells behind it that go elsewhere
// (head-of-line blocking). VOQ(j) stores the cells that arrived at this
// input for output j; a non-empty VOQ raises the request to output j, and
// when the scheduler matches this input to output j the head of VOQ(j) is
// dequeued and sent into the switch fabric.
//
// The N queues are circular buffers of DEPTH cells each in one memory
// array; the depth, the cell width and the arrival interface are this
// design's choices. One arrival and one departure may happen in the same
// cycle, also on the same queue.
//
// Interface and timing:
//   in_valid/in_dest/in_cell : arriving cell for output in_dest; it is
//                              written at the clock edge when in_ready is
//                              high (in_ready = VOQ(in_dest) not full)
//   deq/deq_sel              : remove the head of VOQ(deq_sel) at the edge
//   head_cell                : head of VOQ(deq_sel), combinational
//   nonempty[j], count[j]    : occupancy of VOQ(j)
module voq_input #(
  parameter int N      = 4,
  parameter int CELL_W = 424,
  parameter int DEPTH  = 16,
  localparam int PW    = $clog2(N),
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic [PW-1:0]               in_dest,
  input  logic [CELL_W-1:0]           in_cell,
  output logic                        in_ready,
  input  logic                        deq,
  input  logic [PW-1:0]               deq_sel,
  output logic [CELL_W-1:0]           head_cell,
  output logic [N-1:0]                nonempty,
  output logic [N-1:0][AW:0]          count
);
  logic [CELL_W-1:0] mem [N*DEPTH];
  logic [N-1:0][AW-1:0] wptr, rptr;

  logic do_enq, do_deq;

  assign in_ready = (int'(count[in_dest]) < DEPTH);
  assign do_enq   = in_valid && in_ready;
  assign do_deq   = deq && nonempty[deq_sel];

  for (genvar j = 0; j < N; j++) begin : g_ne
    assign nonempty[j] = (count[j] != '0);
  end

  assign head_cell = mem[int'(deq_sel) * DEPTH + int'(rptr[deq_sel])];

  always_ff @(posedge clk) begin
    if (do_enq) mem[int'(in_dest) * DEPTH + int'(wptr[in_dest])] <= in_cell;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      for (int j = 0; j < N; j++) begin
        logic enq_j, deq_j;
        enq_j = do_enq && (int'(in_dest) == j);
        deq_j = do_deq && (int'(deq_sel) == j);
        if (enq_j) wptr[j] <= AW'((int'(wptr[j]) + 1) % DEPTH);
        if (deq_j) rptr[j] <= AW'((int'(rptr[j]) + 1) % DEPTH);
        if (enq_j && !deq_j)      count[j] <= count[j] + 1'b1;
        else if (deq_j && !enq_j) count[j] <= count[j] - 1'b1;
      end
    end
  end

  a_deq_nonempty: assert property (@(posedge clk) disable iff (!rst_n) deq |-> nonempty[deq_sel])
    else $error("voq_input: dequeue from an empty VOQ");
endmodule

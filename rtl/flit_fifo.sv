// flit_fifo: the input queues of one port, one queue per virtual channel.
//
// NVC circular queues of DEPTH words each, held in one memory array indexed
// by {virtual channel, slot}. One word can be written and one word removed
// (popped) per clock, from any queues. The oldest word of every queue is
// visible at the same time on front[], because each virtual channel has its
// own route computation that looks at its head flit. A write to a full queue
// is dropped; upstream flow control (credits or CTS) prevents it.
//
// The number of queues (5), their depth (16) and word width (77) are the
// router's; the circular-buffer organisation is this design's choice.
//
// Timing: a word written at a clock edge is visible on front[] after that
// edge; pop removes the front word at the edge.
module flit_fifo #(
  parameter int unsigned NVC   = 5,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned W     = 77
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         wr_en,
  input  logic [$clog2(NVC)-1:0]       wr_vc,
  input  logic [W-1:0]                 wr_data,
  input  logic                         pop,
  input  logic [$clog2(NVC)-1:0]       pop_vc,
  output logic [NVC-1:0][W-1:0]        front,
  output logic [NVC-1:0]               empty,
  output logic [NVC-1:0][$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [W-1:0] mem [NVC*DEPTH];
  logic [NVC-1:0][AW-1:0] rd_ptr, wr_ptr;

  always_ff @(posedge clk) begin
    if (wr_en && count[wr_vc] != CW'(DEPTH))
      mem[int'(wr_vc) * DEPTH + int'(wr_ptr[wr_vc])] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      for (int v = 0; v < NVC; v++) begin
        logic do_wr, do_rd;
        do_wr = wr_en && wr_vc == v && count[v] != CW'(DEPTH);
        do_rd = pop && pop_vc == v && count[v] != 0;
        if (do_wr) wr_ptr[v] <= wr_ptr[v] + 1'b1;
        if (do_rd) rd_ptr[v] <= rd_ptr[v] + 1'b1;
        if (do_wr && !do_rd) count[v] <= count[v] + 1'b1;
        else if (do_rd && !do_wr) count[v] <= count[v] - 1'b1;
      end
    end
  end

  always_comb begin
    for (int v = 0; v < NVC; v++) begin
      front[v] = mem[v * DEPTH + int'(rd_ptr[v])];
      empty[v] = count[v] == 0;
    end
  end
endmodule

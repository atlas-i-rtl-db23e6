// queue_manager: the logical output queues kept inside the shared buffer.
//
// There is one FIFO per (output, service class) pair, so cells of different
// priorities and different outputs never block each other (no head-of-line
// blocking), and all queues share the same physical buffer. A queue is a linked
// list of buffer addresses: per-queue head, tail and length registers plus a
// next-pointer memory. Each output has its own next-pointer memory, so a
// multicast cell is linked into the queues of all its outputs at once and the
// cell body is stored only once. Per-output, per-class logical queues in a
// shared buffer follow the chip description; the linked-list organisation is a
// choice of this design.
//
// Interface: one enqueue per cycle (a cell address into the class-enq_cls queue
// of every output in enq_mask) and one dequeue per cycle (the head of queue
// deq_out/deq_cls). head/nonempty show every queue's head combinationally from
// registers; both operations take effect at the clock edge. Enqueue and dequeue
// of the same queue in one cycle are allowed.
module queue_manager #(
  parameter int unsigned OUTS = atlas_pkg::N_LINKS,
  parameter int unsigned CLS  = atlas_pkg::N_CLASSES,
  parameter int unsigned N    = atlas_pkg::N_CELLS
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  input  logic                                    enq_valid,
  input  logic [OUTS-1:0]                         enq_mask,
  input  logic [$clog2(CLS)-1:0]                  enq_cls,
  input  logic [$clog2(N)-1:0]                    enq_addr,
  input  logic                                    deq_valid,
  input  logic [$clog2(OUTS)-1:0]                 deq_out,
  input  logic [$clog2(CLS)-1:0]                  deq_cls,
  output logic [OUTS-1:0][CLS-1:0][$clog2(N)-1:0] head,
  output logic [OUTS-1:0][CLS-1:0]                nonempty
);
  localparam int unsigned AW = $clog2(N);
  localparam int unsigned CW = AW + 1;

  logic [AW-1:0] nxt [OUTS][N];
  logic [OUTS-1:0][CLS-1:0][AW-1:0] head_q, tail_q;
  logic [OUTS-1:0][CLS-1:0][CW-1:0] len_q;

  assign head = head_q;
  always_comb
    for (int o = 0; o < OUTS; o++)
      for (int c = 0; c < CLS; c++)
        nonempty[o][c] = (len_q[o][c] != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q <= '0;
      tail_q <= '0;
      len_q  <= '0;
    end else begin
      for (int o = 0; o < OUTS; o++) begin
        for (int c = 0; c < CLS; c++) begin
          logic do_enq, do_deq;
          do_enq = enq_valid && enq_mask[o] && (enq_cls == ($clog2(CLS))'(c));
          do_deq = deq_valid && (deq_out == ($clog2(OUTS))'(o)) &&
                   (deq_cls == ($clog2(CLS))'(c)) && (len_q[o][c] != '0);
          if (do_enq) tail_q[o][c] <= enq_addr;
          if (do_deq) begin
            // After the dequeue the head is the next cell, or the cell
            // being enqueued now if the queue held only one.
            if (len_q[o][c] == CW'(1)) head_q[o][c] <= enq_addr;
            else                       head_q[o][c] <= nxt[o][head_q[o][c]];
          end else if (do_enq && len_q[o][c] == '0) begin
            head_q[o][c] <= enq_addr;
          end
          len_q[o][c] <= len_q[o][c] + CW'(do_enq) - CW'(do_deq);
        end
      end
    end
  end

  // Next-pointer memories: link the new cell behind the current tail. The
  // memory of an output is shared by its classes, so an empty queue's stale
  // tail must not be written.
  always_ff @(posedge clk) begin
    for (int o = 0; o < OUTS; o++)
      if (enq_valid && enq_mask[o] && len_q[o][enq_cls] != '0)
        nxt[o][tail_q[o][enq_cls]] <= enq_addr;
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   deq_valid |-> nonempty[deq_out][deq_cls])
    else $error("queue_manager: dequeue from empty queue %0d/%0d", deq_out, deq_cls);
endmodule

// tb_queue_manager: self-checking test of the logical output queues.
// A reference model keeps one SystemVerilog queue per (output, class). Random
// unicast and multicast enqueues and random dequeues run for many cycles, with
// enqueue and dequeue of the same queue in one cycle included; every cycle the
// nonempty flags and head addresses of all 48 queues are compared with the
// model, so FIFO order per queue and multicast linking are both checked.
module tb_queue_manager;
  localparam int OUTS = 16, CLS = 3, N = 256;
  logic clk = 0, rst_n = 0;
  logic enq_valid = 0, deq_valid = 0;
  logic [OUTS-1:0] enq_mask = 0;
  logic [1:0] enq_cls = 0, deq_cls = 0;
  logic [7:0] enq_addr = 0;
  logic [3:0] deq_out = 0;
  logic [OUTS-1:0][CLS-1:0][7:0] head;
  logic [OUTS-1:0][CLS-1:0] nonempty;

  int mq [OUTS][CLS][$];
  int refc [N];
  int freeq [$];
  int checks = 0, failures = 0, same_q = 0, mcast = 0;

  queue_manager #(.OUTS(OUTS), .CLS(CLS), .N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < N; a++) begin freeq.push_back(a); refc[a] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int dq_o, dq_c, ea;
      @(negedge clk);
      // compare state
      for (int o = 0; o < OUTS; o++)
        for (int c = 0; c < CLS; c++) begin
          check(nonempty[o][c] == (mq[o][c].size() != 0), $sformatf("nonempty %0d/%0d", o, c));
          if (mq[o][c].size() != 0)
            check(head[o][c] == 8'(mq[o][c][0]), $sformatf("head %0d/%0d", o, c));
        end
      // choose a dequeue
      deq_valid = 0;
      if ($urandom_range(0, 99) < 55) begin
        for (int t = 0; t < 8; t++) begin
          dq_o = $urandom_range(0, OUTS - 1); dq_c = $urandom_range(0, CLS - 1);
          if (mq[dq_o][dq_c].size() != 0) begin deq_valid = 1; break; end
        end
      end
      deq_out = 4'(dq_o); deq_cls = 2'(dq_c);
      // choose an enqueue
      enq_valid = 0;
      if (freeq.size() != 0 && $urandom_range(0, 99) < 50) begin
        enq_valid = 1;
        ea = freeq.pop_front();
        enq_addr = 8'(ea);
        enq_cls = 2'($urandom_range(0, CLS - 1));
        if ($urandom_range(0, 3) == 0) begin
          enq_mask = 16'($urandom) | 16'(1);
          mcast++;
        end else enq_mask = 16'(1) << $urandom_range(0, OUTS - 1);
        if (deq_valid && $urandom_range(0, 3) == 0) begin
          enq_mask[dq_o] = 1'b1; enq_cls = 2'(dq_c);  // same queue both ways
          same_q++;
        end
      end
      // update model (dequeue sees the old contents)
      if (deq_valid) begin
        int a;
        a = mq[dq_o][dq_c].pop_front();
        refc[a]--;
        if (refc[a] == 0) freeq.push_back(a);
      end
      if (enq_valid) begin
        refc[ea] = $countones(enq_mask);
        for (int o = 0; o < OUTS; o++) if (enq_mask[o]) mq[o][enq_cls].push_back(ea);
      end
    end
    check(same_q > 50 && mcast > 500, "stimulus covered same-queue and multicast cases");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

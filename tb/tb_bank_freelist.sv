// tb_bank_freelist: free-list helper. Checks the reset order 0..NB-1, FIFO
// order of pushed banks, the same-cycle hand-over of a bank pushed while the
// list is empty, and the empty flag, against a queue model.
module tb_bank_freelist;
  localparam int NB = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 0, push = 0, pop = 0, empty;
  logic [1:0] push_id = '0, pop_id;
  int q [$];
  int checks = 0, failures = 0;

  bank_freelist #(.NB(NB)) dut (.clk, .rst_n, .push, .push_id, .pop, .pop_id, .empty);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    int held [$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NB; i++) q.push_back(i);
    // take all banks, checking reset order
    for (int i = 0; i < NB; i++) begin
      pop = 1; #1;
      chk(int'(pop_id) == i, $sformatf("reset order: got %0d, expected %0d", pop_id, i));
      held.push_back(int'(pop_id)); void'(q.pop_front());
      @(negedge clk);
    end
    pop = 0; #1;
    chk(empty, "not empty after taking all banks");
    // empty list: push and pop together hands the pushed bank over
    push = 1; pop = 1; push_id = 2'd2; #1;
    chk(pop_id == 2'd2, "same-cycle hand-over");
    @(negedge clk); push = 0; pop = 0; #1;
    chk(empty, "hand-over changed the count");
    // random traffic against the model
    held = '{0, 1, 3, 2};
    for (int r = 0; r < 200; r++) begin
      push = (held.size() > 0) && ($urandom_range(0, 1) == 1);
      pop  = ((q.size() > 0) || push) && ($urandom_range(0, 1) == 1);
      if (push) begin
        int k;
        k = $urandom_range(0, held.size() - 1);
        push_id = 2'(held[k]); held.delete(k);
      end
      #1;
      if (pop) begin
        int e;
        e = (q.size() > 0) ? q[0] : int'(push_id);
        chk(int'(pop_id) == e, $sformatf("pop got %0d, expected %0d", pop_id, e));
      end
      chk(empty == (q.size() == 0), "empty flag");
      @(negedge clk);
      if (push) q.push_back(int'(push_id));
      if (pop) held.push_back(q.pop_front());
      push = 0; pop = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
